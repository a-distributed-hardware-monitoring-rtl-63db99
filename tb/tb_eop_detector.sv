// tb_eop_detector: an enabled detector issues (EOP_ID, 0, 0) one cycle after
// a wrap, holds it until taken, reports an overrun when a wrap finds the
// previous marker not taken, and issues nothing when disabled.
module tb_eop_detector;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask
  logic en = 0, wrap = 0, out_valid, out_ready = 0, overrun;
  trace_t out_data;
  eop_detector dut (.*);
  initial begin repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wrap = 1;
    @(negedge clk) wrap = 0;
    chk(!out_valid, "disabled: nothing");
    en = 1; wrap = 1;
    @(negedge clk) wrap = 0;
    chk(out_valid && out_data.ev == EOP_ID && out_data.ts == 0, "marker issued");
    repeat (3) begin @(negedge clk); chk(out_valid, "held until taken"); end
    wrap = 1; #1 chk(overrun, "overrun flagged"); 
    @(negedge clk) wrap = 0;
    out_ready = 1;
    @(negedge clk) chk(!out_valid, "taken");
    out_ready = 0;
    wrap = 1; #1 chk(!overrun, "no overrun when empty");
    @(negedge clk) wrap = 0; chk(out_valid, "second marker");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
