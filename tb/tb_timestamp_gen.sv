// tb_timestamp_gen: counts from 0 after reset, wraps after 256 cycles with
// wrap high in the cycle holding 0xFF, and reloads on sync_load.
module tb_timestamp_gen;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask
  logic sync_load = 0; ts_t sync_value = '0, ts; logic wrap;
  timestamp_gen dut (.*);
  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int n;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (n = 0; n < 600; n++) begin
      chk(ts == ts_t'(n), $sformatf("ts %0d at cycle %0d", ts, n));
      chk(wrap == ((n % 256) == 255), "wrap");
      @(negedge clk);
    end
    sync_load = 1; sync_value = 8'h40;
    @(negedge clk) sync_load = 0;
    chk(ts == 8'h40, "loaded");
    @(negedge clk) chk(ts == 8'h41, "counts on after load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
