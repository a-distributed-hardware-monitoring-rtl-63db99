// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, full/valid flags, count and that a written entry is visible one
// cycle later.
module tb_sync_fifo;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  logic in_valid, in_ready, out_valid, out_ready, full;
  trace_t in_data, out_data;
  logic [2:0] count;
  trace_t model [$];

  sync_fifo #(.T(trace_t), .DEPTH(4)) dut (.*);

  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!out_valid && in_ready && count == 0, "empty after reset");
    for (int i = 0; i < 3000; i++) begin
      in_valid  = ($urandom % 3) != 0;
      out_ready = ($urandom % 2) != 0;
      in_data   = trace_t'($urandom);
      #1;
      chk(full == (model.size() == 4), "full flag");
      chk(in_ready == (model.size() < 4), "in_ready");
      chk(out_valid == (model.size() != 0), "out_valid");
      chk(count == model.size(), "count");
      if (out_valid) chk(out_data == model[0], "head data");
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
