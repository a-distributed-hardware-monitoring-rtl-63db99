// tb_delay_stage: with the output always ready every element leaves exactly
// DEPTH cycles after entering; with random stalls nothing is lost or
// reordered.
module tb_delay_stage;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask
  logic in_valid = 0, in_ready, out_valid, out_ready = 1; trace_t in_data = '0, out_data;
  delay_stage #(.DEPTH(3)) dut (.*);
  trace_t q [$]; int tin [$]; int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      for (int i = 0; i < 2000; i++) begin
        in_valid = ($urandom % 2) != 0; in_data = trace_t'($urandom);
        out_ready = (phase == 0) ? 1'b1 : (($urandom % 3) != 0);
        #1;
        if (phase == 0) chk(in_ready, "never stalls when output ready");
        if (out_valid && out_ready) begin
          chk(q.size() > 0 && out_data == q[0], "order");
          if (phase == 0) chk(cyc - tin[0] == 3, $sformatf("latency %0d", cyc - tin[0]));
          void'(q.pop_front()); void'(tin.pop_front()); n++;
        end
        if (in_valid && in_ready) begin q.push_back(in_data); tin.push_back(cyc); end
        @(negedge clk);
      end
      in_valid = 0; out_ready = 1;
      repeat (5) begin #1; if (out_valid) begin void'(q.pop_front()); void'(tin.pop_front()); end @(negedge clk); end
      chk(q.size() == 0, "drained");
      q.delete(); tin.delete();
    end
    chk(n > 1500, "traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
