// tb_network_adapter: random injection with a stalling router and random
// broadcast traffic; checks that injected elements reach the router in
// order and unchanged, and that exactly the own-cluster elements plus EOP
// markers reach the monitors one cycle after the broadcast.
module tb_network_adapter;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, passed = 0, dropped = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask
  clid_t cluster_id = 2'd1;
  logic inj_valid = 0, inj_ready, noc_valid, noc_ready = 0, bc_valid = 0, mon_valid;
  trace_t inj_data = '0, noc_data, bc_data = '0, mon_data;
  network_adapter dut (.*);
  trace_t q [$];
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic exp_v; trace_t exp_d;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    exp_v = 0; exp_d = '0;
    for (int i = 0; i < 3000; i++) begin
      inj_valid = ($urandom % 2) != 0; inj_data = trace_t'($urandom);
      noc_ready = ($urandom % 3) != 0;
      bc_valid = ($urandom % 2) != 0; bc_data = trace_t'($urandom);
      if ($urandom % 10 == 0) bc_data.ev = EOP_ID;
      #1;
      chk(mon_valid == exp_v, "filter valid");
      if (exp_v) chk(mon_data == exp_d, "filter data");
      if (noc_valid && noc_ready) begin chk(q.size() > 0 && noc_data == q[0], "inject order"); void'(q.pop_front()); end
      if (inj_valid && inj_ready) q.push_back(inj_data);
      exp_v = bc_valid && (bc_data.cl == cluster_id || bc_data.ev == EOP_ID);
      exp_d = bc_data;
      if (exp_v) passed++; else if (bc_valid) dropped++;
      @(negedge clk);
    end
    chk(passed > 100 && dropped > 100, "both filter outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
