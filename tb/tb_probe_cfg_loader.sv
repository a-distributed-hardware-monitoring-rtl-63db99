// tb_probe_cfg_loader: fills the configuration memory, queues several load
// requests back to back (more than the request FIFO holds, honouring
// req_ready) and checks every configuration-bus write: target probe,
// register address, data and order; also the L+1 cycle execution time.
module tb_probe_cfg_loader;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, stalls = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask
  logic mem_we = 0; logic [9:0] mem_addr = '0; logic [31:0] mem_wdata = '0;
  logic req_valid = 0, req_ready; logic [31:0] req = '0;
  pcfg_bus_t pcfg; logic [4:0] pcfg_we; logic busy;
  probe_cfg_loader #(.N_P(5), .MEM_WORDS(1024), .REQ_DEPTH(4)) dut (.*);
  typedef struct { int p; int a; logic [31:0] d; } wr_t;
  wr_t exp [$];
  int first_wr = -1, last_wr = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pcfg.we) begin
      if (first_wr < 0) first_wr = cyc;
      last_wr = cyc;
      chk(exp.size() > 0, "unexpected write");
      if (exp.size() > 0) begin
        chk(pcfg_we == (5'b1 << exp[0].p), $sformatf("probe strobe %b exp %0d", pcfg_we, exp[0].p));
        chk(pcfg.addr == 9'(exp[0].a) && pcfg.wdata == exp[0].d, "addr/data");
        void'(exp.pop_front());
      end
    end else chk(pcfg_we == 0, "no strobe when idle");
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int t_req;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      mem_we = 1; mem_addr = 10'(i); mem_wdata = 32'hC0DE_0000 + 32'(i * 3); @(negedge clk);
    end
    mem_we = 0;
    chk(!busy, "idle");
    // single request timing: 16 words
    req = {1'b0, 3'd2, 9'h040, 9'd15, 10'd100};
    for (int k = 0; k < 16; k++) exp.push_back('{2, 9'h040 + k, 32'hC0DE_0000 + 32'((100 + k) * 3)});
    req_valid = 1; t_req = cyc; @(negedge clk); req_valid = 0;
    wait (exp.size() == 0); @(negedge clk);
    chk(last_wr - first_wr == 15, "one word per cycle");
    chk(first_wr - t_req <= 3, $sformatf("starts promptly (%0d)", first_wr - t_req));
    @(negedge clk) chk(!busy, "idle after request");
    // burst of 8 requests
    for (int r = 0; r < 8; r++) begin
      int p, a, l, b;
      p = r % 5; a = 9'h100 + r * 8; l = 1 + ($urandom % 30); b = $urandom % 900;
      for (int k = 0; k < l; k++) exp.push_back('{p, a + k, 32'hC0DE_0000 + 32'((b + k) * 3)});
      req = {1'b0, 3'(p), 9'(a), 9'(l - 1), 10'(b)};
      req_valid = 1;
      #1;
      while (!req_ready) begin stalls++; @(negedge clk); #1; end
      @(negedge clk);
      req_valid = 0;
    end
    wait (exp.size() == 0);
    repeat (3) @(negedge clk);
    chk(!busy, "done");
    chk(stalls > 0, "request FIFO filled up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
