// tb_probe: configures a probe (with EOP detector) over its configuration
// bus, then drives random instruction, writeback and power traces from a
// core model that stalls while halt is high. Checks that every detected
// event leaves the probe exactly once, with the right IDs and timestamp,
// in timestamp order; that EOP markers appear every 256 cycles; that halt
// is raised when the output is blocked and no event is lost meanwhile.
module tb_probe;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_halt = 0, n_eop = 0, n_ev = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask
  logic ts_sync_load = 0; ts_t ts_sync_value = '0, ts;
  logic pw_valid = 0, instr_valid = 0, wb_valid = 0, halt, out_valid, out_ready = 0;
  logic [15:0] pw = 16'd500; logic [31:0] instr_pc = '0, wb_pc = '0; logic [63:0] wb_result = '0;
  pcfg_bus_t cfg = '0; trace_t out_data;
  probe #(.N_CP(8), .N_OOR(4), .FIFO_DEPTH(4), .HAS_EOP(1'b1)) dut (.*);

  task automatic wr(input int a, input logic [31:0] d);
    cfg = '{we: 1, addr: 9'(a), wdata: d}; @(negedge clk); cfg.we = 0;
  endtask

  trace_t exp [$];   // expected elements (multiset), removed when seen
  bit pw_prev_out;
  int cyc = 0; bit have_last = 0; ts_t last_ts;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (halt) n_halt++;
  end
  // output monitor
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int idx;
    idx = -1;
    foreach (exp[i]) if (idx < 0 && exp[i] == out_data) idx = i;
    chk(idx >= 0 || out_data.ev == EOP_ID, $sformatf("unexpected element %h", out_data));
    if (idx >= 0) begin exp.delete(idx); n_ev++; end
    if (out_data.ev == EOP_ID) begin n_eop++; chk(out_data.ts == 0, "EOP stamped 0"); end
    if (have_last) chk(get_first(last_ts == out_data.ts ? out_data : '{ev: 8'h00, ts: last_ts, cl: '0}, out_data) ||
                       out_data.ts == last_ts, "timestamp order");
    last_ts = out_data.ts; have_last = 1;
  end

  initial begin repeat (60000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wr(0, 3); wr(1, 32'h150); wr(2, 100); wr(3, 900);            // EOP on, power ev 0x50 cl 1
    for (int k = 0; k < 8; k++) begin wr(9'h40 + k, 32'h1000 + 32'(k) * 4); wr(9'h60 + k, 32'h10200 | k); end
    wr(9'h100, 32'h2000); wr(9'h101, 32'h10320); wr(9'h102, 0); wr(9'h103, 0); wr(9'h104, 1000); wr(9'h105, 0);
    // run
    pw_prev_out = 0;
    for (int i = 0; i < 6000; i++) begin
      bit blocked;
      blocked = (i >= 2000 && i < 2100);          // output blocked: forces a halt
      out_ready = !blocked && (($urandom % 4) != 0);
      if (!halt) begin
        instr_valid = ($urandom % 2) != 0;
        instr_pc = ($urandom % 3 == 0) ? 32'h1000 + 32'($urandom % 10) * 4 : 32'h8000;
        wb_valid = ($urandom % 4) == 0; wb_pc = 32'h2000; wb_result = 64'($urandom % 1100);
        pw_valid = 1; pw = ($urandom % 20 == 0) ? 16'd950 : 16'd500;
      end
      #1;
      if (!halt) begin
        if (instr_valid && instr_pc >= 32'h1000 && instr_pc < 32'h1020)
          exp.push_back('{ev: evid_t'((instr_pc - 32'h1000) / 4), ts: ts, cl: 2'd2});
        if (wb_valid && wb_result > 1000) exp.push_back('{ev: 8'h20, ts: ts, cl: 2'd3});
        if (pw_valid && pw > 900 && !pw_prev_out) exp.push_back('{ev: 8'h50, ts: ts, cl: 2'd1});
        if (pw_valid) pw_prev_out = pw > 900;
      end
      @(negedge clk);
    end
    out_ready = 1; instr_valid = 0; wb_valid = 0; pw_valid = 0;
    repeat (50) @(negedge clk);
    chk(exp.size() == 0, $sformatf("%0d events not delivered", exp.size()));
    chk(n_halt > 0, "halt was raised");
    chk(n_eop >= 22 && n_eop <= 25, $sformatf("EOP count %0d", n_eop));
    chk(n_ev > 500, "events delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
