// tb_tile_monitor: one tile monitor with 5 probe inputs; the SortNoC is
// modelled by a one-cycle loopback from the injection port to the
// broadcast port plus extra broadcast elements of a foreign cluster.
// Over APB the test sets the cluster ID, programs an automaton (open/close/
// exit requirement) into AP 0 and a timing requirement into timer 0, loads
// a probe configuration from the configuration memory, and then checks:
// probe traces leave the tile in timestamp order; foreign-cluster elements
// are filtered out; the AP reaches its failure state and raises irq; the
// timer measures a latency and flags a violation; status registers read
// back correctly.
module tb_tile_monitor;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  logic psel = 0, penable = 0, pwrite = 0; logic [11:0] paddr = '0; logic [31:0] pwdata = '0, prdata;
  logic pready, pslverr;
  logic [4:0] pr_valid = '0, pr_ready; trace_t pr_data [5];
  pcfg_bus_t pcfg; logic [4:0] pcfg_we;
  logic noc_valid, noc_ready, bc_valid = 0, irq, violation; trace_t noc_data, bc_data = '0;
  tile_monitor #(.N_P(5), .N_AP(32), .N_TMR(32)) dut (.*);

  task automatic apb_wr(input logic [11:0] a, input logic [31:0] d);
    psel = 1; pwrite = 1; paddr = a; pwdata = d; penable = 0;
    @(negedge clk) penable = 1;
    #1 while (!pready) begin @(negedge clk); #1; end
    @(negedge clk) begin psel = 0; penable = 0; pwrite = 0; end
  endtask
  task automatic apb_rd(input logic [11:0] a, output logic [31:0] d);
    psel = 1; pwrite = 0; paddr = a; penable = 0;
    @(negedge clk) penable = 1;
    #1 d = prdata;
    @(negedge clk) begin psel = 0; penable = 0; end
  endtask

  // loopback SortNoC model
  int cyc = 0;
  logic inject_foreign = 0; trace_t foreign;
  assign noc_ready = 1'b1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (noc_valid) begin bc_valid <= 1; bc_data <= noc_data; end
    else if (inject_foreign) begin bc_valid <= 1; bc_data <= foreign; end
    else bc_valid <= 0;
  end
  trace_t injected [$];
  always @(posedge clk) if (noc_valid && noc_ready) injected.push_back(noc_data);
  int cfg_writes = 0; logic [31:0] cfg_seen [$];
  always @(posedge clk) if (pcfg.we) begin
    cfg_writes++;
    chk(pcfg_we == 5'b00100, "configuration goes to probe 2");
    cfg_seen.push_back({pcfg.addr, 23'(pcfg.wdata)});
  end

  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [31:0] d;
    foreach (pr_data[i]) pr_data[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    apb_wr(12'h000, 1);
    apb_rd(12'h000, d); chk(d == 1, "cluster id reads back");
    // AP 0: v0 -open(3)-> v1, v1 -close(4)-> v0, v0 -exit(5)-> vt(2), v0 -close-> vf(3), v1 -exit-> vf
    apb_wr(12'h040, 0);
    begin
      int tb [2][3] = '{'{1, 3, 2}, '{1, 0, 3}};
      for (int s = 0; s < 2; s++) begin
        apb_wr(12'h044, {s[3:0], 8'd3});
        for (int e = 0; e < 3; e++) apb_wr(12'h048, tb[s][e]);
        // events 6..11 are not part of this requirement: self-loops
        for (int e = 6; e < 12; e++) apb_wr(12'h048, s);
      end
    end
    apb_wr(12'h04C, 32'h10000 | (3 << 8) | (2 << 4) | 0);
    // timer 0: start 10, stop 11, [20, 100]
    apb_wr(12'h060, 0); apb_wr(12'h064, {16'b0, 8'd11, 8'd10});
    apb_wr(12'h068, 20); apb_wr(12'h06C, 100); apb_wr(12'h070, 1);
    // probe configuration: 6 words into registers 0x40.. of probe 2
    apb_wr(12'h020, 10);
    for (int i = 0; i < 6; i++) apb_wr(12'h024, 32'h500 + i);
    apb_wr(12'h028, {1'b0, 3'd2, 9'h040, 9'd5, 10'd10});
    repeat (12) @(negedge clk);
    chk(cfg_writes == 6, $sformatf("6 configuration writes (%0d)", cfg_writes));
    for (int i = 0; i < cfg_seen.size(); i++) chk(cfg_seen[i] == {9'(9'h40 + i), 23'(32'h500 + i)}, "config word");
    apb_rd(12'h004, d); chk(d == 0, "idle, no irq");
    // probe traces: each probe offers elements with ages out of order
    for (int p = 0; p < 5; p++) begin
      pr_valid[p] = 1;
      pr_data[p]  = '{ev: 8'h60 + 8'(p), ts: ts_t'(8'h40 - 8'(p * 3) + 8'((p % 2) * 7)), cl: 2'd0};
    end
    for (int n = 0; n < 8; n++) begin
      logic [4:0] taken;
      #1 taken = pr_valid & pr_ready;
      @(negedge clk) pr_valid = pr_valid & ~taken;
    end
    chk(pr_valid == 0, "all probe inputs served");
    repeat (5) @(negedge clk);
    chk(injected.size() == 5, "all probe elements injected");
    for (int i = 1; i < injected.size(); i++)
      chk(ts_t'(injected[i].ts - injected[i-1].ts) <= T_B, "tile trace in timestamp order");
    // own-cluster events through the loopback: open, close (AP stays undecided)
    pr_valid[0] = 1; pr_data[0] = '{ev: 8'd3, ts: ts_t'(cyc), cl: 2'd1};
    @(negedge clk) pr_data[0] = '{ev: 8'd4, ts: ts_t'(cyc), cl: 2'd1};
    @(negedge clk) pr_valid[0] = 0;
    repeat (6) @(negedge clk);
    apb_wr(12'h040, 0); apb_rd(12'h050, d); chk(d == 0, "AP back in v0");
    // a foreign-cluster close must be filtered out (it would fail the AP)
    foreign = '{ev: 8'd4, ts: ts_t'(cyc), cl: 2'd2}; inject_foreign = 1;
    @(negedge clk) inject_foreign = 0;
    repeat (4) @(negedge clk);
    chk(!irq, "foreign-cluster element filtered out");
    // timer: start, stop 50 cycles later -> pass
    pr_valid[1] = 1; pr_data[1] = '{ev: 8'd10, ts: 8'h80, cl: 2'd1}; @(negedge clk) pr_valid[1] = 0;
    pr_valid[1] = 1; pr_data[1] = '{ev: 8'd11, ts: 8'h80 + 8'd50, cl: 2'd1}; @(negedge clk) pr_valid[1] = 0;
    repeat (6) @(negedge clk);
    apb_rd(12'h074, d); chk(d == 50, $sformatf("timer latency %0d", d));
    apb_rd(12'h014, d); chk(d[0] == 1, "timer pass");
    // timer too short -> fail; AP: close in v0 -> fail
    pr_valid[1] = 1; pr_data[1] = '{ev: 8'd10, ts: 8'hF0, cl: 2'd1}; @(negedge clk) pr_valid[1] = 0;
    pr_valid[1] = 1; pr_data[1] = '{ev: 8'd11, ts: 8'hF5, cl: 2'd1}; @(negedge clk) pr_valid[1] = 0;
    repeat (6) @(negedge clk);
    apb_rd(12'h00C, d); chk(d[0] == 1, "timer fail");
    chk(irq, "irq on timer fail");
    pr_valid[3] = 1; pr_data[3] = '{ev: 8'd4, ts: ts_t'(cyc), cl: 2'd1}; @(negedge clk) pr_valid[3] = 0;
    repeat (6) @(negedge clk);
    apb_rd(12'h008, d); chk(d[0] == 1, "AP fail");
    apb_rd(12'h004, d); chk(d[0] == 1, "status irq");
    // restart both: irq drops
    apb_wr(12'h04C, 32'h10000 | (3 << 8) | (2 << 4) | 0);
    apb_wr(12'h070, 1);
    @(negedge clk) chk(!irq, "irq cleared by restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
