// tb_mpsoc_monitor_top: end-to-end test of the full monitoring system at its
// default size (2 x 2 tiles, 5 probes per tile, 32 APs and 32 timers per
// tile monitor). The cores are modelled by tasks that retire one
// instruction at a given PC and wait while their probe halts them.
//
// Setup over APB: tile t gets cluster ID t. One probe configuration image
// (checkpoints, power corridor, out-of-range check) is written into each
// tile's configuration memory and loaded into all five probes with 20
// queued load requests (the request FIFO fills and APB waits).
// Scenarios, each a mechanism of the design:
//  - data race (two threads on tiles 0 and 1, requirement on tile 0's AP):
//    a correct interleaving passes, the racy one fails; the latency from
//    the racing instruction to the interrupt is measured;
//  - timing requirement on tile 2's timer with start and stop detected on
//    different tiles: a 200-cycle measurement passes with latency 200;
//    a missing stop event is flagged by end-of-period counting, not before
//    T_max and at most 2*256 cycles plus pipeline delay after it;
//  - out-of-range result and power spike detected on tile 3 fail two APs;
//  - a burst of checkpoint events from all cores of tile 1 and two of tile
//    2 saturates the SortNoC, fills the probe FIFOs and halts the cores; no
//    event is lost;
//  - the broadcast trace seen by every tile stays in timestamp order and
//    EOP markers pass every cluster filter.
// Each mechanism is counted and must occur at least once.
module tb_mpsoc_monitor_top;
  import mon_pkg::*;
  localparam int NT = 4, NP = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", m); end
  endtask

  logic ts_sync_load = 0; ts_t ts_sync_value = '0;
  logic pw_valid [NT][NP]; logic [15:0] pw [NT][NP];
  logic instr_valid [NT][NP]; logic [31:0] instr_pc [NT][NP];
  logic wb_valid [NT][NP]; logic [31:0] wb_pc [NT][NP]; logic [63:0] wb_result [NT][NP];
  logic halt [NT][NP];
  logic psel [NT], penable [NT], pwrite [NT]; logic [11:0] paddr [NT]; logic [31:0] pwdata [NT], prdata [NT];
  logic pready [NT], pslverr [NT], irq [NT], violation [NT];

  mpsoc_monitor_top dut (.*);

  // ---------------- constants of the test program ----------------
  localparam logic [31:0] PC_READ = 32'h1000, PC_WRITE = 32'h1004, PC_EXIT = 32'h1008,
                          PC_TSTART = 32'h2000, PC_TSTOP = 32'h2004, PC_BURST = 32'h3000,
                          PC_CALC = 32'h4000, PC_OTHER = 32'h8000;
  localparam evid_t EV_READ = 1, EV_WRITE = 2, EV_EXIT = 3, EV_TSTART = 10, EV_TSTOP = 11,
                    EV_BURST = 30, EV_OOR = 20, EV_PWR = 21;

  // ---------------- counters of mechanisms ----------------
  int cyc = 0, n_halt = 0, n_eop = 0, n_noc_bp = 0, n_apb_wait = 0, n_filtered = 0,
      n_unsorted = 0, n_ap_fail = 0, n_ap_pass = 0, n_tmr_pass = 0, n_tmr_eop_fail = 0,
      n_oor = 0, n_pwr = 0, n_burst_rx = 0, n_burst_tx = 0;
  bit have_last [NT]; ts_t last_ts [NT];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int t = 0; t < NT; t++) begin
      for (int c = 0; c < NP; c++) if (halt[t][c]) n_halt++;
      if (dut.inj_valid[t] && !dut.inj_ready[t]) n_noc_bp++;
      if (dut.ej_valid[t]) begin
        if (is_eop(dut.ej_data[t])) n_eop++;
        if (dut.ej_data[t].cl != clid_t'(t) && !is_eop(dut.ej_data[t])) n_filtered++;
        if (have_last[t] && ts_t'(dut.ej_data[t].ts - last_ts[t]) > T_B) n_unsorted++;
        have_last[t] = 1; last_ts[t] = dut.ej_data[t].ts;
        if (t == 3 && dut.ej_data[t].ev == EV_OOR) n_oor++;
        if (t == 3 && dut.ej_data[t].ev == EV_PWR) n_pwr++;
      end
    end
    if (dut.g_tile[1].u_tm.m_valid && dut.g_tile[1].u_tm.m_data.ev == EV_BURST) n_burst_rx++;
  end

  // ---------------- APB ----------------
  task automatic apb_wr(input int t, input logic [11:0] a, input logic [31:0] d);
    psel[t] = 1; pwrite[t] = 1; paddr[t] = a; pwdata[t] = d; penable[t] = 0;
    @(negedge clk) penable[t] = 1;
    #1 while (!pready[t]) begin n_apb_wait++; @(negedge clk); #1; end
    @(negedge clk) begin psel[t] = 0; penable[t] = 0; pwrite[t] = 0; end
  endtask
  task automatic apb_rd(input int t, input logic [11:0] a, output logic [31:0] d);
    psel[t] = 1; pwrite[t] = 0; paddr[t] = a; penable[t] = 0;
    @(negedge clk) penable[t] = 1;
    #1 d = prdata[t];
    @(negedge clk) begin psel[t] = 0; penable[t] = 0; end
  endtask

  // ---------------- core model ----------------
  // retire one instruction at pc (and optionally a writeback result); the
  // instruction is held while the probe halts the core
  task automatic retire(input int t, input int c, input logic [31:0] pc,
                        input bit wb = 0, input logic [63:0] res = 0);
    instr_valid[t][c] = 1; instr_pc[t][c] = pc;
    wb_valid[t][c] = wb; wb_pc[t][c] = pc; wb_result[t][c] = res;
    #1 while (halt[t][c]) begin @(negedge clk); #1; end
    @(negedge clk);
    instr_valid[t][c] = 0; wb_valid[t][c] = 0; instr_pc[t][c] = PC_OTHER;
  endtask

  task automatic burst(input int t, input int c);
    for (int i = 0; i < 100; i++) begin retire(t, c, PC_BURST); n_burst_tx++; end
  endtask

  // program one transition table row set for AP a of tile t
  task automatic ap_entry(input int t, input int s, input evid_t e, input int nxt);
    apb_wr(t, 12'h044, {s[3:0], e}); apb_wr(t, 12'h048, nxt);
  endtask

  // ---------------- watchdog ----------------
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ---------------- test ----------------
  logic [31:0] img [26];
  initial begin
    logic [31:0] d;
    int t_race, t_irq, t_start;
    for (int t = 0; t < NT; t++) begin
      psel[t] = 0; penable[t] = 0; pwrite[t] = 0; paddr[t] = '0; pwdata[t] = '0; have_last[t] = 0;
      for (int c = 0; c < NP; c++) begin
        pw_valid[t][c] = 1; pw[t][c] = 16'd500; instr_valid[t][c] = 0; instr_pc[t][c] = PC_OTHER;
        wb_valid[t][c] = 0; wb_pc[t][c] = '0; wb_result[t][c] = '0;
      end
    end
    // configuration image: regs 0..3, 0x40..0x47, 0x60..0x67, 0x100..0x105
    img = '{32'h3, {22'b0, 2'd3, EV_PWR}, 32'd100, 32'd900,
            PC_READ, PC_WRITE, PC_EXIT, PC_TSTART, PC_TSTOP, PC_BURST, 32'hFFFF_FFF0, 32'hFFFF_FFF4,
            32'h10000 | EV_READ, 32'h10000 | EV_WRITE, 32'h10000 | EV_EXIT,
            32'h10000 | (2 << 8) | EV_TSTART, 32'h10000 | (2 << 8) | EV_TSTOP,
            32'h10000 | (1 << 8) | EV_BURST, 32'h0, 32'h0,
            PC_CALC, 32'h10000 | (3 << 8) | EV_OOR, 32'd0, 32'd0, 32'd1000, 32'd0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- configuration of all tiles ----
    for (int t = 0; t < NT; t++) begin
      apb_wr(t, 12'h000, t);
      apb_wr(t, 12'h020, 0);
      for (int i = 0; i < 26; i++) apb_wr(t, 12'h024, img[i]);
    end
    for (int t = 0; t < NT; t++)
      for (int c = 0; c < NP; c++) begin
        apb_wr(t, 12'h028, {1'b0, 3'(c), 9'h000, 9'd3, 10'd0});
        apb_wr(t, 12'h028, {1'b0, 3'(c), 9'h040, 9'd7, 10'd4});
        apb_wr(t, 12'h028, {1'b0, 3'(c), 9'h060, 9'd7, 10'd12});
        apb_wr(t, 12'h028, {1'b0, 3'(c), 9'h100, 9'd5, 10'd20});
      end
    do begin
      d = 0;
      for (int t = 0; t < NT; t++) begin logic [31:0] s; apb_rd(t, 12'h004, s); d |= s; end
    end while (d[1]);
    chk(dut.g_tile[2].g_core[3].u_probe.u_cfg.cp[4].pc == PC_TSTOP, "probe configuration loaded");
    chk(dut.g_tile[3].g_core[0].u_probe.u_cfg.oor[0].rmax == 64'd1000, "oor configuration loaded");

    // tile 0, AP 0: data race requirement
    //   v0 -read-> v1, v1 -write-> v0, v0 -exit-> vt(2), v0 -write-> vf(3), v1 -read|exit-> vf
    apb_wr(0, 12'h040, 0);
    ap_entry(0, 0, EV_READ, 1); ap_entry(0, 1, EV_WRITE, 0); ap_entry(0, 0, EV_EXIT, 2);
    ap_entry(0, 0, EV_WRITE, 3); ap_entry(0, 1, EV_READ, 3); ap_entry(0, 1, EV_EXIT, 3);
    apb_wr(0, 12'h04C, 32'h10000 | (3 << 8) | (2 << 4) | 0);
    // tile 2, timer 0: (start, stop, 0x032, 0x155)
    apb_wr(2, 12'h060, 0); apb_wr(2, 12'h064, {EV_TSTOP, EV_TSTART});
    apb_wr(2, 12'h068, 32'h32); apb_wr(2, 12'h06C, 32'h155); apb_wr(2, 12'h070, 1);
    // tile 3: AP 0 fails on an out-of-range event, AP 1 on a power event
    apb_wr(3, 12'h040, 0); ap_entry(3, 0, EV_OOR, 3); ap_entry(3, 0, EV_PWR, 0);
    apb_wr(3, 12'h04C, 32'h10000 | (3 << 8) | (2 << 4) | 0);
    apb_wr(3, 12'h040, 1); ap_entry(3, 0, EV_PWR, 3); ap_entry(3, 0, EV_OOR, 0);
    apb_wr(3, 12'h04C, 32'h10000 | (3 << 8) | (2 << 4) | 0);
    repeat (20) @(negedge clk);
    for (int t = 0; t < NT; t++) chk(!irq[t], "no interrupt after configuration");

    // ---- data race: correct interleaving, then exit ----
    retire(0, 0, PC_READ); repeat (3) @(negedge clk);
    retire(0, 0, PC_WRITE); repeat (3) @(negedge clk);
    retire(1, 0, PC_READ); repeat (3) @(negedge clk);
    retire(1, 0, PC_WRITE); repeat (30) @(negedge clk);
    chk(!irq[0], "correct interleaving accepted");
    apb_wr(0, 12'h040, 0); apb_rd(0, 12'h050, d); chk(d == 0, "AP in v0 after read/write pairs");
    retire(0, 0, PC_EXIT); repeat (30) @(negedge clk);
    apb_rd(0, 12'h010, d); chk(d[0], "exit accepted (v_t)"); if (d[0]) n_ap_pass++;
    // ---- data race: racy interleaving ----
    apb_wr(0, 12'h04C, 32'h10000 | (3 << 8) | (2 << 4) | 0);
    retire(0, 0, PC_READ); repeat (2) @(negedge clk);
    t_race = cyc;
    retire(1, 0, PC_READ);
    t_irq = -1;
    for (int i = 0; i < 40; i++) begin if (irq[0] && t_irq < 0) t_irq = cyc; @(negedge clk); end
    chk(t_irq > 0, "data race detected");
    if (t_irq > 0) begin
      n_ap_fail++;
      $display("detection latency (detection to interrupt): %0d cycles", t_irq - t_race);
      chk(t_irq - t_race >= 10 && t_irq - t_race <= 14, "latency near the demonstrated 11-12 cycles");
    end
    chk(!irq[1] && !irq[2] && !irq[3], "only tile 0 interrupted");
    apb_rd(0, 12'h008, d); chk(d == 1, "AP_FAIL bit 0");
    retire(1, 0, PC_WRITE); retire(0, 0, PC_WRITE);

    // ---- timing: 200-cycle measurement across tiles 2 and 3 ----
    retire(2, 1, PC_TSTART); t_start = cyc;
    while (cyc < t_start + 199) @(negedge clk);
    retire(3, 4, PC_TSTOP);
    repeat (30) @(negedge clk);
    apb_wr(2, 12'h060, 0); apb_rd(2, 12'h074, d);
    chk(d == 200, $sformatf("measured latency %0d", d));
    apb_rd(2, 12'h014, d); chk(d[0] && !irq[2], "timing requirement met"); if (d[0]) n_tmr_pass++;
    // ---- timing: stop never comes ----
    retire(2, 1, PC_TSTART); t_start = cyc;
    t_irq = -1;
    for (int i = 0; i < 1200; i++) begin if (irq[2] && t_irq < 0) t_irq = cyc; @(negedge clk); end
    chk(t_irq > 0, "missing stop detected");
    if (t_irq > 0) begin
      n_tmr_eop_fail++;
      $display("missed deadline flagged %0d cycles after start (T_max = 341)", t_irq - t_start);
      chk(t_irq - t_start > 32'h155 && t_irq - t_start <= 32'h155 + 512 + 20, "flagged within the EOP bound");
    end

    // ---- out-of-range result and power spike on tile 3 ----
    retire(3, 2, PC_CALC, 1, 64'd999); repeat (30) @(negedge clk);
    chk(!irq[3], "in-range result accepted");
    retire(3, 2, PC_CALC, 1, 64'd1001); repeat (30) @(negedge clk);
    apb_rd(3, 12'h008, d); chk(d[1:0] == 2'b01, "out-of-range fails AP 0");
    pw[3][4] = 16'd950; @(negedge clk); pw[3][4] = 16'd500;
    repeat (30) @(negedge clk);
    apb_rd(3, 12'h008, d); chk(d[1:0] == 2'b11, "power spike fails AP 1");
    if (d[0]) n_ap_fail++;
    if (d[1]) n_ap_fail++;

    // ---- burst: all cores of tile 1 and two of tile 2 hit a checkpoint every cycle ----
    fork
      burst(1, 0); burst(1, 1); burst(1, 2); burst(1, 3); burst(1, 4);
      burst(2, 0); burst(2, 1);
    join
    repeat (100) @(negedge clk);
    chk(n_burst_rx == n_burst_tx, $sformatf("burst: %0d sent, %0d seen by tile 1", n_burst_tx, n_burst_rx));

    // ---- mechanism summary ----
    $display("halt=%0d eop=%0d noc_backpressure=%0d apb_wait=%0d filtered=%0d ap_fail=%0d ap_pass=%0d tmr_pass=%0d tmr_eop_fail=%0d oor=%0d pwr=%0d",
             n_halt, n_eop, n_noc_bp, n_apb_wait, n_filtered, n_ap_fail, n_ap_pass, n_tmr_pass,
             n_tmr_eop_fail, n_oor, n_pwr);
    chk(n_halt > 0, "pipeline halt occurred");
    chk(n_eop > 0, "EOP markers distributed");
    chk(n_noc_bp > 0, "SortNoC back-pressure occurred");
    chk(n_apb_wait > 0, "configuration request FIFO filled");
    chk(n_filtered > 0, "cluster filtering occurred");
    chk(n_ap_fail >= 3 && n_ap_pass >= 1, "AP verdicts");
    chk(n_tmr_pass >= 1 && n_tmr_eop_fail >= 1, "timer verdicts");
    chk(n_oor > 0 && n_pwr > 0, "out-of-range and power events");
    chk(n_unsorted == 0, $sformatf("broadcast trace sorted (%0d inversions)", n_unsorted));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
