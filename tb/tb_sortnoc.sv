// tb_sortnoc: 2x2 SortNoC with the target at r3. Each tile injects elements
// stamped with the injection cycle.
//  1. Single elements: the latency from injection to each router's local
//     output must be 1 (local FIFO) + N_diam + 1 (delay + hops) + 1 + hops
//     from the target on the broadcast path.
//  2. Random traffic at 0.1 elements per cycle for the whole system: every
//     router must deliver every element exactly once, all in the same
//     order, and in timestamp order.
//  3. Saturation (all tiles inject every cycle): back-pressure must occur,
//     nothing may be lost or duplicated, and the system output rate must be
//     one element per cycle.
module tb_sortnoc;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask
  logic inj_valid [4], inj_ready [4], ej_valid [4];
  trace_t inj_data [4], ej_data [4];
  sortnoc #(.MX(2), .MY(2), .TX(1), .TY(1)) dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // per router received sequences
  trace_t rx [4][$];
  int     rx_t [4][$];
  always @(posedge clk) for (int r = 0; r < 4; r++) if (ej_valid[r]) begin
    rx[r].push_back(ej_data[r]); rx_t[r].push_back(cyc);
  end

  trace_t sent [$];
  int backpressure = 0, t_sat = 0;

  task automatic clear_rx();
    for (int r = 0; r < 4; r++) begin rx[r].delete(); rx_t[r].delete(); end
    sent.delete();
  endtask

  // ev = 8 bits of a running serial number, cl = source tile
  int serial = 0;
  task automatic run(input int cycles, input int prob_per_mille);
    for (int i = 0; i < cycles; i++) begin
      for (int t = 0; t < 4; t++) begin
        if (!inj_valid[t] || inj_ready[t]) begin
          inj_valid[t] = ($urandom % 1000) < prob_per_mille;
          inj_data[t]  = '{ev: evid_t'(serial), ts: ts_t'(cyc), cl: clid_t'(t)};
          if (inj_data[t].ev == EOP_ID) inj_data[t].ev = 8'h00;
          serial++;
        end
      end
      #1;
      for (int t = 0; t < 4; t++) begin
        if (inj_valid[t] && inj_ready[t]) sent.push_back(inj_data[t]);
        if (inj_valid[t] && !inj_ready[t]) backpressure++;
      end
      @(negedge clk);
      for (int t = 0; t < 4; t++) if (inj_valid[t] && inj_ready[t]) inj_valid[t] = 0;
    end
    for (int t = 0; t < 4; t++) inj_valid[t] = 0;
    repeat (200) @(negedge clk);
  endtask

  function automatic int hops_from_target(int r);
    return (r == 3) ? 0 : (r == 0) ? 2 : 1;
  endfunction

  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int t = 0; t < 4; t++) begin inj_valid[t] = 0; inj_data[t] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 1. single-element latencies
    for (int t = 0; t < 4; t++) begin
      int t0;
      clear_rx();
      inj_valid[t] = 1; inj_data[t] = '{ev: 8'h11, ts: ts_t'(cyc), cl: clid_t'(t)}; t0 = cyc;
      @(negedge clk) inj_valid[t] = 0;
      repeat (20) @(negedge clk);
      for (int r = 0; r < 4; r++) begin
        chk(rx[r].size() == 1, "one copy per router");
        if (rx[r].size() == 1)
          chk(rx_t[r][0] - t0 == 1 + 3 + 1 + hops_from_target(r),
              $sformatf("latency src %0d dst %0d = %0d", t, r, rx_t[r][0] - t0));
      end
    end
    // 2. operation region
    clear_rx();
    run(4000, 25);
    for (int r = 0; r < 4; r++) begin
      chk(rx[r].size() == sent.size(), $sformatf("router %0d got %0d of %0d", r, rx[r].size(), sent.size()));
      for (int i = 0; i < rx[r].size() && i < rx[3].size(); i++) chk(rx[r][i] == rx[3][i], "same order everywhere");
      for (int i = 1; i < rx[r].size(); i++)
        chk(ts_t'(rx[r][i].ts - rx[r][i-1].ts) <= T_B, $sformatf("sorted at %0d", i));
    end
    begin
      trace_t a [$], b [$];
      a = sent; b = rx[0];
      a.sort(); b.sort();
      chk(a.size() == b.size(), "same count");
      for (int i = 0; i < a.size() && i < b.size(); i++) chk(a[i] == b[i], "delivered exactly once");
    end
    // 3. saturation
    clear_rx(); backpressure = 0;
    t_sat = cyc;
    run(1000, 1000);
    chk(backpressure > 0, "back-pressure under saturation");
    chk(rx[0].size() == sent.size() && rx[3].size() == sent.size(), "nothing lost under saturation");
    begin
      int n; n = 0;
      foreach (rx_t[3][i]) if (rx_t[3][i] >= t_sat + 100 && rx_t[3][i] < t_sat + 600) n++;
      chk(n == 500, $sformatf("1 element per cycle at saturation (%0d in 500)", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
