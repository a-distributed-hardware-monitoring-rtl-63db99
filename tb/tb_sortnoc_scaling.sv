// tb_sortnoc_scaling: latency and ordering of SortNoC on larger meshes,
// the interconnect experiment the design was evaluated with: 10,000 trace
// elements injected at random routers at a given average rate in elements
// per cycle for the whole system (EPCPS).
// Every router generates an element in a cycle with probability EPCPS / NR,
// independently of the others, so elements of different routers collide.
//
// Four meshes run side by side (2x2, 4x4, 6x6 and 8x8, target router at
// (S/2, S/2)), each at 0.1 EPCPS; the 6x6 mesh then also runs at 0.5 and
// 0.9 EPCPS. Each element is stamped with the cycle it was generated in and
// waits in an unbounded source queue of its router until the router takes
// it, so the measured latency (generation to delivery at a router's local
// output, over all copies) includes source queueing. Checked per run:
//  - every router delivers every element exactly once (count and checksum);
//  - the delivered stream is in timestamp order at every router;
//  - the smallest latency is the contention-free latency to the target
//    itself: 1 (local FIFO) + N_diam + 1 (delay and hops) + 1 (broadcast
//    register) = N_diam + 3;
//  - at 0.1 EPCPS the average latency lies within 2 cycles above the
//    contention-free average N_diam + 3 + (mean hop count from the target);
//  - on the 6x6 mesh the average latency does not fall as the rate rises.
// The averages are printed (in hundredths of a cycle) for comparison with
// published curves. The delay of each router follows N_diam + 1 - N_h2t
// with N_diam the mesh diameter 2(S-1).
module tb_sortnoc_scaling;
  import mon_pkg::*;
  localparam int NSZ  = 4;
  localparam int N_EL = 10000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", m); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bit done [NSZ];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NSZ; g++) begin : sz
    localparam int S     = (g == 0) ? 2 : (g == 1) ? 4 : (g == 2) ? 6 : 8;
    localparam int NR    = S * S;
    localparam int D     = 2 * (S - 1);
    localparam int NRATE = (S == 6) ? 3 : 1;

    logic   inj_valid [NR], inj_ready [NR], ej_valid [NR];
    trace_t inj_data  [NR], ej_data  [NR];
    sortnoc #(.MX(S), .MY(S), .TX(S / 2), .TY(S / 2)) dut (.*);

    trace_t q [NR][$];
    bit     taken [NR];
    // statistics of the current run
    longint lat_sum;
    int     lat_min, n_rx [NR], unsorted;
    longint sum_rx [NR], sum_tx;
    ts_t    last_ts [NR];
    bit     seen [NR];

    always @(posedge clk) begin
      for (int r = 0; r < NR; r++) begin
        taken[r] = inj_valid[r] && inj_ready[r];
        if (ej_valid[r]) begin
          int l;
          l = int'(ts_t'(ts_t'(cyc) - ej_data[r].ts));
          lat_sum += l;
          if (l < lat_min) lat_min = l;
          n_rx[r]++;
          sum_rx[r] += {ej_data[r].cl, ej_data[r].ev};
          if (seen[r] && ts_t'(ej_data[r].ts - last_ts[r]) > T_B) unsorted++;
          last_ts[r] = ej_data[r].ts;
          seen[r] = 1'b1;
        end
      end
    end

    function automatic int hops_from_target(int r);
      int x, y;
      x = r % S; y = r / S;
      return ((x > S / 2) ? x - S / 2 : S / 2 - x) + ((y > S / 2) ? y - S / 2 : S / 2 - y);
    endfunction

    initial begin
      int rate, serial, prev_avg, avg, exp_min;
      real mean_back;
      mean_back = 0.0;
      for (int r = 0; r < NR; r++) mean_back += hops_from_target(r);
      mean_back = mean_back / NR;
      for (int r = 0; r < NR; r++) begin inj_valid[r] = 0; inj_data[r] = '0; end
      prev_avg = 0;
      wait (rst_n);
      for (int k = 0; k < NRATE; k++) begin
        rate = (k == 0) ? 100 : (k == 1) ? 500 : 900;   // per mille
        @(negedge clk);
        lat_sum = 0; lat_min = 1 << 30; unsorted = 0; sum_tx = 0;
        for (int r = 0; r < NR; r++) begin n_rx[r] = 0; sum_rx[r] = 0; seen[r] = 0; end
        serial = 0;
        while (serial < N_EL) begin
          for (int r = 0; r < NR; r++) if (taken[r]) void'(q[r].pop_front());
          for (int r = 0; r < NR && serial < N_EL; r++)
            if (($urandom % 1000000) < rate * 1000 / NR) begin
              trace_t e;
              e = '{ev: evid_t'(serial), ts: ts_t'(cyc), cl: clid_t'(serial >> 8)};
              if (e.ev == EOP_ID) e.ev = 8'h00;
              sum_tx += {e.cl, e.ev};
              q[r].push_back(e);
              serial++;
            end
          for (int r = 0; r < NR; r++) begin
            inj_valid[r] = q[r].size() > 0;
            inj_data[r]  = (q[r].size() > 0) ? q[r][0] : '0;
          end
          @(negedge clk);
        end
        // drain the source queues and the network
        for (int i = 0; i < 2000; i++) begin
          for (int r = 0; r < NR; r++) if (taken[r]) void'(q[r].pop_front());
          for (int r = 0; r < NR; r++) begin
            inj_valid[r] = q[r].size() > 0;
            inj_data[r]  = (q[r].size() > 0) ? q[r][0] : '0;
          end
          @(negedge clk);
        end
        for (int r = 0; r < NR; r++) begin
          chk(n_rx[r] == N_EL, $sformatf("%0dx%0d rate %0d: router %0d delivered %0d of %0d",
                                         S, S, rate, r, n_rx[r], N_EL));
          chk(sum_rx[r] == sum_tx, $sformatf("%0dx%0d: router %0d checksum", S, S, r));
        end
        chk(unsorted == 0, $sformatf("%0dx%0d rate %0d: %0d elements out of order",
                                     S, S, rate, unsorted));
        avg = int'((lat_sum * 100) / (N_EL * NR));
        exp_min = D + 3;
        $display("SORTNOC %0dx%0d EPCPS=0.%03d average latency=%0d.%02d min=%0d (contention-free average %0.2f)",
                 S, S, rate, avg / 100, avg % 100, lat_min, exp_min + mean_back);
        if (k == 0) begin
          chk(lat_min == exp_min, $sformatf("%0dx%0d minimum latency %0d, expected %0d",
                                            S, S, lat_min, exp_min));
          chk(avg >= int'((exp_min + mean_back) * 100) - 1 &&
              avg <= int'((exp_min + mean_back) * 100) + 200,
              $sformatf("%0dx%0d average latency at 0.1 EPCPS", S, S));
        end else begin
          chk(avg >= prev_avg, $sformatf("%0dx%0d latency does not fall with the rate", S, S));
        end
        prev_avg = avg;
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
