// tb_ts_arbiter: random heads on 4 inputs, timestamps drawn within a
// 100-cycle window of a moving base time, so the true detection order is
// known; checks the grant (oldest; tie: EOP first, then lowest index), the
// forwarded element and the per-input ready.
module tb_ts_arbiter;
  import mon_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  logic [3:0] in_valid, in_ready;
  trace_t     in_data [4];
  logic       out_valid, out_ready;
  trace_t     out_data;
  logic [1:0] out_sel;

  ts_arbiter #(.N(4)) dut (.*);

  initial begin
    int base, off [4], best, bo;
    base = 0;
    for (int it = 0; it < 4000; it++) begin
      base += $urandom % 50;
      for (int i = 0; i < 4; i++) begin
        in_valid[i] = ($urandom % 3) != 0;
        off[i] = $urandom % 100;
        if ($urandom % 8 == 0) off[i] = 10;  // force ties
        in_data[i] = '{ev: (($urandom % 16) == 0) ? EOP_ID : evid_t'(i), ts: ts_t'(base + off[i]),
                       cl: clid_t'(i)};
      end
      out_ready = ($urandom % 4) != 0;
      #1;
      best = -1; bo = 0;
      for (int i = 0; i < 4; i++)
        if (in_valid[i]) begin
          if (best < 0 || off[i] < bo ||
              (off[i] == bo && in_data[i].ev == EOP_ID && in_data[best].ev != EOP_ID)) begin
            best = i; bo = off[i];
          end
        end
      chk(out_valid == (in_valid != 0), "out_valid");
      if (best >= 0) begin
        chk(out_sel == best[1:0], $sformatf("grant %0d expected %0d", out_sel, best));
        chk(out_data == in_data[best], "data");
        chk(in_ready == (out_ready ? (4'b1 << best) : 4'b0), "ready");
      end else chk(in_ready == 0, "no ready when idle");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
