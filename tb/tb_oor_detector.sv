// tb_oor_detector: four comparators, one per data type, with bounds
// crossing zero; results are drawn in and out of range and compared with a
// reference written with real/integer arithmetic (not the bit-key trick).
module tb_oor_detector;
  import mon_pkg::*;
  int checks = 0, failures = 0, evs = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask
  oor_cfg_t cfg [4]; ts_t ts; logic halt, wb_valid; logic [31:0] wb_pc; logic [63:0] wb_result;
  logic ev_valid; trace_t ev_data;
  oor_detector #(.N_OOR(4)) dut (.*);

  // float bit patterns built from sign/exponent/mantissa of small integers
  function automatic logic [31:0] f32(int v);
    int a; int e; logic [31:0] r;
    if (v == 0) return 32'h0;
    a = (v < 0) ? -v : v;
    e = 0; while ((a >> (e + 1)) != 0) e++;
    r = {v < 0, 8'(127 + e), 23'((a << (23 - e)) & 32'h7FFFFF)};
    return r;
  endfunction

  initial begin
    bit expv; longint sv; longint unsigned uv; real dv; int fv; int k;
    cfg[0] = '{en: 1, pc: 32'h100, dtype: DT_UINT,   rmin: 64'd10, rmax: 64'd1000, ev: 8'd1, cl: 2'd0};
    cfg[1] = '{en: 1, pc: 32'h104, dtype: DT_SINT,   rmin: -64'sd50, rmax: 64'sd50, ev: 8'd2, cl: 2'd1};
    cfg[2] = '{en: 1, pc: 32'h108, dtype: DT_FLOAT,  rmin: {32'b0, f32(-3)}, rmax: {32'b0, f32(12)}, ev: 8'd3, cl: 2'd2};
    cfg[3] = '{en: 1, pc: 32'h10C, dtype: DT_DOUBLE, rmin: $realtobits(-2.5), rmax: $realtobits(100.25), ev: 8'd4, cl: 2'd3};
    halt = 0;
    for (int i = 0; i < 4000; i++) begin
      k = $urandom % 4; ts = ts_t'(i); wb_valid = ($urandom % 5) != 0; wb_pc = 32'h100 + 32'(k) * 4;
      case (k)
        0: begin uv = ($urandom % 2) ? longint'($urandom % 1100) : {$urandom, $urandom};
                 wb_result = uv; expv = (uv < 10) || (uv > 1000); end
        1: begin sv = longint'($urandom % 200) - 100; if (i % 50 == 0) sv = -64'sd1 <<< 62;
                 wb_result = sv; expv = (sv < -50) || (sv > 50); end
        2: begin fv = int'($urandom % 40) - 20; wb_result = {32'hDEAD_BEEF, f32(fv)};
                 expv = (fv < -3) || (fv > 12); end
        default: begin dv = (real'($urandom % 2000) - 1000.0) / 8.0; wb_result = $realtobits(dv);
                 expv = (dv < -2.5) || (dv > 100.25); end
      endcase
      if (i % 333 == 0 && k == 3) begin wb_result = 64'h7FF8_0000_0000_0001; expv = 1; end
      #1;
      chk(ev_valid == (expv && wb_valid), $sformatf("type %0d result %h", k, wb_result));
      if (ev_valid) begin evs++; chk(ev_data == '{ev: evid_t'(k + 1), ts: ts, cl: clid_t'(k)}, "fields"); end
      #1;
    end
    // not a watched address, halted
    wb_pc = 32'h200; wb_valid = 1; wb_result = '1; #1 chk(!ev_valid, "other pc");
    wb_pc = 32'h100; halt = 1; #1 chk(!ev_valid, "halted"); halt = 0; #1 chk(ev_valid, "unhalted");
    chk(evs > 500, "events seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
