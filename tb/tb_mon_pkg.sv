// tb_mon_pkg: checks the timestamp ordering rule get_first of mon_pkg.
// For every pair of true detection times a <= b less than half a timestamp
// period apart, the element stamped at a (mod 2^W_T) must be reported first,
// whichever operand order is used; on a tie an end-of-period element goes
// first.
module tb_mon_pkg;
  import mon_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  initial begin
    trace_t x, y;
    for (int a = 0; a < 300; a += 7) begin
      for (int dlt = 0; dlt < 128; dlt++) begin
        x = '{ev: 8'h01, ts: ts_t'(a), cl: '0};
        y = '{ev: 8'h02, ts: ts_t'(a + dlt), cl: '0};
        chk(get_first(x, y) == 1'b1, $sformatf("a=%0d d=%0d x before y", a, dlt));
        if (dlt != 0) chk(get_first(y, x) == 1'b0, $sformatf("a=%0d d=%0d y after x", a, dlt));
      end
    end
    // ties
    x = '{ev: EOP_ID, ts: 8'h00, cl: '0};
    y = '{ev: 8'h05,  ts: 8'h00, cl: 2'd1};
    chk(get_first(y, x) == 1'b0, "EOP wins a tie as second operand");
    chk(get_first(x, y) == 1'b1, "EOP wins a tie as first operand");
    chk(is_eop(x) && !is_eop(y), "is_eop");
    y.ev = 8'h06; x.ev = 8'h07; x.ts = 8'h00;
    chk(get_first(x, y) == 1'b1, "plain tie goes to first operand");
    // the example of the timestamp wheel with W_T = 4, scaled: 0x03 vs 0x08
    x = '{ev: 8'h01, ts: 8'h03, cl: '0};
    y = '{ev: 8'h02, ts: 8'h08, cl: '0};
    chk(get_first(x, y), "3 before 8");
    x.ts = 8'hF0; y.ts = 8'h10;
    chk(get_first(x, y), "0xF0 before 0x10 across the wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
