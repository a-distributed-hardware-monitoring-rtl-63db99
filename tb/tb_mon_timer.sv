// tb_mon_timer: runs the timing example of the design (T_min = 0x032,
// T_max = 0x155, start stamped 0xFE, EOP markers 2, 0x102 and 0x202 cycles
// later): without a stop event the violation must be flagged at the third
// EOP and not before. Then random start/stop pairs driven from a cycle
// counter (EOP at every wrap) are checked against the true elapsed time.
module tb_mon_timer;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_pass = 0, n_fail = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask
  localparam evid_t ES = 8'd10, EP = 8'd11;
  logic ev_valid = 0; trace_t ev = '0;
  logic cfg_we = 0, cfg_en = 1; evid_t cfg_start = ES, cfg_stop = EP;
  logic [31:0] cfg_tmin = 32'h32, cfg_tmax = 32'h155, latency;
  logic running, pass, fail, fail_pulse;
  mon_timer dut (.*);

  task automatic send(input evid_t e, input ts_t t);
    ev_valid = 1; ev = '{ev: e, ts: t, cl: '0}; @(negedge clk); ev_valid = 0;
  endtask
  task automatic arm();
    cfg_we = 1; @(negedge clk); cfg_we = 0;
  endtask

  initial begin repeat (400000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    arm();
    // example timeline
    send(ES, 8'hFE);
    chk(running && !fail, "started");
    send(EOP_ID, 8'h00); chk(!fail, "first EOP: no verdict");
    send(EOP_ID, 8'h00); chk(!fail, "second EOP: 0x100 <= 0x155, no verdict");
    send(EOP_ID, 8'h00); chk(fail && fail_pulse, "third EOP: violation");
    // stop within bounds: start 0xFE, stop after 0x100 cycles
    arm();
    send(ES, 8'hFE); send(EOP_ID, 8'h00); send(EP, 8'hFE);
    chk(pass && !fail && latency == 32'h100, $sformatf("latency 0x%0h", latency));
    // below T_min
    arm();
    send(ES, 8'h10); send(EP, 8'h20);
    chk(fail && latency == 32'h10, "below T_min fails");
    // random measurements with a real cycle counter
    for (int r = 0; r < 150; r++) begin
      int t0, dur; int tnow;
      cfg_tmin = 32'($urandom % 300); cfg_tmax = cfg_tmin + 32'($urandom % 600);
      arm();
      t0 = $urandom % 256; dur = $urandom % 1200;
      send(ES, ts_t'(t0));
      for (tnow = t0 + 1; tnow <= t0 + dur; tnow++) begin
        if ((tnow % 256) == 0) send(EOP_ID, 8'h00);
        if (fail) break;
      end
      if (!fail) send(EP, ts_t'(t0 + dur));
      if (dur >= cfg_tmin && dur <= cfg_tmax) begin
        chk(pass && !fail && latency == 32'(dur), $sformatf("pass dur=%0d [%0d,%0d]", dur, cfg_tmin, cfg_tmax));
        n_pass++;
      end else begin
        chk(fail && !pass, $sformatf("fail dur=%0d [%0d,%0d]", dur, cfg_tmin, cfg_tmax));
        n_fail++;
      end
    end
    chk(n_pass > 10 && n_fail > 10, "both verdicts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
