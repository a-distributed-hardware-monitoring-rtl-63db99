// tb_power_detector: random power samples against a corridor; an event must
// be issued exactly for the first outside sample after an inside one, with
// the configured IDs and the current timestamp, and never while halted or
// disabled.
module tb_power_detector;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, events = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask
  pwr_cfg_t cfg; ts_t ts = '0; logic halt = 0, pw_valid = 0; logic [15:0] pw = '0;
  logic ev_valid; trace_t ev_data;
  power_detector dut (.*);
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    bit prev_out, out, expv;
    cfg = '{en: 1'b0, pmin: 16'd1000, pmax: 16'd2000, ev: 8'h2A, cl: 2'd3};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    pw_valid = 1; pw = 16'd5;
    #1 chk(!ev_valid, "disabled");
    @(negedge clk) cfg.en = 1;
    prev_out = 0;
    for (int i = 0; i < 3000; i++) begin
      ts = ts_t'(i);
      pw_valid = ($urandom % 4) != 0;
      halt = ($urandom % 10) == 0;
      pw = ($urandom % 2) ? 16'(1000 + $urandom % 1001) : 16'($urandom % 3000);
      if (i % 97 == 0) pw = 16'd999;
      if (i % 89 == 0) pw = 16'd2001;
      if (i % 83 == 0) pw = 16'd1000;
      #1;
      out = (pw < 1000) || (pw > 2000);
      expv = pw_valid && !halt && out && !prev_out;
      chk(ev_valid == expv, $sformatf("event at sample %0d pw=%0d", i, pw));
      if (ev_valid) begin
        events++;
        chk(ev_data == '{ev: 8'h2A, ts: ts_t'(i), cl: 2'd3}, "event fields");
      end
      if (pw_valid && !halt) prev_out = out;
      @(negedge clk);
    end
    chk(events > 50, "events were issued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
