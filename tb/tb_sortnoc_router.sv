// tb_sortnoc_router: a target router with two children (west, north) and a
// local delay of 3, as r3 of the 2x2 network. An element on the local port
// is injected 2 cycles before child elements of the same age would arrive
// (child path = one hop later), so same-age elements meet at the crossbar.
// Checks: local latency 1 + DELAY to the crossbar and +1 to the broadcast
// register; broadcast output in timestamp order; forward output unused.
// A second, non-target router (delay 1, no children) checks the forward
// output and its back-pressure.
module tb_sortnoc_router;
  import mon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask
  logic loc_in_valid = 0, loc_in_ready, fwd_out_valid, bwd_out_valid;
  trace_t loc_in_data = '0, fwd_out_data, bwd_out_data;
  logic [3:0] fwd_in_valid = '0, fwd_in_ready;
  trace_t fwd_in_data [4];
  sortnoc_router #(.DELAY(3), .IS_TARGET(1), .CHILD_MASK(4'b0101)) dut (
    .clk, .rst_n, .loc_in_valid, .loc_in_ready, .loc_in_data,
    .fwd_in_valid, .fwd_in_ready, .fwd_in_data,
    .fwd_out_valid, .fwd_out_ready(1'b0), .fwd_out_data,
    .bwd_in_valid(1'b0), .bwd_in_data('0), .bwd_out_valid, .bwd_out_data);

  logic l2_valid = 0, l2_ready, f2_valid, f2_ready = 0, b2_valid; trace_t l2_data = '0, f2_data, b2_data;
  logic [3:0] f2_in_ready;
  trace_t none [4];
  sortnoc_router #(.DELAY(1), .IS_TARGET(0), .CHILD_MASK(4'b0000)) dut2 (
    .clk, .rst_n, .loc_in_valid(l2_valid), .loc_in_ready(l2_ready), .loc_in_data(l2_data),
    .fwd_in_valid(4'b0), .fwd_in_ready(f2_in_ready), .fwd_in_data(none),
    .fwd_out_valid(f2_valid), .fwd_out_ready(f2_ready), .fwd_out_data(f2_data),
    .bwd_in_valid(1'b1), .bwd_in_data(trace_t'(18'h3ABCD)), .bwd_out_valid(b2_valid), .bwd_out_data(b2_data));

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  trace_t out [$]; int out_t [$];
  always @(posedge clk) if (bwd_out_valid) begin out.push_back(bwd_out_data); out_t.push_back(cyc); end

  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int t0;
    foreach (fwd_in_data[i]) fwd_in_data[i] = '0;
    foreach (none[i]) none[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // local element alone
    loc_in_valid = 1; loc_in_data = '{ev: 8'h01, ts: 8'h10, cl: 0}; t0 = cyc;
    @(negedge clk) loc_in_valid = 0;
    repeat (10) @(negedge clk);
    chk(out.size() == 1 && out_t[0] - t0 == 1 + 3 + 1, $sformatf("local latency %0d", out_t[0] - t0));
    chk(!fwd_out_valid, "target has no forward output");
    // three same-cycle-age pairs: local ts 0x20 / west child ts 0x21 / north child 0x1F
    out.delete(); out_t.delete();
    loc_in_valid = 1; loc_in_data = '{ev: 8'h02, ts: 8'h20, cl: 0};
    @(negedge clk) loc_in_valid = 0;
    @(negedge clk);
    fwd_in_valid = 4'b0101;
    fwd_in_data[0] = '{ev: 8'h03, ts: 8'h21, cl: 1};
    fwd_in_data[2] = '{ev: 8'h04, ts: 8'h1F, cl: 2};
    @(negedge clk) fwd_in_valid = 0;
    repeat (10) @(negedge clk);
    chk(out.size() == 3, "three out");
    if (out.size() == 3) chk(out[0].ev == 8'h04 && out[1].ev == 8'h02 && out[2].ev == 8'h03, "sorted by timestamp");
    chk(b2_valid && b2_data == trace_t'(18'h3ABCD), "non-target forwards broadcast");
    // non-target: forward path with back-pressure
    l2_valid = 1; l2_data = '{ev: 8'h05, ts: 8'h30, cl: 0};
    @(negedge clk) l2_valid = 0;
    repeat (4) @(negedge clk);
    chk(f2_valid && f2_data.ev == 8'h05, "held at forward output while parent full");
    f2_ready = 1; #1 chk(f2_valid, "valid with ready");
    @(negedge clk) chk(!f2_valid, "taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
