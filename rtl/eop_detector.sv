// eop_detector: issues the end-of-period (EOP) trace element each time the
// timestamp generator wraps around.
//
// When enabled, a wrap of the timestamp counter creates the element
// (EOP_ID, timestamp 0, cluster 0). The element is held in one register
// until the probe arbiter takes it (out_valid/out_ready); EOPs are 2^W_T
// cycles apart, so no FIFO is needed. If the previous EOP has still not been
// taken when the next wrap comes, the new one is lost and `overrun` pulses
// (this cannot happen unless the probe output is blocked for a whole
// period). Only one probe of the system enables its EOP detector.
module eop_detector (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            wrap,
  output logic            out_valid,
  input  logic            out_ready,
  output mon_pkg::trace_t out_data,
  output logic            overrun
);
  import mon_pkg::*;

  assign out_data = '{ev: EOP_ID, ts: '0, cl: '0};
  assign overrun  = en && wrap && out_valid && !out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  out_valid <= 1'b0;
    else if (en && wrap)         out_valid <= 1'b1;
    else if (out_ready)          out_valid <= 1'b0;
  end
endmodule
