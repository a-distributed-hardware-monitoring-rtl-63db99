// power_detector: issues a trace element when the power sample of its core
// leaves the configured power corridor [pmin, pmax].
//
// One unsigned W_PW-bit sample may arrive per cycle (pw_valid). An element
// (cfg.ev, ts, cfg.cl) is issued for the first sample that lies outside the
// corridor after one that lay inside it (or after enabling), so a long
// excursion yields one event rather than one per sample. Combinational
// output: the element is written into the probe's power FIFO at the end of
// the detection cycle. Samples are ignored while `halt` is high.
module power_detector (
  input  logic                     clk,
  input  logic                     rst_n,
  input  mon_pkg::pwr_cfg_t        cfg,
  input  mon_pkg::ts_t             ts,
  input  logic                     halt,
  input  logic                     pw_valid,
  input  logic [mon_pkg::W_PW-1:0] pw,
  output logic                     ev_valid,
  output mon_pkg::trace_t          ev_data
);
  import mon_pkg::*;

  logic outside, was_outside;

  assign outside  = (pw < cfg.pmin) || (pw > cfg.pmax);
  assign ev_valid = cfg.en && pw_valid && !halt && outside && !was_outside;
  assign ev_data  = '{ev: cfg.ev, ts: ts, cl: cfg.cl};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          was_outside <= 1'b0;
    else if (!cfg.en)                    was_outside <= 1'b0;
    else if (pw_valid && !halt)          was_outside <= outside;
  end
endmodule
