// probe: turns the trace of one core into a stream of timestamped trace
// elements for the tile monitor.
//
// Inside: a timestamp generator, an end-of-period (EOP) detector (present
// when HAS_EOP; only one probe in the system needs it), a power-corridor
// detector, N_CP checkpoint comparators, N_OOR out-of-range comparators, and
// the configuration registers written by the tile monitor. The power,
// checkpoint and out-of-range detectors each write into their own
// FIFO_DEPTH-entry FIFO; the EOP element waits in a single register. A
// timestamp arbiter merges the three FIFO heads and the EOP register, oldest
// first, into an output FIFO that the tile monitor reads.
//
// halt is high while any detector FIFO is full: the core must then stall and
// hold its trace inputs, and the probe ignores them, so no trace element is
// ever lost. halt depends only on registered FIFO occupancy.
//
// Timing: an event seen in cycle 0 is in its detector FIFO in cycle 1 and,
// without contention, at the head of the output FIFO in cycle 2. The
// 4-entry FIFOs follow the drawing of the probe; the depth is a parameter.
module probe #(
  parameter int unsigned N_CP       = 32,
  parameter int unsigned N_OOR      = 32,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter bit          HAS_EOP    = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // timestamp synchronisation
  input  logic                     ts_sync_load,
  input  mon_pkg::ts_t             ts_sync_value,
  output mon_pkg::ts_t             ts,
  // core traces
  input  logic                     pw_valid,
  input  logic [mon_pkg::W_PW-1:0] pw,
  input  logic                     instr_valid,
  input  logic [mon_pkg::W_PC-1:0] instr_pc,
  input  logic                     wb_valid,
  input  logic [mon_pkg::W_PC-1:0] wb_pc,
  input  logic [63:0]              wb_result,
  output logic                     halt,
  // configuration from the tile monitor
  input  mon_pkg::pcfg_bus_t       cfg,
  // probe-local event trace to the tile monitor
  output logic                     out_valid,
  input  logic                     out_ready,
  output mon_pkg::trace_t          out_data
);
  import mon_pkg::*;

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic      wrap, eop_en;
  pwr_cfg_t  pwr_cfg;
  cp_cfg_t   cp_cfg  [N_CP];
  oor_cfg_t  oor_cfg [N_OOR];

  timestamp_gen u_ts (
    .clk, .rst_n, .sync_load(ts_sync_load), .sync_value(ts_sync_value),
    .ts, .wrap
  );

  probe_config #(.N_CP(N_CP), .N_OOR(N_OOR)) u_cfg (
    .clk, .rst_n, .cfg, .eop_en, .pwr(pwr_cfg), .cp(cp_cfg), .oor(oor_cfg)
  );

  // arbiter inputs: 0 = EOP, 1 = power, 2 = checkpoint, 3 = out of range
  logic   [3:0] a_valid, a_ready;
  trace_t       a_data [4];
  logic   [2:0] det_valid, det_full;
  trace_t       det_data [3];

  if (HAS_EOP) begin : g_eop
    logic eop_overrun;
    eop_detector u_eop (
      .clk, .rst_n, .en(eop_en), .wrap,
      .out_valid(a_valid[0]), .out_ready(a_ready[0]), .out_data(a_data[0]),
      .overrun(eop_overrun)
    );
`ifndef SYNTHESIS
    a_eop_taken: assert property (@(posedge clk) disable iff (!rst_n) !eop_overrun);
`endif
  end else begin : g_no_eop
    assign a_valid[0] = 1'b0;
    assign a_data[0]  = '0;
  end

  power_detector u_pwr (
    .clk, .rst_n, .cfg(pwr_cfg), .ts, .halt, .pw_valid, .pw,
    .ev_valid(det_valid[0]), .ev_data(det_data[0])
  );

  checkpoint_detector #(.N_CP(N_CP)) u_cp (
    .cfg(cp_cfg), .ts, .halt, .instr_valid, .instr_pc,
    .ev_valid(det_valid[1]), .ev_data(det_data[1])
  );

  oor_detector #(.N_OOR(N_OOR)) u_oor (
    .cfg(oor_cfg), .ts, .halt, .wb_valid, .wb_pc, .wb_result,
    .ev_valid(det_valid[2]), .ev_data(det_data[2])
  );

  for (genvar i = 0; i < 3; i++) begin : g_buf
    logic          in_ready_unused;
    logic [CW-1:0] count_unused;
    sync_fifo #(.T(trace_t), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid(det_valid[i]), .in_ready(in_ready_unused), .in_data(det_data[i]),
      .out_valid(a_valid[i+1]), .out_ready(a_ready[i+1]), .out_data(a_data[i+1]),
      .full(det_full[i]), .count(count_unused)
    );
  end

  assign halt = |det_full;

  logic   m_valid, m_ready, o_full_unused;
  trace_t m_data;
  logic [1:0]    m_sel_unused;
  logic [CW-1:0] o_count_unused;

  ts_arbiter #(.N(4)) u_arb (
    .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .out_valid(m_valid), .out_ready(m_ready), .out_data(m_data), .out_sel(m_sel_unused)
  );

  sync_fifo #(.T(trace_t), .DEPTH(FIFO_DEPTH)) u_out (
    .clk, .rst_n,
    .in_valid(m_valid), .in_ready(m_ready), .in_data(m_data),
    .out_valid, .out_ready, .out_data,
    .full(o_full_unused), .count(o_count_unused)
  );
endmodule
