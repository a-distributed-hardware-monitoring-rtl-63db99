// sortnoc_router: one router of the SortNoC tracing interconnect.
//
// Forward path (towards the target router): the local input goes through a
// LOC_DEPTH-entry FIFO and a delay line of DELAY cycles; every neighbour that
// routes through this router (CHILD_MASK, ports 0=west 1=east 2=north
// 3=south) has an IN_DEPTH-entry input FIFO. The crossbar is a timestamp
// arbiter: among the heads present it forwards the oldest, one per cycle,
// either into the parent's input FIFO (port PARENT_DIR; when there is room)
// or, in the target router (IS_TARGET), into the broadcast path.
// DELAY = diameter + 1 - hops to target makes elements injected together
// reach every crossbar together, so the cascade of crossbars merges the
// tile traces into one trace sorted by timestamp.
//
// Backward path: a single register per router. The target loads it from its
// crossbar; every other router loads it from its parent's register. The
// register drives the local output and the children; there is never
// contention, so there is no back-pressure on this path.
//
// Latency without contention: 1 cycle in the local FIFO, DELAY cycles, 1 per
// hop on the forward path, then 1 per hop on the backward path.
module sortnoc_router #(
  parameter int unsigned DELAY      = 1,
  parameter bit          IS_TARGET  = 1'b0,
  parameter bit [3:0]    CHILD_MASK = 4'b0000,
  parameter int unsigned LOC_DEPTH  = 4,
  parameter int unsigned IN_DEPTH   = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // local injection
  input  logic            loc_in_valid,
  output logic            loc_in_ready,
  input  mon_pkg::trace_t loc_in_data,
  // forward inputs from the four neighbours
  input  logic [3:0]      fwd_in_valid,
  output logic [3:0]      fwd_in_ready,
  input  mon_pkg::trace_t fwd_in_data [4],
  // forward output to the parent's input FIFO
  output logic            fwd_out_valid,
  input  logic            fwd_out_ready,
  output mon_pkg::trace_t fwd_out_data,
  // backward (broadcast) path
  input  logic            bwd_in_valid,
  input  mon_pkg::trace_t bwd_in_data,
  output logic            bwd_out_valid,
  output mon_pkg::trace_t bwd_out_data
);
  import mon_pkg::*;

  // crossbar inputs: 0 = local (after delay), 1..4 = neighbour ports 0..3
  logic   [4:0] x_valid, x_ready;
  trace_t       x_data [5];

  logic   lf_valid, lf_ready, lf_full_unused;
  trace_t lf_data;
  logic [$clog2(LOC_DEPTH+1)-1:0] lf_count_unused;

  sync_fifo #(.T(trace_t), .DEPTH(LOC_DEPTH)) u_loc_fifo (
    .clk, .rst_n,
    .in_valid(loc_in_valid), .in_ready(loc_in_ready), .in_data(loc_in_data),
    .out_valid(lf_valid), .out_ready(lf_ready), .out_data(lf_data),
    .full(lf_full_unused), .count(lf_count_unused)
  );

  delay_stage #(.DEPTH(DELAY)) u_delay (
    .clk, .rst_n,
    .in_valid(lf_valid), .in_ready(lf_ready), .in_data(lf_data),
    .out_valid(x_valid[0]), .out_ready(x_ready[0]), .out_data(x_data[0])
  );

  for (genvar p = 0; p < 4; p++) begin : g_port
    if (CHILD_MASK[p]) begin : g_in
      logic full_unused;
      logic [$clog2(IN_DEPTH+1)-1:0] count_unused;
      sync_fifo #(.T(trace_t), .DEPTH(IN_DEPTH)) u_in_fifo (
        .clk, .rst_n,
        .in_valid(fwd_in_valid[p]), .in_ready(fwd_in_ready[p]), .in_data(fwd_in_data[p]),
        .out_valid(x_valid[p+1]), .out_ready(x_ready[p+1]), .out_data(x_data[p+1]),
        .full(full_unused), .count(count_unused)
      );
    end else begin : g_none
      assign fwd_in_ready[p] = 1'b0;
      assign x_valid[p+1]    = 1'b0;
      assign x_data[p+1]     = '0;
    end
  end

  logic   c_valid, c_ready;
  trace_t c_data;
  logic [2:0] c_sel_unused;

  ts_arbiter #(.N(5)) u_xbar (
    .in_valid(x_valid), .in_ready(x_ready), .in_data(x_data),
    .out_valid(c_valid), .out_ready(c_ready), .out_data(c_data), .out_sel(c_sel_unused)
  );

  if (IS_TARGET) begin : g_target
    assign c_ready       = 1'b1;
    assign fwd_out_valid = 1'b0;
    assign fwd_out_data  = '0;
  end else begin : g_fwd
    assign c_ready       = fwd_out_ready;
    assign fwd_out_valid = c_valid;
    assign fwd_out_data  = c_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bwd_out_valid <= 1'b0;
      bwd_out_data  <= '0;
    end else if (IS_TARGET) begin
      bwd_out_valid <= c_valid;
      bwd_out_data  <= c_data;
    end else begin
      bwd_out_valid <= bwd_in_valid;
      bwd_out_data  <= bwd_in_data;
    end
  end
endmodule
