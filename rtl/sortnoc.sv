// sortnoc: SortNoC tracing interconnect on an MX x MY mesh.
//
// Router r = y*MX + x sits at (x, y). Every router sends its forward traffic
// to the target router (TX, TY) along a static XY route (first along x, then
// along y); the broadcast path uses the same links in the opposite
// direction, and links that no route uses are not built. Each router's
// local delay is N_diam + 1 - N_h2t, with N_diam = (MX-1) + (MY-1) and
// N_h2t the hop count to the target. The result is one stream of trace
// elements ordered by timestamp, at most one per cycle for the whole
// system, delivered to the local output of every router.
// The 2x2 default with the target at r3 = (1,1) is the configuration of the
// demonstrated system.
module sortnoc #(
  parameter int unsigned MX        = 2,
  parameter int unsigned MY        = 2,
  parameter int unsigned TX        = 1,
  parameter int unsigned TY        = 1,
  parameter int unsigned LOC_DEPTH = 4,
  parameter int unsigned IN_DEPTH  = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            inj_valid [MX*MY],
  output logic            inj_ready [MX*MY],
  input  mon_pkg::trace_t inj_data  [MX*MY],
  output logic            ej_valid  [MX*MY],
  output mon_pkg::trace_t ej_data   [MX*MY]
);
  import mon_pkg::*;

  localparam int unsigned NR    = MX * MY;
  localparam int unsigned NDIAM = (MX - 1) + (MY - 1);

  // direction of the parent of (x,y): 0=W 1=E 2=N 3=S, 4 = none (target)
  function automatic int parent_dir(int x, int y);
    if (x > int'(TX)) return 0;
    if (x < int'(TX)) return 1;
    if (y > int'(TY)) return 2;
    if (y < int'(TY)) return 3;
    return 4;
  endfunction

  function automatic int nb_x(int x, int d);
    return (d == 0) ? x - 1 : (d == 1) ? x + 1 : x;
  endfunction
  function automatic int nb_y(int y, int d);
    return (d == 2) ? y - 1 : (d == 3) ? y + 1 : y;
  endfunction
  function automatic int opp(int d);
    return (d == 0) ? 1 : (d == 1) ? 0 : (d == 2) ? 3 : 2;
  endfunction

  // neighbour in direction d of (x,y) routes through (x,y)
  function automatic bit is_child(int x, int y, int d);
    int nx, ny;
    nx = nb_x(x, d);
    ny = nb_y(y, d);
    if (nx < 0 || ny < 0 || nx >= int'(MX) || ny >= int'(MY)) return 1'b0;
    return parent_dir(nx, ny) == opp(d);
  endfunction

  function automatic bit [3:0] child_mask(int x, int y);
    bit [3:0] m;
    for (int d = 0; d < 4; d++) m[d] = is_child(x, y, d);
    return m;
  endfunction

  function automatic int hops(int x, int y);
    return ((x > int'(TX)) ? x - int'(TX) : int'(TX) - x) +
           ((y > int'(TY)) ? y - int'(TY) : int'(TY) - y);
  endfunction

  logic   fo_valid [NR];
  logic   fo_ready [NR];
  trace_t fo_data  [NR];
  logic   bo_valid [NR];
  trace_t bo_data  [NR];

  for (genvar y = 0; y < MY; y++) begin : g_y
    for (genvar x = 0; x < MX; x++) begin : g_x
      localparam int R  = y * MX + x;
      localparam int PD = parent_dir(x, y);
      localparam int PR = (PD == 4) ? R : nb_y(y, PD) * MX + nb_x(x, PD);

      logic   [3:0] fi_valid, fi_ready;
      trace_t       fi_data [4];

      for (genvar d = 0; d < 4; d++) begin : g_d
        if (is_child(x, y, d)) begin : g_c
          localparam int CR = nb_y(y, d) * MX + nb_x(x, d);
          assign fi_valid[d] = fo_valid[CR];
          assign fi_data[d]  = fo_data[CR];
        end else begin : g_n
          assign fi_valid[d] = 1'b0;
          assign fi_data[d]  = '0;
        end
      end

      sortnoc_router #(
        .DELAY     (NDIAM + 1 - hops(x, y)),
        .IS_TARGET (PD == 4),
        .CHILD_MASK(child_mask(x, y)),
        .LOC_DEPTH (LOC_DEPTH),
        .IN_DEPTH  (IN_DEPTH)
      ) u_r (
        .clk, .rst_n,
        .loc_in_valid(inj_valid[R]), .loc_in_ready(inj_ready[R]), .loc_in_data(inj_data[R]),
        .fwd_in_valid(fi_valid), .fwd_in_ready(fi_ready), .fwd_in_data(fi_data),
        .fwd_out_valid(fo_valid[R]), .fwd_out_ready(fo_ready[R]), .fwd_out_data(fo_data[R]),
        .bwd_in_valid(bo_valid[PR]), .bwd_in_data(bo_data[PR]),
        .bwd_out_valid(bo_valid[R]), .bwd_out_data(bo_data[R])
      );

      // this router's ready towards each child
      for (genvar d = 0; d < 4; d++) begin : g_rdy
        if (is_child(x, y, d)) begin : g_c
          assign fo_ready[nb_y(y, d) * MX + nb_x(x, d)] = fi_ready[d];
        end
      end

      if (PD == 4) begin : g_tgt
        assign fo_ready[R] = 1'b0;
      end

      assign ej_valid[R] = bo_valid[R];
      assign ej_data[R]  = bo_data[R];
    end
  end
endmodule
