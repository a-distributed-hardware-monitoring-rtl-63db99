// network_adapter: joins a tile monitor to its SortNoC router.
//
// Injection side: a one-entry register stage between the tile monitor's
// arbiter and the router's local input (valid/ready; it accepts a new
// element when empty or when the router takes the current one).
// Ejection side: the globally sorted trace broadcast by the router is
// filtered; an element is passed to the automata processors and timers
// (registered, one cycle) when its cluster ID equals the tile monitor's
// cluster ID, or when it is an end-of-period marker, which no monitor may
// filter out.
module network_adapter (
  input  logic            clk,
  input  logic            rst_n,
  input  mon_pkg::clid_t  cluster_id,
  // from the tile monitor arbiter
  input  logic            inj_valid,
  output logic            inj_ready,
  input  mon_pkg::trace_t inj_data,
  // to the router local input
  output logic            noc_valid,
  input  logic            noc_ready,
  output mon_pkg::trace_t noc_data,
  // from the router local output (broadcast, no back-pressure)
  input  logic            bc_valid,
  input  mon_pkg::trace_t bc_data,
  // to the monitors
  output logic            mon_valid,
  output mon_pkg::trace_t mon_data
);
  import mon_pkg::*;

  assign inj_ready = !noc_valid || noc_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      noc_valid <= 1'b0;
      noc_data  <= '0;
      mon_valid <= 1'b0;
      mon_data  <= '0;
    end else begin
      if (inj_ready) begin
        noc_valid <= inj_valid;
        noc_data  <= inj_data;
      end
      mon_valid <= bc_valid && (bc_data.cl == cluster_id || is_eop(bc_data));
      mon_data  <= bc_data;
    end
  end
endmodule
