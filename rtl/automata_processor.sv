// automata_processor: checks one logical requirement, given as a finite
// deterministic automaton, against the filtered event trace.
//
// The transition function is a table of 2^(W_V+W_IE) next-state entries of
// W_V bits (16 Kbit with the default widths, one 18 Kbit block RAM),
// addressed by {current state, event ID}. On every event the table is read
// at {state, event} and the read word becomes the new state in the same
// clock edge, so the state register doubles as the RAM output register and
// one event per cycle is processed with no stall. The end-of-period marker
// is not an automaton event and is ignored.
//
// Verdict (three-valued): pass while the state is the acceptance state v_t,
// fail while it is the failure state v_f, undecided otherwise. v_t and v_f
// are absorbing here (no further transitions are taken once reached), so a
// verdict stays until software restarts the automaton; fail_pulse marks the
// cycle the failure state is entered and raises the tile's interrupt.
//
// Software writes the table one entry at a time (tbl_we, tbl_addr,
// tbl_data) and loads {enable, v0, v_t, v_f} with ctrl_we, which also puts
// the automaton into v0. Table entries for (state, event) pairs that can
// never occur need not be written; events the requirement does not accept
// are expected to be programmed as self-loops.
module automata_processor (
  input  logic                          clk,
  input  logic                          rst_n,
  // event trace (already filtered by cluster)
  input  logic                          ev_valid,
  input  mon_pkg::evid_t                ev,
  // configuration
  input  logic                          tbl_we,
  input  logic [mon_pkg::W_V+mon_pkg::W_IE-1:0] tbl_addr,
  input  mon_pkg::state_t               tbl_data,
  input  logic                          ctrl_we,
  input  logic                          ctrl_en,
  input  mon_pkg::state_t               ctrl_v0,
  input  mon_pkg::state_t               ctrl_vt,
  input  mon_pkg::state_t               ctrl_vf,
  // status
  output mon_pkg::state_t               state,
  output logic                          pass,
  output logic                          fail,
  output logic                          fail_pulse
);
  import mon_pkg::*;

  state_t tbl [2**(W_V+W_IE)];
  logic   en;
  state_t vt, vf;
  logic   step;

  assign pass = en && (state == vt);
  assign fail = en && (state == vf);
  assign step = en && ev_valid && (ev != EOP_ID) && !pass && !fail;

  always_ff @(posedge clk) begin
    if (tbl_we) tbl[tbl_addr] <= tbl_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en         <= 1'b0;
      vt         <= '0;
      vf         <= '0;
      state      <= '0;
      fail_pulse <= 1'b0;
    end else begin
      fail_pulse <= 1'b0;
      if (ctrl_we) begin
        en    <= ctrl_en;
        vt    <= ctrl_vt;
        vf    <= ctrl_vf;
        state <= ctrl_v0;
      end else if (step) begin
        state      <= tbl[{state, ev}];
        fail_pulse <= (tbl[{state, ev}] == vf);
      end
    end
  end
endmodule
