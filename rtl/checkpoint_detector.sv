// checkpoint_detector: set of N_CP program-counter comparators on the
// instruction trace of one core.
//
// Each enabled comparator k holds a checkpoint address; when a retired
// instruction (instr_valid) has that PC, the element (ev[k], ts, cl[k]) is
// issued in the same cycle. A core retires at most one instruction per
// cycle, so at most one element per cycle; if several comparators hold the
// same address the lowest index wins. Inputs are ignored while `halt` is
// high (the core is stalled and re-presents the instruction).
module checkpoint_detector #(
  parameter int unsigned N_CP = 32
) (
  input  mon_pkg::cp_cfg_t         cfg [N_CP],
  input  mon_pkg::ts_t             ts,
  input  logic                     halt,
  input  logic                     instr_valid,
  input  logic [mon_pkg::W_PC-1:0] instr_pc,
  output logic                     ev_valid,
  output mon_pkg::trace_t          ev_data
);
  import mon_pkg::*;

  always_comb begin
    ev_valid = 1'b0;
    ev_data  = '{ev: '0, ts: ts, cl: '0};
    for (int k = N_CP - 1; k >= 0; k--) begin
      if (cfg[k].en && cfg[k].pc == instr_pc) begin
        ev_valid   = instr_valid && !halt;
        ev_data.ev = cfg[k].ev;
        ev_data.cl = cfg[k].cl;
      end
    end
  end
endmodule
