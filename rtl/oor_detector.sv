// oor_detector: set of N_OOR out-of-range comparators on the writeback trace
// of one core.
//
// Comparator k watches the result written back by the instruction at
// address pc[k]. It interprets the 64-bit result as unsigned, signed,
// single-precision (bits [31:0]) or double-precision floating point
// (dtype[k]) and issues (ev[k], ts, cl[k]) in the same cycle when the result
// lies outside [rmin[k], rmax[k]] in that type. Floating-point values are
// compared through an order-preserving map onto unsigned integers (negative
// values bit-inverted, positive values with the sign bit set); a NaN result
// always counts as out of range and -0 orders just below +0. At most one
// writeback per cycle; lowest index wins if several comparators match.
// Inputs are ignored while `halt` is high.
module oor_detector #(
  parameter int unsigned N_OOR = 32
) (
  input  mon_pkg::oor_cfg_t        cfg [N_OOR],
  input  mon_pkg::ts_t             ts,
  input  logic                     halt,
  input  logic                     wb_valid,
  input  logic [mon_pkg::W_PC-1:0] wb_pc,
  input  logic [63:0]              wb_result,
  output logic                     ev_valid,
  output mon_pkg::trace_t          ev_data
);
  import mon_pkg::*;

  // Map a value of the given type to a 65-bit key whose unsigned order is
  // the numeric order of the type.
  function automatic logic [64:0] order_key(logic [63:0] v, dtype_e dt);
    logic [31:0] f;
    case (dt)
      DT_UINT:  return {1'b0, v};
      DT_SINT:  return {1'b0, ~v[63], v[62:0]};
      DT_FLOAT: begin
        f = v[31:0];
        return {33'b0, f[31] ? ~f : {1'b1, f[30:0]}};
      end
      default:  return {1'b0, v[63] ? ~v : {1'b1, v[62:0]}};
    endcase
  endfunction

  function automatic logic is_nan(logic [63:0] v, dtype_e dt);
    case (dt)
      DT_FLOAT:  return (v[30:23] == '1) && (v[22:0] != '0);
      DT_DOUBLE: return (v[62:52] == '1) && (v[51:0] != '0);
      default:   return 1'b0;
    endcase
  endfunction

  always_comb begin
    logic [64:0] kr, kmin, kmax;
    ev_valid = 1'b0;
    ev_data  = '{ev: '0, ts: ts, cl: '0};
    for (int k = N_OOR - 1; k >= 0; k--) begin
      kr   = order_key(wb_result, cfg[k].dtype);
      kmin = order_key(cfg[k].rmin, cfg[k].dtype);
      kmax = order_key(cfg[k].rmax, cfg[k].dtype);
      if (cfg[k].en && cfg[k].pc == wb_pc) begin
        ev_valid   = wb_valid && !halt &&
                     (is_nan(wb_result, cfg[k].dtype) || kr < kmin || kr > kmax);
        ev_data.ev = cfg[k].ev;
        ev_data.cl = cfg[k].cl;
      end
    end
  end
endmodule
