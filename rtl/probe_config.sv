// probe_config: configuration registers of a probe (detection patterns,
// event IDs and cluster IDs of all detectors).
//
// Written one 32-bit word per cycle over the probe configuration bus driven
// by the tile monitor (cfg.we, cfg.addr, cfg.wdata); not readable. Word map:
//   0x000        CTRL     [0] EOP detector enable, [1] power detector enable
//   0x001        PWR_ID   [7:0] event ID, [9:8] cluster ID
//   0x002/0x003  PMIN/PMAX  [15:0] power corridor bounds
//   0x040+k      CP_PC[k]   checkpoint address           (k < N_CP)
//   0x060+k      CP_ID[k]   [7:0] event, [9:8] cluster, [16] enable
//   0x100+8k+0   OOR_PC[k]  watched instruction address  (k < N_OOR)
//   0x100+8k+1   OOR_ID[k]  [7:0] event, [9:8] cluster, [13:12] data type,
//                           [16] enable
//   0x100+8k+2/3 OOR_MIN[k] low/high word of the lower bound
//   0x100+8k+4/5 OOR_MAX[k] low/high word of the upper bound
// The map is this implementation's; the design only states that patterns and
// event IDs live in a configuration unit loaded by the tile monitor. Reset
// clears all enable bits; the other fields are reset to 0 as well.
module probe_config #(
  parameter int unsigned N_CP  = 32,
  parameter int unsigned N_OOR = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  mon_pkg::pcfg_bus_t cfg,
  output logic               eop_en,
  output mon_pkg::pwr_cfg_t  pwr,
  output mon_pkg::cp_cfg_t   cp  [N_CP],
  output mon_pkg::oor_cfg_t  oor [N_OOR]
);
  import mon_pkg::*;

  logic [31:0] d;
  assign d = cfg.wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eop_en <= 1'b0;
      pwr    <= '0;
      for (int k = 0; k < N_CP; k++)  cp[k]  <= '0;
      for (int k = 0; k < N_OOR; k++) oor[k] <= '0;
    end else if (cfg.we) begin
      case (cfg.addr)
        9'h000: begin eop_en <= d[0]; pwr.en <= d[1]; end
        9'h001: begin pwr.ev <= d[7:0]; pwr.cl <= d[9:8]; end
        9'h002: pwr.pmin <= d[W_PW-1:0];
        9'h003: pwr.pmax <= d[W_PW-1:0];
        default: ;
      endcase
      for (int k = 0; k < N_CP; k++) begin
        if (cfg.addr == W_PADDR'(9'h040 + k)) cp[k].pc <= d;
        if (cfg.addr == W_PADDR'(9'h060 + k)) begin
          cp[k].ev <= d[7:0];
          cp[k].cl <= d[9:8];
          cp[k].en <= d[16];
        end
      end
      for (int k = 0; k < N_OOR; k++) begin
        if (cfg.addr[W_PADDR-1:3] == (W_PADDR-3)'(6'h20 + k)) begin
          case (cfg.addr[2:0])
            3'd0: oor[k].pc <= d;
            3'd1: begin
              oor[k].ev    <= d[7:0];
              oor[k].cl    <= d[9:8];
              oor[k].dtype <= dtype_e'(d[13:12]);
              oor[k].en    <= d[16];
            end
            3'd2: oor[k].rmin[31:0]  <= d;
            3'd3: oor[k].rmin[63:32] <= d;
            3'd4: oor[k].rmax[31:0]  <= d;
            3'd5: oor[k].rmax[63:32] <= d;
            default: ;
          endcase
        end
      end
    end
  end
endmodule
