// mpsoc_monitor_top: the complete runtime-verification monitoring system of
// a tiled MPSoC with MX x MY tiles and N_P cores per tile (2 x 2 tiles of 5
// cores by default, the configuration of the demonstrated system).
//
// Every core has a probe that watches its power, instruction and writeback
// traces; the probes of a tile feed the tile monitor, which injects the
// tile-local trace into the SortNoC. SortNoC merges all tile traces into a
// single trace ordered by timestamp and broadcasts it back to every tile
// monitor, whose automata processors and timers check the requirements of
// their cluster and raise the tile's interrupt on a violation. Only probe 0
// of tile 0 contains the end-of-period detector.
//
// The cores, the system bus and the operating system are outside this
// module: per core the trace inputs and the pipeline-halt output are ports,
// per tile the APB slave of the tile monitor and its interrupt are ports.
// All timestamp generators leave reset together (synchronised by reset);
// ts_sync_load/ts_sync_value reload all of them at once.
// Tile t = y*MX + x; core c of tile t is index [t][c] of the trace arrays.
module mpsoc_monitor_top #(
  parameter int unsigned MX    = 2,
  parameter int unsigned MY    = 2,
  parameter int unsigned N_P   = 5,
  parameter int unsigned N_CP  = 32,
  parameter int unsigned N_OOR = 32,
  parameter int unsigned N_AP  = 32,
  parameter int unsigned N_TMR = 32,
  localparam int unsigned NT   = MX * MY
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ts_sync_load,
  input  mon_pkg::ts_t             ts_sync_value,
  // core traces
  input  logic                     pw_valid    [NT][N_P],
  input  logic [mon_pkg::W_PW-1:0] pw          [NT][N_P],
  input  logic                     instr_valid [NT][N_P],
  input  logic [mon_pkg::W_PC-1:0] instr_pc    [NT][N_P],
  input  logic                     wb_valid    [NT][N_P],
  input  logic [mon_pkg::W_PC-1:0] wb_pc       [NT][N_P],
  input  logic [63:0]              wb_result   [NT][N_P],
  output logic                     halt        [NT][N_P],
  // APB slave of each tile monitor
  input  logic                     psel    [NT],
  input  logic                     penable [NT],
  input  logic                     pwrite  [NT],
  input  logic [11:0]              paddr   [NT],
  input  logic [31:0]              pwdata  [NT],
  output logic [31:0]              prdata  [NT],
  output logic                     pready  [NT],
  output logic                     pslverr [NT],
  // interrupts
  output logic                     irq       [NT],
  output logic                     violation [NT]
);
  import mon_pkg::*;

  logic   inj_valid [NT];
  logic   inj_ready [NT];
  trace_t inj_data  [NT];
  logic   ej_valid  [NT];
  trace_t ej_data   [NT];

  for (genvar t = 0; t < NT; t++) begin : g_tile
    logic [N_P-1:0] pr_valid, pr_ready, pcfg_we;
    trace_t         pr_data [N_P];
    pcfg_bus_t      pcfg;

    for (genvar c = 0; c < N_P; c++) begin : g_core
      pcfg_bus_t pcfg_c;
      ts_t       ts_unused;
      assign pcfg_c = '{we: pcfg_we[c], addr: pcfg.addr, wdata: pcfg.wdata};

      probe #(.N_CP(N_CP), .N_OOR(N_OOR), .HAS_EOP(t == 0 && c == 0)) u_probe (
        .clk, .rst_n,
        .ts_sync_load, .ts_sync_value, .ts(ts_unused),
        .pw_valid(pw_valid[t][c]), .pw(pw[t][c]),
        .instr_valid(instr_valid[t][c]), .instr_pc(instr_pc[t][c]),
        .wb_valid(wb_valid[t][c]), .wb_pc(wb_pc[t][c]), .wb_result(wb_result[t][c]),
        .halt(halt[t][c]),
        .cfg(pcfg_c),
        .out_valid(pr_valid[c]), .out_ready(pr_ready[c]), .out_data(pr_data[c])
      );
    end

    tile_monitor #(.N_P(N_P), .N_AP(N_AP), .N_TMR(N_TMR)) u_tm (
      .clk, .rst_n,
      .psel(psel[t]), .penable(penable[t]), .pwrite(pwrite[t]), .paddr(paddr[t]),
      .pwdata(pwdata[t]), .prdata(prdata[t]), .pready(pready[t]), .pslverr(pslverr[t]),
      .pr_valid, .pr_ready, .pr_data, .pcfg, .pcfg_we,
      .noc_valid(inj_valid[t]), .noc_ready(inj_ready[t]), .noc_data(inj_data[t]),
      .bc_valid(ej_valid[t]), .bc_data(ej_data[t]),
      .irq(irq[t]), .violation(violation[t])
    );
  end

  sortnoc #(.MX(MX), .MY(MY), .TX(MX / 2), .TY(MY / 2)) u_noc (
    .clk, .rst_n,
    .inj_valid, .inj_ready, .inj_data,
    .ej_valid, .ej_data
  );
endmodule
