// tile_monitor: monitoring unit of one compute tile.
//
// Merges the event traces of the tile's N_P probes, oldest first, into one
// tile-local trace and hands it through the network adapter to the SortNoC
// router. From the router it receives the globally sorted trace of the whole
// system, keeps the elements of its own cluster (plus end-of-period
// markers), and feeds them to N_AP automata processors and N_TMR timers in
// parallel. Any failed requirement raises irq (level) until software
// restarts that monitor; violation pulses in the cycle after a failure is
// detected. A probe configuration memory with a request FIFO loads the
// probes. Everything is programmed over an APB slave port.
//
// APB register map (byte addresses, 32-bit registers; PREADY is high except
// while a CFG_REQ write waits for room in the request FIFO; PSLVERR is 0):
//   0x000 CTRL         [1:0] cluster ID of this tile monitor
//   0x004 STATUS    RO [0] irq, [1] probe configuration loader busy
//   0x008 AP_FAIL   RO fail verdict of AP k in bit k
//   0x00C TMR_FAIL  RO fail verdict of timer k in bit k
//   0x010 AP_PASS   RO pass verdict of AP k
//   0x014 TMR_PASS  RO pass verdict of timer k
//   0x020 CFG_ADDR     next configuration-memory word to write
//   0x024 CFG_DATA  WO write word at CFG_ADDR, then CFG_ADDR += 1
//   0x028 CFG_REQ   WO push a probe load request (format in probe_cfg_loader)
//   0x040 AP_SEL       AP addressed by the next four registers
//   0x044 AP_ADDR      transition-table entry {state, event}
//   0x048 AP_DATA   WO write next state at AP_ADDR, then AP_ADDR += 1
//   0x04C AP_CTRL   WO [3:0] v0, [7:4] v_t, [11:8] v_f, [16] enable;
//                      (re)starts the AP in v0
//   0x050 AP_STATE  RO current state of the selected AP
//   0x060 TMR_SEL      timer addressed by the next registers
//   0x064 TMR_EVT      [7:0] start event, [15:8] stop event
//   0x068 TMR_MIN      T_min in cycles
//   0x06C TMR_MAX      T_max in cycles
//   0x070 TMR_CTRL  WO [0] enable; loads TMR_EVT/MIN/MAX into the selected
//                      timer and re-arms it
//   0x074 TMR_LAT   RO last latency measured by the selected timer
// The register map is this implementation's own; the design fixes only that
// configuration and requests go over APB.
module tile_monitor #(
  parameter int unsigned N_P       = 5,
  parameter int unsigned N_AP      = 32,
  parameter int unsigned N_TMR     = 32,
  parameter int unsigned MEM_WORDS = 1024
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // APB slave
  input  logic                  psel,
  input  logic                  penable,
  input  logic                  pwrite,
  input  logic [11:0]           paddr,
  input  logic [31:0]           pwdata,
  output logic [31:0]           prdata,
  output logic                  pready,
  output logic                  pslverr,
  // probes
  input  logic [N_P-1:0]        pr_valid,
  output logic [N_P-1:0]        pr_ready,
  input  mon_pkg::trace_t       pr_data [N_P],
  output mon_pkg::pcfg_bus_t    pcfg,
  output logic [N_P-1:0]        pcfg_we,
  // SortNoC local port
  output logic                  noc_valid,
  input  logic                  noc_ready,
  output mon_pkg::trace_t       noc_data,
  input  logic                  bc_valid,
  input  mon_pkg::trace_t       bc_data,
  // interrupt
  output logic                  irq,
  output logic                  violation
);
  import mon_pkg::*;

  localparam int unsigned MAW = $clog2(MEM_WORDS);
  localparam int unsigned TAW = W_V + W_IE;

  // ---------------- APB registers ----------------
  logic            wr, rd_unused;
  clid_t           cluster_id;
  logic [MAW-1:0]  cfg_addr;
  logic [7:0]      ap_sel, tmr_sel;
  logic [TAW-1:0]  ap_addr;
  logic [15:0]     tmr_evt;
  logic [W_TM-1:0] tmr_min, tmr_max;
  logic            loader_busy, req_ready;

  assign wr        = psel && penable && pwrite;
  assign rd_unused = psel && penable && !pwrite;
  assign pslverr   = 1'b0;
  assign pready    = !(pwrite && paddr == 12'h028 && !req_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cluster_id <= '0; cfg_addr <= '0; ap_sel <= '0; tmr_sel <= '0;
      ap_addr <= '0; tmr_evt <= '0; tmr_min <= '0; tmr_max <= '0;
    end else if (wr && pready) begin
      case (paddr)
        12'h000: cluster_id <= pwdata[W_C-1:0];
        12'h020: cfg_addr   <= pwdata[MAW-1:0];
        12'h024: cfg_addr   <= cfg_addr + 1'b1;
        12'h040: ap_sel     <= pwdata[7:0];
        12'h044: ap_addr    <= pwdata[TAW-1:0];
        12'h048: ap_addr    <= ap_addr + 1'b1;
        12'h060: tmr_sel    <= pwdata[7:0];
        12'h064: tmr_evt    <= pwdata[15:0];
        12'h068: tmr_min    <= pwdata;
        12'h06C: tmr_max    <= pwdata;
        default: ;
      endcase
    end
  end

  // ---------------- probe configuration ----------------
  probe_cfg_loader #(.N_P(N_P), .MEM_WORDS(MEM_WORDS)) u_loader (
    .clk, .rst_n,
    .mem_we(wr && paddr == 12'h024), .mem_addr(cfg_addr), .mem_wdata(pwdata),
    .req_valid(wr && paddr == 12'h028), .req_ready, .req(pwdata),
    .pcfg, .pcfg_we, .busy(loader_busy)
  );

  // ---------------- trace path ----------------
  logic   a_valid, a_ready;
  trace_t a_data;
  logic [(N_P>1 ? $clog2(N_P) : 1)-1:0] a_sel_unused;

  ts_arbiter #(.N(N_P)) u_arb (
    .in_valid(pr_valid), .in_ready(pr_ready), .in_data(pr_data),
    .out_valid(a_valid), .out_ready(a_ready), .out_data(a_data), .out_sel(a_sel_unused)
  );

  logic   m_valid;
  trace_t m_data;

  network_adapter u_na (
    .clk, .rst_n, .cluster_id,
    .inj_valid(a_valid), .inj_ready(a_ready), .inj_data(a_data),
    .noc_valid, .noc_ready, .noc_data,
    .bc_valid, .bc_data,
    .mon_valid(m_valid), .mon_data(m_data)
  );

  // ---------------- monitors ----------------
  logic [N_AP-1:0]  ap_pass, ap_fail, ap_fpulse;
  logic [N_TMR-1:0] t_pass, t_fail, t_fpulse, t_run_unused;
  state_t           ap_state [N_AP];
  logic [W_TM-1:0]  t_lat [N_TMR];

  for (genvar a = 0; a < N_AP; a++) begin : g_ap
    automata_processor u_ap (
      .clk, .rst_n,
      .ev_valid(m_valid), .ev(m_data.ev),
      .tbl_we(wr && paddr == 12'h048 && ap_sel == 8'(a)),
      .tbl_addr(ap_addr), .tbl_data(pwdata[W_V-1:0]),
      .ctrl_we(wr && paddr == 12'h04C && ap_sel == 8'(a)),
      .ctrl_en(pwdata[16]), .ctrl_v0(pwdata[3:0]), .ctrl_vt(pwdata[7:4]),
      .ctrl_vf(pwdata[11:8]),
      .state(ap_state[a]), .pass(ap_pass[a]), .fail(ap_fail[a]),
      .fail_pulse(ap_fpulse[a])
    );
  end

  for (genvar t = 0; t < N_TMR; t++) begin : g_tmr
    mon_timer u_tmr (
      .clk, .rst_n,
      .ev_valid(m_valid), .ev(m_data),
      .cfg_we(wr && paddr == 12'h070 && tmr_sel == 8'(t)),
      .cfg_en(pwdata[0]), .cfg_start(tmr_evt[7:0]), .cfg_stop(tmr_evt[15:8]),
      .cfg_tmin(tmr_min), .cfg_tmax(tmr_max),
      .running(t_run_unused[t]), .latency(t_lat[t]),
      .pass(t_pass[t]), .fail(t_fail[t]), .fail_pulse(t_fpulse[t])
    );
  end

  assign irq       = |ap_fail || |t_fail;
  assign violation = |ap_fpulse || |t_fpulse;

  // ---------------- APB read ----------------
  always_comb begin
    prdata = '0;
    case (paddr)
      12'h000: prdata = 32'(cluster_id);
      12'h004: prdata = {30'b0, loader_busy, irq};
      12'h008: prdata = 32'(ap_fail);
      12'h00C: prdata = 32'(t_fail);
      12'h010: prdata = 32'(ap_pass);
      12'h014: prdata = 32'(t_pass);
      12'h020: prdata = 32'(cfg_addr);
      12'h040: prdata = 32'(ap_sel);
      12'h044: prdata = 32'(ap_addr);
      12'h050: prdata = (ap_sel < 8'(N_AP)) ? 32'(ap_state[ap_sel[$clog2(N_AP)-1:0]]) : '0;
      12'h060: prdata = 32'(tmr_sel);
      12'h064: prdata = 32'(tmr_evt);
      12'h068: prdata = tmr_min;
      12'h06C: prdata = tmr_max;
      12'h074: prdata = (tmr_sel < 8'(N_TMR)) ? t_lat[tmr_sel[$clog2(N_TMR)-1:0]] : '0;
      default: prdata = '0;
    endcase
  end

`ifndef SYNTHESIS
  // APB: PENABLE only in the access phase of a selected transfer
  a_apb_penable: assert property (@(posedge clk) disable iff (!rst_n) penable |-> psel);
`endif
endmodule
