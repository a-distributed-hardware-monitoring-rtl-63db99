// probe_cfg_loader: probe configuration memory of a tile monitor, with the
// FIFO of load requests and the sequencer that copies a stored
// configuration into a probe.
//
// The memory holds MEM_WORDS 32-bit words (1024 x 32 by default, the data
// part of one 36 Kbit block RAM) and is written by software word by word
// (mem_we, mem_addr, mem_wdata). A load request names a probe, the first
// probe register to write, the number of words and the first memory word:
//     req[30:28] probe, req[27:19] first register, req[18:10] words - 1,
//     req[9:0]   first memory word
// Requests wait in a REQ_DEPTH-entry FIFO until earlier ones are done, so
// software issues one bus write per reconfiguration and never waits. The
// sequencer reads one word per cycle and, one cycle later, writes it to
// consecutive registers of the chosen probe over the shared configuration
// bus (pcfg, with the write strobe only on that probe's pcfg_we bit).
// A request of L words takes L + 1 cycles after it reaches the FIFO head.
// busy is high while a request is queued or being executed.
module probe_cfg_loader #(
  parameter int unsigned N_P       = 5,
  parameter int unsigned MEM_WORDS = 1024,
  parameter int unsigned REQ_DEPTH = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          mem_we,
  input  logic [$clog2(MEM_WORDS)-1:0]  mem_addr,
  input  logic [31:0]                   mem_wdata,
  input  logic                          req_valid,
  output logic                          req_ready,
  input  logic [31:0]                   req,
  output mon_pkg::pcfg_bus_t            pcfg,
  output logic [N_P-1:0]                pcfg_we,
  output logic                          busy
);
  import mon_pkg::*;

  localparam int unsigned MAW = $clog2(MEM_WORDS);

  logic [31:0] mem [MEM_WORDS];

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
  end

  // request FIFO
  logic        q_valid, q_ready, q_full_unused;
  logic [31:0] q_data;
  logic [$clog2(REQ_DEPTH+1)-1:0] q_count_unused;

  sync_fifo #(.T(logic [31:0]), .DEPTH(REQ_DEPTH)) u_req (
    .clk, .rst_n,
    .in_valid(req_valid), .in_ready(req_ready), .in_data(req),
    .out_valid(q_valid), .out_ready(q_ready), .out_data(q_data),
    .full(q_full_unused), .count(q_count_unused)
  );

  // sequencer
  logic               active;
  logic [2:0]         probe_q;
  logic [W_PADDR-1:0] reg_q;
  logic [8:0]         left_q;
  logic [MAW-1:0]     maddr_q;
  // read stage: a word read in one cycle is written to the probe in the next
  logic               rd_v;
  logic [2:0]         rd_probe;
  logic [W_PADDR-1:0] rd_reg;
  logic [31:0]        rd_word;

  assign q_ready = !active;
  assign busy    = active || q_valid || rd_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; probe_q <= '0; reg_q <= '0; left_q <= '0; maddr_q <= '0;
      rd_v <= 1'b0; rd_probe <= '0; rd_reg <= '0;
    end else begin
      rd_v <= 1'b0;
      if (!active) begin
        if (q_valid) begin
          active  <= 1'b1;
          probe_q <= q_data[30:28];
          reg_q   <= q_data[27:19];
          left_q  <= q_data[18:10];
          maddr_q <= MAW'(q_data[9:0]);
        end
      end else begin
        rd_v     <= 1'b1;
        rd_probe <= probe_q;
        rd_reg   <= reg_q;
        reg_q    <= reg_q + 1'b1;
        maddr_q  <= maddr_q + 1'b1;
        left_q   <= left_q - 1'b1;
        if (left_q == '0) active <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    rd_word <= mem[maddr_q];
  end

  always_comb begin
    pcfg.we    = rd_v;
    pcfg.addr  = rd_reg;
    pcfg.wdata = rd_word;
    pcfg_we    = '0;
    for (int p = 0; p < N_P; p++)
      if (rd_v && rd_probe == 3'(p)) pcfg_we[p] = 1'b1;
  end
endmodule
