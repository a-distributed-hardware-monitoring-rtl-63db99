// mon_pkg: types and constants shared by the runtime-verification monitoring
// fabric (probes, tile monitors and the SortNoC tracing interconnect).
//
// A trace element is the 3-tuple (event ID, timestamp, cluster ID). It is the
// single flit that every buffer, arbiter and router of the fabric carries.
// The timestamp-ordering rule (get_first) lives here so that the probe
// arbiter, the tile-monitor arbiter and the SortNoC crossbars all apply the
// same comparison.
//
// Widths: the 8-bit timestamp follows the timing example of the design (a
// timestamp of 0xFE wraps to 0x00 two cycles later and the next end-of-period
// marker follows 0x100 cycles after that). The 8-bit event ID, 4-bit state ID
// and 2-bit cluster ID are this implementation's choices: 4 states x 256
// events x 4 bits = 16 Kbit, which fits the 18 Kbit memory block an automata
// processor is given, and 2 cluster bits give every one of the 4 tile
// monitors its own cluster.
package mon_pkg;

  localparam int unsigned W_T  = 8;   // timestamp width
  localparam int unsigned W_IE = 8;   // event ID width
  localparam int unsigned W_V  = 4;   // automaton state ID width
  localparam int unsigned W_C  = 2;   // cluster ID width
  localparam int unsigned W_PC = 32;  // program counter width of the traced cores
  localparam int unsigned W_PW = 16;  // power sample width
  localparam int unsigned W_TM = 32;  // latency / bound width of a timer

  typedef logic [W_T-1:0]  ts_t;
  typedef logic [W_IE-1:0] evid_t;
  typedef logic [W_V-1:0]  state_t;
  typedef logic [W_C-1:0]  clid_t;

  // The end-of-period event uses a reserved event ID. It is never filtered
  // out by a cluster comparison.
  localparam evid_t EOP_ID = '1;

  typedef struct packed {
    evid_t ev;   // event ID
    ts_t   ts;   // timestamp at detection
    clid_t cl;   // cluster ID
  } trace_t;

  localparam int unsigned W_TRACE = $bits(trace_t);

  // Data types an out-of-range detector can compare.
  typedef enum logic [1:0] {
    DT_UINT   = 2'd0,  // 64-bit unsigned integer
    DT_SINT   = 2'd1,  // 64-bit two's-complement integer
    DT_FLOAT  = 2'd2,  // IEEE 754 single precision, in bits [31:0]
    DT_DOUBLE = 2'd3   // IEEE 754 double precision
  } dtype_e;

  // Configuration of one checkpoint comparator.
  typedef struct packed {
    logic             en;
    logic [W_PC-1:0]  pc;
    evid_t            ev;
    clid_t            cl;
  } cp_cfg_t;

  // Configuration of one out-of-range comparator.
  typedef struct packed {
    logic             en;
    logic [W_PC-1:0]  pc;
    dtype_e           dtype;
    logic [63:0]      rmin;
    logic [63:0]      rmax;
    evid_t            ev;
    clid_t            cl;
  } oor_cfg_t;

  // Configuration of the power-corridor detector.
  typedef struct packed {
    logic             en;
    logic [W_PW-1:0]  pmin;
    logic [W_PW-1:0]  pmax;
    evid_t            ev;
    clid_t            cl;
  } pwr_cfg_t;

  // Probe configuration bus (written by the tile monitor).
  localparam int unsigned W_PADDR = 9;
  typedef struct packed {
    logic               we;
    logic [W_PADDR-1:0] addr;
    logic [31:0]        wdata;
  } pcfg_bus_t;

  // Timestamp-based arbitration on the timestamp wheel: a was issued before
  // or together with b when the distance from a forward to b,
  // (ts_b - ts_a) mod 2^W_T, is at most T_b = 2^(W_T-1) - 1, i.e. when the
  // shorter way round the wheel leads from a to b. On equal timestamps an end-of-period element goes
  // first, so timers count a period boundary before any event stamped with
  // the same (wrapped) timestamp.
  localparam ts_t T_B = ts_t'((1 << (W_T - 1)) - 1);

  function automatic logic is_eop(trace_t t);
    return t.ev == EOP_ID;
  endfunction

  // Returns 1 when a goes first, 0 when b goes first.
  function automatic logic get_first(trace_t a, trace_t b);
    ts_t d;
    d = b.ts - a.ts;
    if (d == '0 && is_eop(b) && !is_eop(a)) return 1'b0;
    return d <= T_B;
  endfunction

endpackage
