// timestamp_gen: free-running W_T-bit timestamp counter of a probe.
//
// The counter increments every cycle and wraps from 2^W_T-1 to 0; wrap is
// high in the cycle the counter holds 2^W_T-1, so the end-of-period detector
// can issue its marker in the cycle the counter reads 0. All generators leave
// reset at 0 in the same cycle, which is how they are synchronised at boot.
// For a chip where a common reset cannot be used, sync_load loads
// sync_value in one cycle: software then loads each counter with a value
// compensated for the known latency of the synchronising event (the value
// to use is the system's choice).
module timestamp_gen (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sync_load,
  input  mon_pkg::ts_t   sync_value,
  output mon_pkg::ts_t   ts,
  output logic           wrap
);
  assign wrap = (ts == '1) && !sync_load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ts <= '0;
    else if (sync_load) ts <= sync_value;
    else                ts <= ts + 1'b1;
  end
endmodule
