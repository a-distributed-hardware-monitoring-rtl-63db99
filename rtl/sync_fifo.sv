// sync_fifo: single-clock first-in first-out buffer for trace elements and
// configuration requests.
//
// DEPTH entries of type T held in a circular array with read and write
// pointers and an occupancy counter. A write is accepted when in_valid and
// in_ready (not full); a read happens when out_valid and out_ready. The head
// entry is visible one cycle after it was written (no fall-through), so a
// FIFO between two routers adds exactly one cycle per hop. A simultaneous
// read and write on a full FIFO is refused on the write side (in_ready only
// looks at the occupancy), which keeps in_ready free of any path from
// out_ready. full is exported for the probe's pipeline-halt signal.
// Reset empties the FIFO; the storage itself is not reset.
module sync_fifo #(
  parameter type         T     = mon_pkg::trace_t,
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [AW-1:0]   wptr, rptr;
  logic            do_wr, do_rd;

  assign full      = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign in_ready  = !full;
  assign out_valid = (count != '0);
  assign out_data  = mem[rptr];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= incr(wptr);
      if (do_rd) rptr <= incr(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= in_data;
  end

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= ($clog2(DEPTH+1))'(DEPTH));
`endif
endmodule
