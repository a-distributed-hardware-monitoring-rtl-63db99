// ts_arbiter: timestamp-based arbiter that merges N streams of trace
// elements into one stream ordered by timestamp.
//
// Among the inputs that currently hold a valid element, the one issued first
// on the timestamp wheel (mon_pkg::get_first) is granted and forwarded when
// the output is ready. Ties go to the lower input index, except that an
// end-of-period element wins a tie. The choice is made by a sequential scan
// (N-1 comparisons); the comparison rule follows the design, the scan order
// is this implementation's choice. Purely combinational: the grant depends on
// in_valid, in_data and out_ready of the same cycle, and the output is
// registered by whatever FIFO or register follows.
module ts_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic            [N-1:0] in_valid,
  output logic            [N-1:0] in_ready,
  input  mon_pkg::trace_t         in_data [N],
  output logic                    out_valid,
  input  logic                    out_ready,
  output mon_pkg::trace_t         out_data,
  output logic [(N>1 ? $clog2(N) : 1)-1:0] out_sel
);
  import mon_pkg::*;

  always_comb begin
    out_valid = 1'b0;
    out_sel   = '0;
    out_data  = in_data[0];
    for (int unsigned i = 0; i < N; i++) begin
      if (in_valid[i]) begin
        if (!out_valid || !get_first(out_data, in_data[i])) begin
          out_valid = 1'b1;
          out_sel   = i[$bits(out_sel)-1:0];
          out_data  = in_data[i];
        end
      end
    end
    in_ready = '0;
    if (out_valid) in_ready[out_sel] = out_ready;
  end
endmodule
