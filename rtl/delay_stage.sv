// delay_stage: elastic delay line of DEPTH registers on the local input of
// a SortNoC router.
//
// Without back-pressure every element leaves exactly DEPTH cycles after it
// entered, so elements injected in the same cycle anywhere in the network
// meet at each crossbar in the same cycle. Each stage moves forward when the
// stage after it is empty or is itself moving; when the crossbar does not
// take the last stage, the line fills up behind it and in_ready drops.
// DEPTH = 0 is a plain wire.
module delay_stage #(
  parameter int unsigned DEPTH = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  mon_pkg::trace_t in_data,
  output logic            out_valid,
  input  logic            out_ready,
  output mon_pkg::trace_t out_data
);
  import mon_pkg::*;

  if (DEPTH == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
    assign in_ready  = out_ready;
  end else begin : g_line
    logic   [DEPTH-1:0] v;
    trace_t             d [DEPTH];
    logic   [DEPTH:0]   adv;   // adv[i]: stage i may load (adv[DEPTH] = output taken)

    assign adv[DEPTH] = out_ready;
    for (genvar i = DEPTH - 1; i >= 0; i--) begin : g_adv
      assign adv[i] = !v[i] || adv[i+1];
    end

    assign in_ready  = adv[0];
    assign out_valid = v[DEPTH-1];
    assign out_data  = d[DEPTH-1];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v <= '0;
        for (int i = 0; i < DEPTH; i++) d[i] <= '0;
      end else begin
        if (adv[0]) begin
          v[0] <= in_valid;
          d[0] <= in_data;
        end
        for (int i = 1; i < DEPTH; i++) begin
          if (adv[i]) begin
            v[i] <= v[i-1];
            d[i] <= d[i-1];
          end
        end
      end
    end
  end
endmodule
