// mon_timer: checks one timing requirement (e_start, e_stop, T_min, T_max)
// on the filtered event trace.
//
// On the start event the timer records its timestamp and clears its
// end-of-period (EOP) counter; every EOP marker while running increments the
// counter; on the stop event the latency is
//     T = ts_stop - ts_start + N_EOP * 2^W_T
// and the verdict is pass when T_min <= T <= T_max, fail otherwise. If the
// stop event does not come, the requirement is failed at the EOP that makes
// the counter's old value N satisfy N * 2^W_T > T_max (the elapsed time is
// then certainly above T_max), so a missed deadline is reported at most
// 2^W_T - 1 cycles late.
//
// After a pass the timer re-arms and waits for the next start event
// (repeated measurements, as for a windowed watchdog); pass stays set. A
// fail stops the timer and stays set. Start events while running are
// ignored. Software writes the requirement with cfg_we, which also re-arms
// the timer and clears the verdicts. fail_pulse raises the interrupt.
// One event per cycle, verdict registered one cycle after the deciding
// event. The latency counter is W_TM = 32 bits wide (EOP counter
// W_TM - W_T bits); widths are this implementation's choice.
module mon_timer (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ev_valid,
  input  mon_pkg::trace_t            ev,
  input  logic                       cfg_we,
  input  logic                       cfg_en,
  input  mon_pkg::evid_t             cfg_start,
  input  mon_pkg::evid_t             cfg_stop,
  input  logic [mon_pkg::W_TM-1:0]   cfg_tmin,
  input  logic [mon_pkg::W_TM-1:0]   cfg_tmax,
  output logic                       running,
  output logic [mon_pkg::W_TM-1:0]   latency,
  output logic                       pass,
  output logic                       fail,
  output logic                       fail_pulse
);
  import mon_pkg::*;

  logic                 en;
  evid_t                id_start, id_stop;
  logic [W_TM-1:0]      tmin, tmax;
  ts_t                  t_start;
  logic [W_TM-W_T-1:0]  n_eop;
  logic [W_TM-1:0]      t_meas;

  // ts_stop - ts_start + N_EOP * 2^W_T, evaluated W_TM bits wide
  assign t_meas = {n_eop, {W_T{1'b0}}} + W_TM'(ev.ts) - W_TM'(t_start);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en <= 1'b0; id_start <= '0; id_stop <= '0; tmin <= '0; tmax <= '0;
      running <= 1'b0; t_start <= '0; n_eop <= '0; latency <= '0;
      pass <= 1'b0; fail <= 1'b0; fail_pulse <= 1'b0;
    end else begin
      fail_pulse <= 1'b0;
      if (cfg_we) begin
        en <= cfg_en; id_start <= cfg_start; id_stop <= cfg_stop;
        tmin <= cfg_tmin; tmax <= cfg_tmax;
        running <= 1'b0; pass <= 1'b0; fail <= 1'b0; n_eop <= '0;
      end else if (en && !fail && ev_valid) begin
        if (!running) begin
          if (ev.ev == id_start) begin
            running <= 1'b1;
            t_start <= ev.ts;
            n_eop   <= '0;
          end
        end else if (ev.ev == EOP_ID) begin
          n_eop <= n_eop + 1'b1;
          if ({n_eop, {W_T{1'b0}}} > tmax) begin
            fail       <= 1'b1;
            fail_pulse <= 1'b1;
            running    <= 1'b0;
          end
        end else if (ev.ev == id_stop) begin
          running <= 1'b0;
          latency <= t_meas;
          if (t_meas < tmin || t_meas > tmax) begin
            fail       <= 1'b1;
            fail_pulse <= 1'b1;
          end else begin
            pass <= 1'b1;
          end
        end
      end
    end
  end
endmodule
