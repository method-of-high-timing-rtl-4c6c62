// pulse_control: phase accumulator and sample-source selection of the sample generator.
//
// The accumulator K counts virtual sample ticks from 0 to period-1 and wraps, so every
// pulse period holds the same whole number of samples. Each tick K is compared with the
// three region thresholds of the pulse (all in 1/32 tick):
//   K*32 <  K1                 rising edge   (K1 = 1.25*Tr)
//   K1 <= K*32 < K2            high level    (K2 = Tw + 0.625*(Tr-Tf))
//   K2 <= K*32 < K3            falling edge  (K3 = Tw + 0.625*(Tr+Tf))
//   K3 <= K*32 < period*32     low level
// The region boundaries follow the pulse equations; the rising edge here includes K = 0,
// where it gives V_L, the same value as the low level.
//
// Parameter sets arrive on `load` with `pend`. While `run` is low K rests at 0, the
// source is the low level and a new set is taken at once; the first tick after `run`
// rises is K = 0 of a new period. While running a new set is
// taken when K wraps, so a period is never built from two sets (this also lets the width
// change from one period to the next, for PWM). `act` is the set in use for the K on
// `k`, changing in the same cycle as `k` returns to 0. `wrap` marks the first tick of
// each period.
//
// Timing: k, src, act and wrap are registers; all refer to the same tick.
module pulse_control
  import pulse_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          load,
  input  pulse_params_t pend,
  output logic [K_W-1:0] k,
  output src_e          src,
  output pulse_params_t act,
  output logic          wrap
);

  pulse_params_t pend_q;
  logic          pend_valid;
  logic          end_of_period;
  logic          started;
  logic [K_W-1:0] k_next;
  pulse_params_t act_next;
  logic [THR_W-1:0] k_scaled;

  assign end_of_period = (k + 1'b1 >= act.period);

  always_comb begin
    act_next = act;
    k_next   = k + 1'b1;
    if (!run) begin
      k_next = '0;
      if (pend_valid) act_next = pend_q;
    end else if (!started || end_of_period) begin
      k_next = '0;
      if (pend_valid) act_next = pend_q;
    end
  end

  // Region of the next tick, from the set that will be in use then.
  assign k_scaled = THR_W'(k_next) << THR_FRAC;

  src_e src_next;
  always_comb begin
    if (!run)                                src_next = SRC_LOW;
    else if (k_scaled < act_next.k_rise_end)   src_next = SRC_RISE;
    else if (k_scaled < act_next.k_fall_start) src_next = SRC_HIGH;
    else if (k_scaled < act_next.k_fall_end)   src_next = SRC_FALL;
    else                                       src_next = SRC_LOW;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k          <= '0;
      src        <= SRC_LOW;
      act        <= '0;
      wrap       <= 1'b0;
      pend_q     <= '0;
      pend_valid <= 1'b0;
      started    <= 1'b0;
    end else begin
      started <= run;
      k    <= k_next;
      src  <= src_next;
      act  <= act_next;
      wrap <= run && (k_next == '0);
      if (load) begin
        pend_q     <= pend;
        pend_valid <= 1'b1;
      end else if (!run || !started || end_of_period) begin
        pend_valid <= 1'b0;
      end
    end
  end

endmodule
