// waveform_sample_generator: original pulse samples at the virtual sampling rate.
//
// One clock is one virtual sample tick. The pulse control runs the phase accumulator K
// and picks the region; the rising- and falling-edge units evaluate their equations for
// the same K; the multiplexer then chooses the edge values or the V_H / V_L levels.
// Source selection and the levels are delayed one clock to meet the edge values, which
// are registered. Parameter sets enter through `load`/`pend` and take effect at the next
// period start (at once while stopped).
//
// Timing: `sample` for tick K appears two clocks after the pulse control holds K;
// `sample_wrap` is high with the first sample of each period. One sample every clock.
module waveform_sample_generator
  import pulse_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic          load,
  input  pulse_params_t pend,
  output sample_t       sample,
  output logic          sample_wrap
);

  logic [K_W-1:0] k;
  src_e           src, src_d;
  pulse_params_t  act;
  logic           wrap, wrap_d;
  sample_t        rise_value, fall_value, v_high_d, v_low_d;

  pulse_control u_ctrl (
    .clk, .rst_n, .run, .load, .pend,
    .k, .src, .act, .wrap
  );

  rise_edge_compute u_rise (
    .clk, .k, .slope(act.slope_r), .v_low(act.v_low), .v_high(act.v_high),
    .value(rise_value)
  );

  fall_edge_compute u_fall (
    .clk, .k, .k_fall_end(act.k_fall_end), .slope(act.slope_f),
    .v_low(act.v_low), .v_high(act.v_high), .value(fall_value)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_d    <= SRC_LOW;
      v_high_d <= '0;
      v_low_d  <= '0;
      wrap_d   <= 1'b0;
      sample_wrap <= 1'b0;
    end else begin
      src_d    <= src;
      v_high_d <= act.v_high;
      v_low_d  <= act.v_low;
      wrap_d   <= wrap;
      sample_wrap <= wrap_d;
    end
  end

  sample_mux u_mux (
    .clk, .rst_n, .src(src_d), .rise_value, .fall_value,
    .v_high(v_high_d), .v_low(v_low_d), .sample
  );

endmodule
