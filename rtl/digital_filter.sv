// digital_filter: Butterworth low-pass that limits the original samples to the DAC band.
//
// Runs at the virtual sampling rate, one sample per clock with `en`. Four direct-form-I
// second-order sections in cascade realise a 7th-order Butterworth response (the
// coefficient defaults in pulse_pkg: 3 dB at 550 MHz, about 1 dB at 500 MHz, for a
// 10 GSa/s input); the coefficients are inputs, so the parameter control can load any
// other low-pass of up to 8th order. Samples are carried with 2 bits of headroom, for
// the filter's overshoot on a step, and FRAC_BITS bits below the DAC LSB; the output is
// rounded back to SAMPLE_W bits and saturated. The Butterworth type and the passband
// follow the method; the order, corner, section split and number formats are this
// design's choices.
//
// Timing: sample x[n] entered on a clock with `en` affects `dout` FILT_SECTIONS+1
// enabled clocks later (one register per section and one at the output).
module digital_filter
  import pulse_pkg::*;
#(
  parameter int FRAC_BITS = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  filt_coef_t coef,
  input  sample_t    din,
  output sample_t    dout
);

  localparam int IW = SAMPLE_W + 2 + FRAC_BITS;

  logic signed [IW-1:0] stage [FILT_SECTIONS+1];
  logic signed [IW-1:0] out_rnd;

  assign stage[0] = IW'(din) <<< FRAC_BITS;

  for (genvar s = 0; s < FILT_SECTIONS; s++) begin : g_sec
    biquad_section #(.IW(IW)) u_sec (
      .clk, .rst_n, .en, .coef(coef[s]), .x(stage[s]), .y(stage[s+1])
    );
  end

  assign out_rnd = (stage[FILT_SECTIONS] + (IW'(1) <<< (FRAC_BITS - 1))) >>> FRAC_BITS;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else if (en) begin
      if (out_rnd > IW'(2**(SAMPLE_W-1) - 1))     dout <= sample_t'(2**(SAMPLE_W-1) - 1);
      else if (out_rnd < -IW'(2**(SAMPLE_W-1)))  dout <= sample_t'(-(2**(SAMPLE_W-1)));
      else                                        dout <= SAMPLE_W'(out_rnd);
    end
  end

endmodule
