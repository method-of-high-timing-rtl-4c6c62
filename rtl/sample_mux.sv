// sample_mux: the multiplexer of the sample generator, with the two level sources.
//
// Chooses, per virtual sample, between the rising-edge value, the high level V_H, the
// falling-edge value and the low level V_L, as told by the pulse control. The levels
// are the V_H and V_L of the parameter set in use. Timing: registered output, so the
// sample appears one clock after `src` and the inputs; reset clears it to zero.
module sample_mux
  import pulse_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  src_e    src,
  input  sample_t rise_value,
  input  sample_t fall_value,
  input  sample_t v_high,
  input  sample_t v_low,
  output sample_t sample
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sample <= '0;
    else begin
      unique case (src)
        SRC_RISE: sample <= rise_value;
        SRC_HIGH: sample <= v_high;
        SRC_FALL: sample <= fall_value;
        SRC_LOW:  sample <= v_low;
      endcase
    end
  end

endmodule
