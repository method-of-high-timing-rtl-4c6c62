// rise_edge_compute: rising-edge sample value for tick K.
//
// Implements V = V_L + (0.8/Tr)*(V_H-V_L)*K/Nfs. The factor (0.8/Tr)*(V_H-V_L), in
// codes per tick with SLOPE_FRAC fractional bits, is worked out once per parameter set
// by the parameter control, so here it is one multiply, a rounding shift and an add.
// Adding V_L (the equation gives the rise above the low level) and clamping at V_H are
// this design's. Timing: one register stage, the value for `k` appears on the next clock.
module rise_edge_compute
  import pulse_pkg::*;
(
  input  logic               clk,
  input  logic [K_W-1:0]     k,
  input  logic [SLOPE_W-1:0] slope,
  input  sample_t            v_low,
  input  sample_t            v_high,
  output sample_t            value
);

  localparam int PROD_W = SLOPE_W + K_W;

  logic [PROD_W-1:0]  prod;
  logic [PROD_W-1:0]  rise;
  logic signed [SAMPLE_W+1:0] sum;
  logic signed [SAMPLE_W+1:0] span;

  always_comb begin
    prod = PROD_W'(slope) * PROD_W'(k);
    rise = (prod + PROD_W'(1 << (SLOPE_FRAC - 1))) >> SLOPE_FRAC;
    span = (SAMPLE_W+2)'(v_high) - (SAMPLE_W+2)'(v_low);
    if (rise >= PROD_W'(unsigned'(span)))
      sum = (SAMPLE_W+2)'(v_high);
    else
      sum = (SAMPLE_W+2)'(v_low) + signed'((SAMPLE_W+2)'(rise));
  end

  always_ff @(posedge clk) value <= SAMPLE_W'(sum);

endmodule
