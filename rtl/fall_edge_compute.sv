// fall_edge_compute: falling-edge sample value for tick K.
//
// Implements V = V_L + (0.8/Tf)*(V_H-V_L)*(Tw + (Tr+Tf)/1.6 - K/Nfs). The term
// Tw + (Tr+Tf)/1.6 is the end of the falling edge K3, supplied in 1/32 tick, so the
// distance to the end is K3 - 32*K, exact even for fractional Tw, Tr and Tf. The slope
// (0.8/Tf)*(V_H-V_L) per tick comes from the parameter control. Adding V_L and clamping
// to [V_L, V_H] are this design's. Timing: one register stage.
module fall_edge_compute
  import pulse_pkg::*;
(
  input  logic               clk,
  input  logic [K_W-1:0]     k,
  input  logic [THR_W-1:0]   k_fall_end,
  input  logic [SLOPE_W-1:0] slope,
  input  sample_t            v_low,
  input  sample_t            v_high,
  output sample_t            value
);

  localparam int PROD_W = SLOPE_W + THR_W;
  localparam int SHIFT  = SLOPE_FRAC + THR_FRAC;

  logic [THR_W-1:0]  k_scaled;
  logic [THR_W-1:0]  to_end;
  logic [PROD_W-1:0] prod;
  logic [PROD_W-1:0] drop;
  logic signed [SAMPLE_W+1:0] sum;
  logic signed [SAMPLE_W+1:0] span;

  always_comb begin
    k_scaled = THR_W'(k) << THR_FRAC;
    to_end     = (k_fall_end > k_scaled) ? (k_fall_end - k_scaled) : '0;
    prod     = PROD_W'(slope) * PROD_W'(to_end);
    drop     = (prod + (PROD_W'(1) << (SHIFT - 1))) >> SHIFT;
    span     = (SAMPLE_W+2)'(v_high) - (SAMPLE_W+2)'(v_low);
    if (drop >= PROD_W'(unsigned'(span)))
      sum = (SAMPLE_W+2)'(v_high);
    else
      sum = (SAMPLE_W+2)'(v_low) + signed'((SAMPLE_W+2)'(drop));
  end

  always_ff @(posedge clk) value <= SAMPLE_W'(sum);

endmodule
