// biquad_section: one second-order IIR section (direct form I) of the digital filter.
//
// y[n] = b0*x[n] + b1*x[n-1] + b2*x[n-2] - a1*y[n-1] - a2*y[n-2], coefficients in
// Q2.COEF_FRAC. The sum is kept at full width, rounded back to IW bits and saturated.
// Direct form I is chosen because its only rounding point is the output, which keeps
// the noise of poles close to z = 1 small. Timing: on each clock with `en` high the
// section takes x and presents y[n] on `y` after that clock (one clock of latency).
module biquad_section
  import pulse_pkg::*;
#(
  parameter int IW = 28
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  biquad_coef_t         coef,
  input  logic signed [IW-1:0] x,
  output logic signed [IW-1:0] y
);

  localparam int PW  = IW + COEF_W;
  localparam int ACW = PW + 3;

  logic signed [IW-1:0]  x1, x2, y2;
  logic signed [ACW-1:0] acc, rounded;
  logic signed [ACW-1:0] max_v, min_v;
  logic signed [PW-1:0]  p_b0, p_b1, p_b2, p_a1, p_a2;

  always_comb begin
    p_b0 = coef.b0 * x;
    p_b1 = coef.b1 * x1;
    p_b2 = coef.b2 * x2;
    p_a1 = coef.a1 * y;
    p_a2 = coef.a2 * y2;
    acc  = ACW'(p_b0) + ACW'(p_b1) + ACW'(p_b2) - ACW'(p_a1) - ACW'(p_a2);
    rounded = (acc + (ACW'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    max_v   = ACW'({1'b0, {(IW-1){1'b1}}});
    min_v   = -max_v - 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0;
      x2 <= '0;
      y  <= '0;
      y2 <= '0;
    end else if (en) begin
      x1 <= x;
      x2 <= x1;
      y2 <= y;
      if (rounded > max_v)      y <= {1'b0, {(IW-1){1'b1}}};
      else if (rounded < min_v) y <= {1'b1, {(IW-1){1'b0}}};
      else                      y <= IW'(rounded);
    end
  end

endmodule
