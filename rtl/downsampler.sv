// downsampler: integer-factor decimation of the filtered samples to the DAC rate.
//
// The filtered stream arrives at the virtual rate; on each fs strobe from the divide-by-N
// the current filtered sample is kept and handed on with `dout_valid` for one clock, the
// other N-1 samples of each group are dropped. The filter in front has already removed
// what would alias. Timing: `dout` and `dout_valid` are registers, one clock after the
// strobe; `dout` holds its value between strobes (a zero-order hold at fs).
module downsampler
  import pulse_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    fs_en,
  input  sample_t din,
  output sample_t dout,
  output logic    dout_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= fs_en;
      if (fs_en) dout <= din;
    end
  end

endmodule
