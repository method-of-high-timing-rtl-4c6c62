// clock_divider: the divide-by-N that derives the DAC rate fs from the virtual rate N*fs.
//
// Rather than a second clock, it produces a one-clock strobe `fs_en` on every N-th
// clock of the virtual-rate clock (a clock enable for the fs domain). `sync` restarts the
// count so the strobe falls on a known sample; the first strobe after `sync` comes
// N clocks later. N = 0 or 1 gives a strobe on every enabled clock. Dividing by an
// integer N follows the method; using an enable instead of a derived clock is this
// design's choice. Timing: `fs_en` is a register output.
module clock_divider
  import pulse_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               sync,
  input  logic [DECIM_W-1:0] n,
  output logic               fs_en
);

  logic [DECIM_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      fs_en <= 1'b0;
    end else if (sync || !en) begin
      cnt   <= '0;
      fs_en <= 1'b0;
    end else if (cnt + 1'b1 >= n) begin
      cnt   <= '0;
      fs_en <= 1'b1;
    end else begin
      cnt   <= cnt + 1'b1;
      fs_en <= 1'b0;
    end
  end

endmodule
