// waveform_memory: playback store for waveform samples calculated by the host.
//
// In the measured hardware the host computes the samples and sends them over its bus;
// the FPGA keeps them in block RAM and replays them to the DAC, eight samples per fabric
// clock. This memory holds LANES banks of DEPTH 16-bit samples. The host writes one
// sample at a time by sample index: bank = index mod LANES, row = index / LANES, so
// consecutive indices fill one DAC word lane by lane. On every `frame` strobe while
// `play` is high one row is read out as a LANES-sample word, rows 0 .. len-1 in turn and
// then again from row 0, so a waveform of len*LANES samples repeats without a gap.
// `play` low returns the read pointer to row 0. The default size (8 x 1024 x 16 bits)
// fits the four block RAMs of the reported resource use; size, the index mapping and
// the replay order are this design's choices.
//
// Timing: `word`/`word_valid` are registered, one clock after `frame` (a read of
// synchronous RAM). `wrapped` pulses with the word of row 0.
module waveform_memory
  import pulse_pkg::*;
#(
  parameter int LANES = 8,
  parameter int DEPTH = 1024
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              wr_en,
  input  logic [$clog2(LANES*DEPTH)-1:0]    wr_index,
  input  sample_t                           wr_data,
  input  logic                              play,
  input  logic                              frame,
  input  logic [$clog2(DEPTH):0]            len,
  output sample_t                           word [LANES],
  output logic                              word_valid,
  output logic                              wrapped
);

  localparam int LW = $clog2(LANES);
  localparam int AW = $clog2(DEPTH);

  logic [AW-1:0] rd_row;
  logic          rd_en;

  assign rd_en = play && frame;

  for (genvar b = 0; b < LANES; b++) begin : g_bank
    sample_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_en && wr_index[LW-1:0] == LW'(b)) mem[wr_index[LW+AW-1:LW]] <= wr_data;
      if (rd_en) word[b] <= mem[rd_row];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_row     <= '0;
      word_valid <= 1'b0;
      wrapped    <= 1'b0;
    end else begin
      word_valid <= rd_en;
      wrapped    <= rd_en && (rd_row == '0);
      if (!play) begin
        rd_row <= '0;
      end else if (frame) begin
        if ((AW+1)'(rd_row) + 1'b1 >= len) rd_row <= '0;
        else                               rd_row <= rd_row + 1'b1;
      end
    end
  end

endmodule
