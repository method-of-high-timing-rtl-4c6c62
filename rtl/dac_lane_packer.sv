// dac_lane_packer: parallel DAC word builder, eight fs samples per FPGA clock.
//
// At 1.25 GSa/s the DAC is fed by a 156.25 MHz fabric clock carrying eight samples per
// clock. This unit gathers LANES consecutive downsampled samples into one word: lane 0
// is the oldest sample, lane LANES-1 the newest. When the last lane is filled the word
// is presented with `word_valid` high for one clock; that strobe marks the fabric-clock
// rate fs/LANES. `sync` discards a partly filled word and starts again at lane 0.
// The eight lanes follow the hardware description; lane order and the strobe are this
// design's choices. Timing: `word` and `word_valid` are registers, one clock after the
// sample that completes the word.
module dac_lane_packer
  import pulse_pkg::*;
#(
  parameter int LANES = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sync,
  input  logic    din_valid,
  input  sample_t din,
  output sample_t word [LANES],
  output logic    word_valid
);

  localparam int LW = (LANES > 1) ? $clog2(LANES) : 1;

  sample_t        fill [LANES];
  logic [LW-1:0]  lane;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane       <= '0;
      word_valid <= 1'b0;
      for (int i = 0; i < LANES; i++) begin
        fill[i] <= '0;
        word[i] <= '0;
      end
    end else begin
      word_valid <= 1'b0;
      if (sync) begin
        lane <= '0;
      end else if (din_valid) begin
        fill[lane] <= din;
        if (int'(lane) == LANES - 1) begin
          lane       <= '0;
          word_valid <= 1'b1;
          for (int i = 0; i < LANES - 1; i++) word[i] <= fill[i];
          word[LANES-1] <= din;
        end else begin
          lane <= lane + 1'b1;
        end
      end
    end
  end

endmodule
