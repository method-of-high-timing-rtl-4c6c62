// tb_dac_lane_packer: samples arriving one per 8 clocks must come out as 8-lane words,
// lane 0 the oldest, one word per 8 samples with a one-clock valid; `sync` in the middle
// of a word must drop the partial word and start again at lane 0.
`timescale 1ns/1ps
module tb_dac_lane_packer;
  import pulse_pkg::*;

  localparam int LANES = 8;
  logic clk = 0, rst_n = 0, sync = 0, din_valid = 0;
  sample_t din;
  sample_t word [LANES];
  logic word_valid;
  int checks = 0, failures = 0;

  dac_lane_packer dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seq, words, base;

  task automatic send(input int v);
    @(negedge clk);
    din = sample_t'(v);
    din_valid = 1;
    @(negedge clk);
    din_valid = 0;
    repeat (6) @(negedge clk);
  endtask

  always @(posedge clk) begin
    #0.1;
    if (word_valid) begin
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (word[l] != sample_t'(base + l)) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d lane %0d got %0d exp %0d", words, l, word[l], base + l);
        end
      end
      words++;
      base += LANES;
    end
  end

  initial begin
    din = 0;
    words = 0;
    base = 100;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 10 * LANES; i++) send(100 + i);
    // partial word, then sync
    for (int i = 0; i < 3; i++) send(-5);
    @(negedge clk);
    sync = 1;
    @(negedge clk);
    sync = 0;
    base = 500;
    for (int i = 0; i < 4 * LANES; i++) send(500 + i);
    repeat (10) @(posedge clk);
    checks++;
    if (words != 14) begin
      failures++;
      $display("FAIL %0d words", words);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
