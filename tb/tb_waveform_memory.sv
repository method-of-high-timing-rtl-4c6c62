// tb_waveform_memory: samples written one by one by index must be replayed as 8-lane
// words, rows 0..len-1 and round again, one word per frame strobe, with `wrapped` on
// row 0; `play` low must restart from row 0. Uses the default 8 x 1024 size.
`timescale 1ns/1ps
module tb_waveform_memory;
  import pulse_pkg::*;

  localparam int LANES = 8;
  localparam int DEPTH = 1024;
  logic clk = 0, rst_n = 0, wr_en = 0, play = 0, frame = 0;
  logic [$clog2(LANES*DEPTH)-1:0] wr_index;
  sample_t wr_data;
  logic [$clog2(DEPTH):0] len;
  sample_t word [LANES];
  logic word_valid, wrapped;
  int checks = 0, failures = 0;

  waveform_memory dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t pattern(input int idx);
    return sample_t'(idx * 7919 + 13);
  endfunction

  task automatic expect_rows(input int first, input int count, input int rows);
    int row;
    row = first;
    for (int i = 0; i < count; i++) begin
      @(negedge clk);
      frame = 1;
      @(negedge clk);
      frame = 0;
      checks++;
      if (!word_valid || wrapped != (row == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL valid/wrapped row %0d", row);
      end
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (word[l] != pattern(row * LANES + l)) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d lane %0d got %0d", row, l, word[l]);
        end
      end
      repeat (3) @(negedge clk);
      row = (row + 1) % rows;
    end
  endtask

  initial begin
    len = 0;
    wr_index = 0;
    wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill 25 rows (200 samples, one 50 MHz period at 10 GSa/s decimated by 8... as data)
    for (int i = 0; i < 25 * LANES; i++) begin
      @(negedge clk);
      wr_en = 1;
      wr_index = ($clog2(LANES*DEPTH))'(i);
      wr_data = pattern(i);
    end
    // and the last row of the memory
    for (int i = (DEPTH - 1) * LANES; i < DEPTH * LANES; i++) begin
      @(negedge clk);
      wr_index = ($clog2(LANES*DEPTH))'(i);
      wr_data = pattern(i);
    end
    @(negedge clk);
    wr_en = 0;
    len = 25;
    play = 1;
    expect_rows(0, 60, 25);
    // stop and restart: back to row 0
    @(negedge clk);
    play = 0;
    @(negedge clk);
    play = 1;
    expect_rows(0, 5, 25);
    // frame strobes without play give no words
    @(negedge clk);
    play = 0;
    frame = 1;
    @(negedge clk);
    frame = 0;
    checks++;
    if (word_valid) failures++;
    // full depth: the last row is reached
    len = DEPTH;
    play = 1;
    for (int i = 0; i < DEPTH - 1; i++) begin
      @(negedge clk); frame = 1; @(negedge clk); frame = 0;
    end
    expect_rows(DEPTH - 1, 1, DEPTH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
