// tb_downsampler: fed a ramp at the virtual rate and a strobe every 8 clocks, it must
// output exactly the sample present at each strobe, one clock later with a one-clock
// valid, and hold it in between.
`timescale 1ns/1ps
module tb_downsampler;
  import pulse_pkg::*;

  logic clk = 0, rst_n = 0, fs_en = 0;
  sample_t din, dout;
  logic dout_valid;
  int checks = 0, failures = 0;

  downsampler dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t kept;
  int nvalid;

  initial begin
    din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    kept = 0;
    nvalid = 0;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      din   = sample_t'(i * 37 - 9000);
      fs_en = (i % 8 == 7);
      if (fs_en) kept = din;
      @(posedge clk);
      #0.1;
      checks++;
      if (dout_valid != fs_en || dout != kept) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d valid=%0b dout=%0d exp %0d", i, dout_valid, dout, kept);
      end
      if (dout_valid) nvalid++;
    end
    checks++;
    if (nvalid != 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
