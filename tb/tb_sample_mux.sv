// tb_sample_mux: the multiplexer must pass, one clock later, the value of the chosen
// source: rising-edge value, V_H, falling-edge value or V_L, for random inputs.
`timescale 1ns/1ps
module tb_sample_mux;
  import pulse_pkg::*;

  logic clk = 0, rst_n = 0;
  src_e src;
  sample_t rise_value, fall_value, v_high, v_low, sample;
  int checks = 0, failures = 0;

  sample_mux dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t expv;
    src = SRC_LOW; rise_value = 0; fall_value = 0; v_high = 0; v_low = 0;
    repeat (2) @(posedge clk);
    checks++;
    if (sample != 0) failures++;
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      src        = src_e'($urandom_range(0, 3));
      rise_value = sample_t'($urandom);
      fall_value = sample_t'($urandom);
      v_high     = sample_t'($urandom);
      v_low      = sample_t'($urandom);
      case (src)
        SRC_RISE: expv = rise_value;
        SRC_HIGH: expv = v_high;
        SRC_FALL: expv = fall_value;
        default:  expv = v_low;
      endcase
      @(posedge clk);
      #0.1;
      checks++;
      if (sample != expv) begin
        failures++;
        if (failures < 10) $display("FAIL src=%0d got %0d exp %0d", src, sample, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
