// tb_rise_edge_compute: rising-edge values against the ideal ramp.
// For random rise times (quarter-tick steps), levels and every K of the rise, the unit's
// output, one clock after K, must be within 1 LSB of V_L + (V_H-V_L)*K/(Tr/0.8) worked
// out in real arithmetic; past the end of the rise it must hold V_H exactly.
`timescale 1ns/1ps
module tb_rise_edge_compute;
  import pulse_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0;
  logic [K_W-1:0] k;
  logic [SLOPE_W-1:0] slope;
  sample_t v_low, v_high, value;
  int checks = 0, failures = 0;

  rise_edge_compute dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tr_q, vh, vl, kmax;
    real tr, expv;
    for (int trial = 0; trial < 60; trial++) begin
      tr_q = 1 + int'($urandom_range(0, 800));
      vl   = -int'($urandom_range(0, 16000));
      vh   = vl + int'($urandom_range(1, 32767 - vl));
      tr   = tr_q / 4.0;
      slope  = ref_slope(real'(vh - vl), tr);
      v_low  = sample_t'(vl);
      v_high = sample_t'(vh);
      kmax = int'(tr / 0.8) + 3;
      for (int kk = 0; kk <= kmax; kk++) begin
        k = K_W'(kk);
        @(posedge clk);
        #0.1;
        expv = ideal_pulse(real'(kk), 1.0e6, tr, tr, real'(vh), real'(vl));
        checks++;
        if (absr(real'(value) - expv) > 1.0) begin
          failures++;
          if (failures < 10) $display("FAIL tr_q=%0d k=%0d got %0d exp %f", tr_q, kk, value, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
