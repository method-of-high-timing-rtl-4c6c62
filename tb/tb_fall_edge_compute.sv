// tb_fall_edge_compute: falling-edge values against the ideal ramp.
// Random Tw, Tf (quarter ticks, so the edge end falls between ticks) and levels; for
// every K from the fall start to past its end the output must be within 1 LSB of
// V_L + (V_H-V_L)*(K3 - K)/(Tf/0.8), K3 = Tw + (Tr+Tf)/1.6, and V_L after the end.
`timescale 1ns/1ps
module tb_fall_edge_compute;
  import pulse_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0;
  logic [K_W-1:0] k;
  logic [THR_W-1:0] k_fall_end;
  logic [SLOPE_W-1:0] slope;
  sample_t v_low, v_high, value;
  int checks = 0, failures = 0;

  fall_edge_compute dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tw_q, tr_q, tf_q, vh, vl, k2, k3;
    real tw, tr, tf, expv;
    pulse_params_t p;
    for (int trial = 0; trial < 60; trial++) begin
      tr_q = 1 + int'($urandom_range(0, 400));
      tf_q = 1 + int'($urandom_range(0, 800));
      tw_q = int'(0.625 * (tr_q + tf_q)) + 1 + int'($urandom_range(0, 800));
      vl   = -int'($urandom_range(0, 16000));
      vh   = vl + int'($urandom_range(1, 32767 - vl));
      tw = tw_q / 4.0; tr = tr_q / 4.0; tf = tf_q / 4.0;
      p = make_params(100000, tw_q, tr_q, tf_q, vh, vl);
      k_fall_end = p.k_fall_end;
      slope  = p.slope_f;
      v_low  = sample_t'(vl);
      v_high = sample_t'(vh);
      k2 = int'(tw + (tr - tf) / 1.6);
      k3 = int'(tw + (tr + tf) / 1.6) + 3;
      if (k2 < 0) k2 = 0;
      for (int kk = k2 + 1; kk <= k3; kk++) begin
        k = K_W'(kk);
        @(posedge clk);
        #0.1;
        expv = ideal_pulse(real'(kk), tw, tr, tf, real'(vh), real'(vl));
        checks++;
        if (absr(real'(value) - expv) > 1.0) begin
          failures++;
          if (failures < 10) $display("FAIL tf_q=%0d k=%0d got %0d exp %f", tf_q, kk, value, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
