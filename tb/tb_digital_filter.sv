// tb_digital_filter: the Butterworth cascade against a floating-point model and against
// its intended response.
//  1. A random pulse train (random levels held for random lengths) is filtered by the
//     RTL and by the same four sections in real arithmetic (using the RTL's quantised
//     default coefficients); outputs must agree within 2 LSB, with the RTL 5 clocks
//     behind its input.
//  2. A step settles to its final value within 2 LSB and overshoots (Butterworth of
//     order > 2), and stays within the 16-bit range.
//  3. Tones: 100 MHz passes within 0.5 dB; 2 GHz is attenuated by more than 60 dB
//     (virtual rate 10 GSa/s, one clock per sample).
`timescale 1ns/1ps
module tb_digital_filter;
  import pulse_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  filt_coef_t coef;
  sample_t din, dout;
  int checks = 0, failures = 0;

  digital_filter dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real sx1 [FILT_SECTIONS], sx2 [FILT_SECTIONS], sy1 [FILT_SECTIONS], sy2 [FILT_SECTIONS];
  real hist [$];

  function automatic real model_step(input real x);
    real v, y;
    v = x;
    for (int s = 0; s < FILT_SECTIONS; s++) begin
      y = coef_real(coef[s].b0) * v + coef_real(coef[s].b1) * sx1[s] + coef_real(coef[s].b2) * sx2[s]
        - coef_real(coef[s].a1) * sy1[s] - coef_real(coef[s].a2) * sy2[s];
      sx2[s] = sx1[s]; sx1[s] = v; sy2[s] = sy1[s]; sy1[s] = y;
      v = y;
    end
    return v;
  endfunction

  task automatic reset_model();
    for (int s = 0; s < FILT_SECTIONS; s++) begin
      sx1[s] = 0; sx2[s] = 0; sy1[s] = 0; sy2[s] = 0;
    end
    hist.delete();
  endtask

  // present x for one clock; returns the output seen after that clock
  task automatic push(input int x);
    @(negedge clk);
    din = sample_t'(x);
    @(posedge clk);
    #0.1;
  endtask

  real ref_out, peak, lo, hi, step_max;
  int level, hold;

  initial begin
    coef = BUTTER_DEFAULT;
    din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    en = 1;
    // 1. random pulse train against the model
    reset_model();
    level = 0; hold = 0;
    for (int i = 0; i < 4000; i++) begin
      if (hold == 0) begin
        level = int'($urandom_range(0, 40000)) - 20000;
        hold  = int'($urandom_range(5, 120));
      end
      hold--;
      push(level);
      hist.push_back(model_step(real'(level)));
      if (hist.size() > 4) begin
        ref_out = hist.pop_front();
        checks++;
        if (absr(real'(dout) - ref_out) > 2.0) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d got %0d model %f", i, dout, ref_out);
        end
      end
    end
    // 2. step response: hold 0 then 25000
    for (int i = 0; i < 600; i++) push(0);
    step_max = -1.0e9;
    for (int i = 0; i < 600; i++) begin
      push(25000);
      if (real'(dout) > step_max) step_max = real'(dout);
    end
    checks++;
    if (absr(real'(dout) - 25000.0) > 2.0) begin
      failures++; $display("FAIL step settles at %0d", dout);
    end
    checks++;
    if (step_max < 25500.0) begin
      failures++; $display("FAIL no overshoot, max %f", step_max);
    end
    // 3a. 100 MHz tone: 100 samples per cycle
    lo = 1.0e9; hi = -1.0e9;
    for (int i = 0; i < 3000; i++) begin
      push(int'(20000.0 * $sin(2.0 * 3.14159265358979 * i / 100.0)));
      if (i >= 2000) begin
        if (real'(dout) > hi) hi = real'(dout);
        if (real'(dout) < lo) lo = real'(dout);
      end
    end
    peak = (hi - lo) / 2.0;
    checks++;
    if (peak < 20000.0 * 0.944 || peak > 20000.0 * 1.06) begin
      failures++; $display("FAIL 100 MHz amplitude %f", peak);
    end
    // 3b. 2 GHz tone: 5 samples per cycle
    lo = 1.0e9; hi = -1.0e9;
    for (int i = 0; i < 2000; i++) begin
      push(int'(20000.0 * $sin(2.0 * 3.14159265358979 * i / 5.0)));
      if (i >= 1000) begin
        if (real'(dout) > hi) hi = real'(dout);
        if (real'(dout) < lo) lo = real'(dout);
      end
    end
    peak = (hi - lo) / 2.0;
    checks++;
    if (peak > 20.0) begin
      failures++; $display("FAIL 2 GHz amplitude %f", peak);
    end
    $display("step max %f, 2 GHz residue %f", step_max, peak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
