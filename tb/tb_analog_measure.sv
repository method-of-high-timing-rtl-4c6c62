// tb_analog_measure: the pulse settings of the hardware measurements, judged on a continuous
// waveform rebuilt from the DAC samples, the way an oscilloscope would judge them.
//
// The DAC words of the full design (default size) are collected and turned into a waveform
// on a 12.5 ps grid in two ways:
//  - shape-preserving piecewise cubic Hermite interpolation (Fritsch-Carlson slopes) through
//    the 800 ps samples, as a stand-in for the smooth output of converter and filter;
//  - a model of the analogue stage: each sample held for 800 ps (zero-order hold), then a
//    2nd-order Butterworth low-pass with a 600 MHz corner (bilinear transform on the grid).
// On each, the 50 %-50 % width and the 10 %-90 % rise and fall times are measured.
// Sets: 50 MHz with Tr = Tf = 2.5 / 2.6 ns and Tw = 10.0 / 10.1 ns, 100 MHz with
// Tw = 5.0 / 5.1 ns; and the narrow 4.0 ns pulse with 2.5 ns edges at 1 MHz and 10 MHz, where
// a long period must not change the edges. Interpolated: width within 60 ps, edges within 0.1 ns, each 100 ps
// step 100 +/- 30 ps. Hold + low-pass (images of the hold are only partly removed, which moves
// the 50 % points by a few tens of ps): width within 100 ps, edges within 0.35 ns, step
// 100 +/- 60 ps. Both reconstruction models are choices of this test, not part of the design.
`timescale 1ns/1ps
module tb_analog_measure;
  import pulse_pkg::*;

  localparam int LANES = 8;
  localparam int VH = 24000;
  localparam int OS = 64;   // fine steps per DAC sample
  logic clk = 0, rst_n = 0, host_valid = 0;
  logic [31:0] host_data;
  sample_t dac_word [LANES];
  logic dac_valid, playback, play_wrap, period_start, fs_valid, busy, param_error, bad_header;
  sample_t virt_sample, fs_sample;
  int checks = 0, failures = 0;
  int old_period = 0;

  pulse_synth_top dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic host_word(input logic [31:0] w);
    @(negedge clk);
    host_valid = 1;
    host_data = w;
    @(negedge clk);
    host_valid = 0;
  endtask

  task automatic reg_write(input logic [15:0] a, input logic [31:0] d);
    host_word({2'b01, 14'd1, a});
    host_word(d);
  endtask

  task automatic set_pulse(input int period, input int tw_q, input int tr_q, input int tf_q);
    reg_write(REG_PERIOD, period);
    reg_write(REG_TW, tw_q);
    reg_write(REG_TR, tr_q);
    reg_write(REG_TF, tf_q);
    reg_write(REG_COMMIT, 1);
    repeat (2) @(negedge clk);
    while (busy) @(negedge clk);
    // the new set starts at the next wrap of the old period
    repeat (old_period + 2 * period + 50) @(posedge clk);
    old_period = period;
  endtask

  // DAC samples of `n_words` words, in time order
  task automatic grab_words(input int n_words, ref real s [$]);
    s.delete();
    while (s.size() < n_words * LANES) begin
      @(posedge clk);
      #0.3;
      if (dac_valid) for (int l = 0; l < LANES; l++) s.push_back(real'(dac_word[l]));
    end
  endtask

  // zero-order hold and 2nd-order Butterworth low-pass at fc, on a grid of 0.8/OS ns
  task automatic analogue(ref real s [$], ref real v [$], input real fc_ghz);
    real kk, nrm, b0, b1, b2, a1, a2, x1, x2, y1, y2, x, y;
    kk  = $tan(3.14159265358979 * fc_ghz * 0.8 / OS);
    nrm = 1.0 / (1.0 + 1.41421356 * kk + kk * kk);
    b0 = kk * kk * nrm; b1 = 2.0 * b0; b2 = b0;
    a1 = 2.0 * (kk * kk - 1.0) * nrm;
    a2 = (1.0 - 1.41421356 * kk + kk * kk) * nrm;
    x1 = s[0]; x2 = s[0]; y1 = s[0]; y2 = s[0];
    v.delete();
    for (int i = 0; i < s.size(); i++)
      for (int j = 0; j < OS; j++) begin
        x = s[i];
        y = b0 * x + b1 * x1 + b2 * x2 - a1 * y1 - a2 * y2;
        x2 = x1; x1 = x; y2 = y1; y1 = y;
        v.push_back(y);
      end
  endtask

  // shape-preserving piecewise cubic Hermite interpolation of the DAC samples, same grid
  task automatic pchip(ref real s [$], ref real v [$]);
    real h = 0.8, d [$], m [$], y, u;
    for (int i = 0; i + 1 < s.size(); i++) d.push_back((s[i+1] - s[i]) / h);
    m.push_back(0.0);
    for (int i = 1; i + 1 < s.size(); i++)
      m.push_back(d[i-1] * d[i] <= 0.0 ? 0.0 : 2.0 / (1.0 / d[i-1] + 1.0 / d[i]));
    m.push_back(0.0);
    v.delete();
    for (int i = 0; i + 1 < s.size(); i++)
      for (int j = 0; j < OS; j++) begin
        u = real'(j) / OS;
        y = (2*u*u*u - 3*u*u + 1) * s[i] + (u*u*u - 2*u*u + u) * h * m[i]
          + (-2*u*u*u + 3*u*u) * s[i+1] + (u*u*u - u*u) * h * m[i+1];
        v.push_back(y);
      end
  endtask

  function automatic real level_time(ref real v [$], input real lvl, input bit up, input int from);
    real dt = 0.8 / OS;
    for (int i = from; i + 1 < v.size(); i++) begin
      if (up && v[i] < lvl && v[i+1] >= lvl) return dt * (i + (lvl - v[i]) / (v[i+1] - v[i]));
      if (!up && v[i] > lvl && v[i+1] <= lvl) return dt * (i + (v[i] - lvl) / (v[i] - v[i+1]));
    end
    return -1.0;
  endfunction

  real s [$], v [$];
  real w, tr_m, tf_m;
  real w_prev [2];

  // 50 % width and 10-90 % edge times, averaged over every whole pulse after 20 samples
  // (at 100 MHz the pulses alternate between two positions on the DAC grid)
  task automatic measure(ref real v [$], output real wid, output real rise, output real fall);
    int from = 20 * OS, top, n = 0;
    real t50u, t50d, t10u, t90u;
    wid = 0.0; rise = 0.0; fall = 0.0;
    forever begin
      while (from < v.size() && v[from] > 0.05 * VH) from++;
      t10u = level_time(v, 0.1 * VH, 1, from);
      t50u = level_time(v, 0.5 * VH, 1, from);
      t90u = level_time(v, 0.9 * VH, 1, from);
      if (t90u < 0.0) break;
      top  = int'(t90u / (0.8 / OS));
      t50d = level_time(v, 0.5 * VH, 0, top);
      if (t50d < 0.0 || level_time(v, 0.1 * VH, 0, top) < 0.0) break;
      wid  += t50d - t50u;
      rise += t90u - t10u;
      fall += level_time(v, 0.1 * VH, 0, top) - level_time(v, 0.9 * VH, 0, top);
      n++;
      from = int'(level_time(v, 0.1 * VH, 0, top) / (0.8 / OS)) + 1;
    end
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL no whole pulse in the capture");
      n = 1;
    end
    wid /= n; rise /= n; fall /= n;
  endtask

  task automatic judge(input string how, input int c, input real tol_w, input real tol_e,
                       input real tol_step, input int slot);
    $display("%s: %0d MHz, set Tr=Tf %.2f ns Tw %.2f ns: rise %.3f fall %.3f width %.3f ns",
             how, 10000 / periods[c], trs[c] / 40.0, tws[c] / 40.0, tr_m, tf_m, w);
    check(w > tws[c] / 40.0 - tol_w && w < tws[c] / 40.0 + tol_w, {how, " width"});
    check(tr_m > trs[c] / 40.0 - tol_e && tr_m < trs[c] / 40.0 + tol_e, {how, " rise time"});
    check(tf_m > trs[c] / 40.0 - tol_e && tf_m < trs[c] / 40.0 + tol_e, {how, " fall time"});
    if (c % 2 == 1 && c < 4)
      check(w - w_prev[slot] > 0.1 - tol_step && w - w_prev[slot] < 0.1 + tol_step,
            {how, " 100 ps width step"});
    w_prev[slot] = w;
  endtask

  int periods [6] = '{200, 200, 100, 100, 10000, 1000};
  int tws [6]     = '{400, 404, 200, 204, 160, 160};
  int trs [6]     = '{100, 104, 100, 104, 100, 100};

  initial begin
    host_data = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    reg_write(REG_VHIGH, VH);
    reg_write(REG_VLOW, 0);
    reg_write(REG_CTRL, 1);
    for (int c = 0; c < 6; c++) begin
      set_pulse(periods[c], tws[c], trs[c], trs[c]);
      grab_words(periods[c] / 64 + 12, s);   // at least one period and 96 samples
      pchip(s, v);
      measure(v, w, tr_m, tf_m);
      judge("interpolated", c, 0.06, 0.1, 0.03, 0);
      analogue(s, v, 0.6);
      measure(v, w, tr_m, tf_m);
      judge("hold + low-pass", c, 0.1, 0.35, 0.06, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
