// tb_pulse_synth_top: end-to-end run of the pulse synthesiser at its default size.
//
// Everything is programmed through host packets. Steps:
//  1. 50 MHz pulse (200 virtual ticks of 100 ps), Tr = Tf = 2.5 ns, Tw = 10 ns. Checked:
//     every virtual sample against the ideal trapezoid (1 LSB); every fs sample against
//     a floating-point model of the filter driven by the virtual samples, 6 clocks later
//     (2 LSB); every DAC word against the fs samples (lane 0 oldest); fs samples every
//     8 clocks, DAC words every 64.
//  2. Width from the 1.25 GSa/s samples alone, by area: W = 0.8 ns * sum(s - V_L)/(V_H-V_L)
//     over one period. Sets 10.0/10.1/10.2/10.3 ns (with Tr = Tf = 2.5..2.8 ns), 5.0 ns at
//     100 MHz and 4.25 ns at 50 MHz must be measured within 20 ps, so steps of 100 ps
//     (one eighth of the DAC period) survive decimation. The 50%-crossing width by linear
//     interpolation between the 800 ps samples is reported too.
//  3. A refused parameter set and a malformed host header.
//  4. Playback mode: 25 words of host samples replayed cyclically.
//  5. Downsampling factor changed to 4: fs samples every 4 clocks.
//  6. Filter coefficients rewritten to a pass-through: fs samples equal virtual samples.
// Each mechanism is counted; one that never happened is a failure.
`timescale 1ns/1ps
module tb_pulse_synth_top;
  import pulse_pkg::*;
  import tb_ref_pkg::*;

  localparam int LANES = 8;
  logic clk = 0, rst_n = 0, host_valid = 0;
  logic [31:0] host_data;
  sample_t dac_word [LANES];
  logic dac_valid, playback, play_wrap, period_start, fs_valid, busy, param_error, bad_header;
  sample_t virt_sample, fs_sample;
  int checks = 0, failures = 0;

  pulse_synth_top dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s", msg);
    end
  endtask

  // ---------------- host side ----------------
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

  task automatic commit_wait();
    reg_write(REG_COMMIT, 1);
    repeat (2) @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  // ---------------- reference models ----------------
  real sx1 [FILT_SECTIONS], sx2 [FILT_SECTIONS], sy1 [FILT_SECTIONS], sy2 [FILT_SECTIONS];
  filt_coef_t mcoef;

  function automatic real filt_model(input real x);
    real v, y;
    v = x;
    for (int s = 0; s < FILT_SECTIONS; s++) begin
      y = coef_real(mcoef[s].b0) * v + coef_real(mcoef[s].b1) * sx1[s] + coef_real(mcoef[s].b2) * sx2[s]
        - coef_real(mcoef[s].a1) * sy1[s] - coef_real(mcoef[s].a2) * sy2[s];
      sx2[s] = sx1[s]; sx1[s] = v; sy2[s] = sy1[s]; sy1[s] = y;
      v = y;
    end
    return v;
  endfunction

  // current pulse set as seen at virt_sample
  int cur_period, cur_tw, cur_tr, cur_tf, cur_vh, cur_vl;
  int nxt_period, nxt_tw, nxt_tr, nxt_tf, nxt_vh, nxt_vl;
  bit armed;
  int load_cyc;
  bit pend_set, checking_virt, checking_fs, checking_dac;
  int pos, set_switches;

  // model output history indexed by virtual clock
  real model_hist [$];
  sample_t fs_hist [$];
  int cyc, last_fs_cyc, last_dac_cyc, fs_gap, dac_gap;
  int fs_delay;

  // counters of mechanisms
  int n_fs, n_words, n_play_words, n_play_wraps, n_refused, n_bad_hdr;

  always @(posedge clk) begin
    #0.2;
    cyc++;
    if (!rst_n) begin
      cyc = 0;
    end else begin
      // virtual samples
      if (dut.params_load && pend_set) begin
        armed = 1;
        load_cyc = cyc;
      end
      if (period_start) begin
        if (armed && cyc >= load_cyc + 4) begin
          armed = 0;
          cur_period = nxt_period; cur_tw = nxt_tw; cur_tr = nxt_tr; cur_tf = nxt_tf;
          cur_vh = nxt_vh; cur_vl = nxt_vl;
          pend_set = 0;
          set_switches++;
        end
        pos = 0;
      end
      if (checking_virt && pos >= 0) begin
        real e;
        e = ideal_pulse(real'(pos), cur_tw / 4.0, cur_tr / 4.0, cur_tf / 4.0,
                        real'(cur_vh), real'(cur_vl));
        checks++;
        if (absr(real'(virt_sample) - e) > 1.0) begin
          failures++;
          if (failures < 15) $display("FAIL virtual sample k=%0d got %0d exp %f", pos, virt_sample, e);
        end
      end
      if (pos >= 0) pos++;
      model_hist.push_back(filt_model(real'(virt_sample)));
      if (model_hist.size() > 64) void'(model_hist.pop_front());
      // fs samples
      if (fs_valid) begin
        n_fs++;
        fs_gap = cyc - last_fs_cyc;
        last_fs_cyc = cyc;
        if (checking_fs) begin
          real m;
          m = model_hist[model_hist.size() - 1 - fs_delay];
          checks++;
          if (absr(real'(fs_sample) - m) > 2.0) begin
            failures++;
            if (failures < 15) $display("FAIL fs sample got %0d model %f", fs_sample, m);
          end
        end
        fs_hist.push_back(fs_sample);
        if (fs_hist.size() > 64) void'(fs_hist.pop_front());
      end
      // DAC words
      if (dac_valid) begin
        dac_gap = cyc - last_dac_cyc;
        last_dac_cyc = cyc;
        if (playback) n_play_words++;
        else n_words++;
        if (play_wrap) n_play_wraps++;
        if (checking_dac && !playback) begin
          for (int l = 0; l < LANES; l++) begin
            checks++;
            // word completes with the newest fs sample, one clock before dac_valid
            if (dac_word[l] != fs_hist[fs_hist.size() - LANES + l]) begin
              failures++;
              if (failures < 15) $display("FAIL DAC lane %0d", l);
            end
          end
        end
      end
      if (bad_header) n_bad_hdr++;
    end
  end

  task automatic program_pulse(input int period, input int tw_q, input int tr_q, input int tf_q,
                               input int vh, input int vl);
    reg_write(REG_PERIOD, period);
    reg_write(REG_TW, tw_q);
    reg_write(REG_TR, tr_q);
    reg_write(REG_TF, tf_q);
    reg_write(REG_VHIGH, 32'(vh));
    reg_write(REG_VLOW, 32'(vl));
    nxt_period = period; nxt_tw = tw_q; nxt_tr = tr_q; nxt_tf = tf_q; nxt_vh = vh; nxt_vl = vl;
    pend_set = 1;
    commit_wait();
  endtask

  // wait for the new set to be in force, settle, then measure one period of fs samples
  task automatic measure(input int period_ticks, input real set_w_ns, input string name,
                         output real area_w);
    int n_per, reps;
    real acc, lvl, t_up, t_dn, lin_w;
    sample_t s [$];
    $display("measuring %s", name);
    while (pend_set) @(posedge clk);
    repeat (3 * period_ticks + 100) @(posedge clk);
    reps = (period_ticks % 8 == 0) ? 1 : (period_ticks % 4 == 0) ? 2 : (period_ticks % 2 == 0) ? 4 : 8;
    n_per = period_ticks * reps / 8;
    s.delete();
    while (s.size() < 2 * n_per) begin
      @(posedge clk);
      #0.3;
      if (fs_valid) s.push_back(fs_sample);
    end
    acc = 0.0;
    for (int i = 0; i < n_per; i++) acc += real'(s[i]) - real'(cur_vl);
    area_w = 0.8 * acc / real'(cur_vh - cur_vl) / real'(reps);
    // 50% crossings by linear interpolation, in a window that starts low
    lvl = (real'(cur_vh) + real'(cur_vl)) / 2.0;
    t_up = -1.0; t_dn = -1.0;
    begin
      int st;
      st = 0;
      while (st < n_per && real'(s[st]) > lvl) st++;
      for (int i = st; i < st + n_per && i + 1 < s.size(); i++) begin
        real a, b;
        a = real'(s[i]); b = real'(s[i + 1]);
        if (t_up < 0.0 && a < lvl && b >= lvl) t_up = 0.8 * (i + (lvl - a) / (b - a));
        else if (t_up >= 0.0 && t_dn < 0.0 && a >= lvl && b < lvl) t_dn = 0.8 * (i + (a - lvl) / (a - b));
      end
    end
    lin_w = t_dn - t_up;
    $display("%s: set width %.3f ns, area width %.4f ns, 50%% crossing width %.3f ns",
             name, set_w_ns, area_w, lin_w);
    check(absr(area_w - set_w_ns) < 0.02, $sformatf("%s area width %f", name, area_w));
    check(absr(lin_w - set_w_ns) < 0.3, $sformatf("%s crossing width %f", name, lin_w));
  endtask

  real w0, w1, w2, w3, w4, w5;

  initial begin
    host_data = 0;
    mcoef = BUTTER_DEFAULT;
    for (int s = 0; s < FILT_SECTIONS; s++) begin
      sx1[s] = 0; sx2[s] = 0; sy1[s] = 0; sy2[s] = 0;
    end
    pos = -1;
    set_switches = 0; n_fs = 0; n_words = 0; n_play_words = 0; n_play_wraps = 0;
    n_refused = 0; n_bad_hdr = 0;
    fs_delay = 6;
    checking_virt = 0; checking_fs = 0; checking_dac = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // 1. 50 MHz, 10 ns, 2.5/2.5 ns, run
    reg_write(REG_DECIM, 8);
    reg_write(REG_CTRL, 1);
    program_pulse(200, 400, 100, 100, 24000, 0);
    checking_virt = 1;
    checking_fs = 1;
    checking_dac = 1;
    measure(200, 10.0, "50 MHz Tw 10.0 Tr/Tf 2.5", w0);
    check(fs_gap == 8, "fs every 8 virtual samples");
    check(dac_gap == 64, "DAC word every 64 virtual samples");
    // 2. the 100 ps steps
    program_pulse(200, 404, 104, 104, 24000, 0);
    measure(200, 10.1, "50 MHz Tw 10.1 Tr/Tf 2.6", w1);
    program_pulse(200, 408, 108, 108, 24000, 0);
    measure(200, 10.2, "50 MHz Tw 10.2 Tr/Tf 2.7", w2);
    program_pulse(200, 412, 112, 112, 24000, 0);
    measure(200, 10.3, "50 MHz Tw 10.3 Tr/Tf 2.8", w3);
    check(absr((w1 - w0) - 0.1) < 0.01 && absr((w2 - w1) - 0.1) < 0.01 && absr((w3 - w2) - 0.1) < 0.01,
          "100 ps width steps");
    program_pulse(100, 200, 100, 100, 24000, 0);
    measure(100, 5.0, "100 MHz Tw 5.0 Tr/Tf 2.5", w4);
    program_pulse(200, 170, 100, 100, 24000, 0);
    measure(200, 4.25, "50 MHz Tw 4.25 Tr/Tf 2.5", w5);
    // 3. refused set and malformed header
    reg_write(REG_TW, 100);
    reg_write(REG_COMMIT, 1);
    repeat (5) @(negedge clk);
    check(param_error, "short width refused");
    if (param_error) n_refused++;
    reg_write(REG_TW, 170);
    host_word(32'hC000_0000);
    repeat (3) @(negedge clk);
    repeat (400) @(posedge clk);
    // 4. playback of 25 host words (200 samples, a ramp)
    checking_fs = 0;
    host_word({2'b01, 14'd200, 16'h8000});
    for (int i = 0; i < 200; i++) host_word(32'(i * 100 - 5000));
    reg_write(REG_PLAYLEN, 25);
    reg_write(REG_CTRL, 3);
    commit_wait();
    check(playback, "playback mode on");
    begin
      int row, got;
      row = -1;
      got = 0;
      while (got < 60) begin
        @(posedge clk);
        #0.3;
        if (dac_valid) begin
          if (play_wrap) row = 0;
          if (row >= 0) begin
            for (int l = 0; l < LANES; l++)
              check(dac_word[l] == sample_t'((row * LANES + l) * 100 - 5000), "playback word");
            row = (row + 1) % 25;
            got++;
          end
        end
      end
    end
    // 5. back to generation, N = 4
    reg_write(REG_CTRL, 1);
    reg_write(REG_DECIM, 4);
    commit_wait();
    check(!playback, "playback mode off");
    repeat (600) @(posedge clk);
    check(fs_gap == 4, "fs every 4 virtual samples after N change");
    check(dac_gap == 32, "DAC word every 32 virtual samples after N change");
    // 6. pass-through filter
    for (int s = 0; s < FILT_SECTIONS; s++) begin
      reg_write(REG_COEF + 16'(5 * s) + 0, 32'(1 << COEF_FRAC));
      reg_write(REG_COEF + 16'(5 * s) + 1, 0);
      reg_write(REG_COEF + 16'(5 * s) + 2, 0);
      reg_write(REG_COEF + 16'(5 * s) + 3, 0);
      reg_write(REG_COEF + 16'(5 * s) + 4, 0);
    end
    repeat (20) @(posedge clk);
    for (int s = 0; s < FILT_SECTIONS; s++) mcoef[s] = '{b0: coef_t'(1 << COEF_FRAC), default: '0};
    repeat (10) @(posedge clk);
    checking_fs = 1;
    repeat (400) @(posedge clk);
    // mechanism counts
    $display("mechanisms: set switches %0d, fs samples %0d, DAC words %0d, playback words %0d, playback wraps %0d, refused sets %0d, bad headers %0d",
             set_switches, n_fs, n_words, n_play_words, n_play_wraps, n_refused, n_bad_hdr);
    check(set_switches == 6, "parameter set switched at period start");
    check(n_fs > 0 && n_words > 0, "decimated samples and DAC words");
    check(n_play_words > 0 && n_play_wraps >= 2, "playback and its wrap");
    check(n_refused == 1, "refused set");
    check(n_bad_hdr == 1, "malformed header flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
