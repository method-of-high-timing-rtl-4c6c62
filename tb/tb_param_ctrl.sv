// tb_param_ctrl: register writes, commit and derived values.
//  * Good sets (the simulated/measured pulses and random ones): after REG_COMMIT the
//    unit must send one `params_load` whose thresholds equal 1.25*Tr, Tw+0.625*(Tr-Tf)
//    and Tw+0.625*(Tr+Tf) (in 1/32 tick) and whose slopes are within 1 of
//    (0.8/T)*(V_H-V_L)*2^16, all worked out here in real arithmetic; run, mode and N
//    must change only then; the whole commit must take no more than 2*SLOPE_W+6 clocks.
//  * Bad sets (width too short for the edges, pulse longer than the period, V_H < V_L)
//    must raise `param_error` and send nothing.
//  * Filter coefficient writes take effect at once; waveform writes pass through; `sync`
//    pulses when N changes.
`timescale 1ns/1ps
module tb_param_ctrl;
  import pulse_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  lbus_wr_t lbus;
  pulse_params_t params;
  logic params_load, run, playback, sync, wave_we, busy, param_error;
  logic [DECIM_W-1:0] decim_n;
  logic [10:0] play_len;
  filt_coef_t coef;
  logic [12:0] wave_index;
  sample_t wave_data;
  int checks = 0, failures = 0;

  param_ctrl dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s", msg);
    end
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    lbus.we = 1; lbus.addr = a; lbus.data = d;
    @(negedge clk);
    lbus = '0;
  endtask

  int loads, syncs;
  always @(posedge clk) begin
    if (params_load) loads++;
    if (sync) syncs++;
  end

  // returns clocks taken, -1 if no load within the limit
  task automatic commit(output int clocks);
    wr(REG_COMMIT, 1);
    clocks = -1;
    for (int i = 1; i < 200; i++) begin
      @(posedge clk);
      #0.1;
      if (params_load) begin
        clocks = i;
        break;
      end
      if (!busy) break;
    end
  endtask

  task automatic good_set(input int period, input int tw_q, input int tr_q, input int tf_q,
                          input int vh, input int vl, input int n, input int ctrl);
    int clocks;
    real tw, tr, tf;
    logic [SLOPE_W-1:0] sr, sf;
    tw = tw_q / 4.0; tr = tr_q / 4.0; tf = tf_q / 4.0;
    wr(REG_PERIOD, period); wr(REG_TW, tw_q); wr(REG_TR, tr_q); wr(REG_TF, tf_q);
    wr(REG_VHIGH, 32'(vh)); wr(REG_VLOW, 32'(vl)); wr(REG_DECIM, n); wr(REG_CTRL, ctrl);
    
    commit(clocks);
    check(clocks > 0 && clocks <= 2 * SLOPE_W + 6, $sformatf("commit took %0d clocks", clocks));
    check(!param_error, "no error on good set");
    check(params.period == K_W'(period), "period");
    check(params.k_rise_end == THR_W'(longint'(tr / 0.8 * 32.0)), "K1");
    check(params.k_fall_start == THR_W'(longint'((tw + (tr - tf) / 1.6) * 32.0)), "K2");
    check(params.k_fall_end == THR_W'(longint'((tw + (tr + tf) / 1.6) * 32.0)), "K3");
    sr = ref_slope(real'(vh - vl), tr);
    sf = ref_slope(real'(vh - vl), tf);
    check(absr(real'(params.slope_r) - real'(sr)) <= 1.0, $sformatf("slope_r %0d vs %0d", params.slope_r, sr));
    check(absr(real'(params.slope_f) - real'(sf)) <= 1.0, $sformatf("slope_f %0d vs %0d", params.slope_f, sf));
    check(params.v_high == sample_t'(vh) && params.v_low == sample_t'(vl), "levels");
    @(posedge clk); #0.1;
    check(run == ctrl[0] && playback == ctrl[1] && decim_n == DECIM_W'(n), "controls applied");
  endtask

  task automatic bad_set(input int period, input int tw_q, input int tr_q, input int tf_q,
                         input int vh, input int vl);
    int clocks;
    pulse_params_t prev_set;
    prev_set = params;
    wr(REG_PERIOD, period); wr(REG_TW, tw_q); wr(REG_TR, tr_q); wr(REG_TF, tf_q);
    wr(REG_VHIGH, 32'(vh)); wr(REG_VLOW, 32'(vl));
    commit(clocks);
    repeat (2) @(posedge clk);
    #0.1;
    check(clocks < 0, "bad set refused");
    check(param_error, "param_error raised");
    check(params == prev_set, "old set kept");
  endtask

  initial begin
    int s0;
    int tw_q, tr_q, tf_q, vh, vl, period;
    lbus = '0;
    loads = 0; syncs = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #0.1;
    check(coef == BUTTER_DEFAULT, "filter defaults after reset");
    check(decim_n == 8 && !run, "reset controls");
    good_set(200, 400, 100, 100, 26000, 0, 8, 1);
    good_set(200, 404, 104, 104, 26000, 0, 8, 1);
    good_set(200, 412, 112, 112, 26000, 0, 8, 1);
    good_set(100, 200, 100, 100, 26000, -1000, 8, 1);
    good_set(200, 170, 100, 100, 20000, 0, 8, 3);
    good_set(400, 400, 0, 100, 20000, 0, 8, 1);   // zero rise time
    for (int i = 0; i < 40; i++) begin
      tr_q = int'($urandom_range(1, 2000));
      tf_q = int'($urandom_range(1, 2000));
      tw_q = int'(0.625 * (tr_q + tf_q)) + 1 + int'($urandom_range(0, 2000));
      period = (tw_q + tr_q + tf_q) / 2 + int'($urandom_range(1, 500));
      vl = -int'($urandom_range(0, 30000));
      vh = vl + int'($urandom_range(0, 32767 - vl));
      good_set(period, tw_q, tr_q, tf_q, vh, vl, 8, 1);
    end
    bad_set(200, 100, 100, 100, 20000, 0);   // width shorter than 0.625*(Tr+Tf)
    bad_set(50, 400, 100, 100, 20000, 0);    // pulse longer than the period
    bad_set(200, 400, 100, 100, 0, 100);     // V_H below V_L
    good_set(200, 400, 100, 100, 26000, 0, 8, 1);
    // sync on a change of N
    s0 = syncs;
    good_set(200, 400, 100, 100, 26000, 0, 4, 1);
    check(syncs == s0 + 1, "sync on N change");
    // coefficient and waveform writes
    wr(REG_COEF + 16'd8, 32'h0123456);
    @(posedge clk); #0.1;
    check(coef[1].a1 == coef_t'(32'h0123456), "coefficient write");
    wr(16'h8000 | 16'd1234, 32'h0000beef);
    check(wave_we == 1, "waveform write strobe");
    check(wave_index == 13'd1234 && wave_data == sample_t'(16'hbeef), "waveform write");
    @(posedge clk); #0.1;
    check(wave_we == 0, "waveform write strobe is one clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
