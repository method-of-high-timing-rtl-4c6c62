// tb_workload_sweeps: parameter sweeps of the measured pulses, on the full design at its
// default size, judged only from the 1.25 GSa/s samples that reach the DAC.
//  * Width 4.0 .. 4.9 ns in 100 ps steps at 50 MHz, Tr = Tf = 2.5 ns: the width by area,
//    0.8 ns * sum(s - V_L)/(V_H - V_L) over a period, must be within 10 ps of the set
//    value and each step within 100 +/- 5 ps.
//  * Rise time 2.5 .. 10.5 ns in 2 ns steps, then fall time likewise, at 10 MHz with a
//    50 ns width: the 10 %-90 % edge time, by linear interpolation between the 800 ps
//    samples, must grow by 2 ns +/- 0.2 ns per step and lie within 0.3 ns of the set
//    value (the 550 MHz filter adds about 0.1 ns to a 2.5 ns edge).
`timescale 1ns/1ps
module tb_workload_sweeps;
  import pulse_pkg::*;

  localparam int LANES = 8;
  localparam int VH = 24000;
  logic clk = 0, rst_n = 0, host_valid = 0;
  logic [31:0] host_data;
  sample_t dac_word [LANES];
  logic dac_valid, playback, play_wrap, period_start, fs_valid, busy, param_error, bad_header;
  sample_t virt_sample, fs_sample;
  int checks = 0, failures = 0;

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
    // new set starts at the next period; let the filter settle for two more
    repeat (3 * period + 50) @(posedge clk);
  endtask

  // two periods of DAC-rate samples, starting at a period boundary
  task automatic grab(input int period, ref real s [$]);
    s.delete();
    @(posedge clk);
    while (!period_start) @(posedge clk);
    while (s.size() < 2 * period / 8) begin
      @(posedge clk);
      #0.3;
      if (fs_valid) s.push_back(real'(fs_sample));
    end
  endtask

  function automatic real area_width(ref real s [$], input int n);
    real acc = 0.0;
    for (int i = 0; i < n; i++) acc += s[i];
    return 0.8 * acc / real'(VH);
  endfunction

  // time (ns) at which the samples first cross `lvl` in the given direction
  function automatic real crossing(ref real s [$], input real lvl, input bit up, input int from);
    for (int i = from; i + 1 < s.size(); i++) begin
      if (up && s[i] < lvl && s[i+1] >= lvl) return 0.8 * (i + (lvl - s[i]) / (s[i+1] - s[i]));
      if (!up && s[i] > lvl && s[i+1] <= lvl) return 0.8 * (i + (s[i] - lvl) / (s[i] - s[i+1]));
    end
    return -1.0;
  endfunction

  real s [$];
  real w, w_prev, e, e_prev, t10, t90, lo_start;
  int start;

  initial begin
    host_data = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    reg_write(REG_VHIGH, VH);
    reg_write(REG_VLOW, 0);
    reg_write(REG_DECIM, 8);
    reg_write(REG_CTRL, 1);
    // width sweep
    w_prev = 0.0;
    for (int i = 0; i < 10; i++) begin
      set_pulse(200, 160 + 4 * i, 100, 100);
      grab(200, s);
      w = area_width(s, 25);
      $display("width set %.1f ns measured %.4f ns", 4.0 + 0.1 * i, w);
      check(w > 4.0 + 0.1 * i - 0.01 && w < 4.0 + 0.1 * i + 0.01, "width value");
      if (i > 0) check(w - w_prev > 0.095 && w - w_prev < 0.105, "width step");
      w_prev = w;
    end
    // rise-time sweep, then fall-time sweep, 10 MHz, 50 ns width
    for (int which = 0; which < 2; which++) begin
      e_prev = 0.0;
      for (int i = 0; i < 5; i++) begin
        int t_q;
        t_q = 4 * (25 + 20 * i);
        if (which == 0) set_pulse(1000, 2000, t_q, 100);
        else           set_pulse(1000, 2000, 100, t_q);
        grab(1000, s);
        // start from a low sample
        start = 0;
        while (s[start] > 0.05 * VH) start++;
        if (which == 0) begin
          t10 = crossing(s, 0.1 * VH, 1, start);
          t90 = crossing(s, 0.9 * VH, 1, start);
          e = t90 - t10;
        end else begin
          start += int'(40.0 / 0.8);  // past the rising edge, into the high level
          t90 = crossing(s, 0.9 * VH, 0, start);
          t10 = crossing(s, 0.1 * VH, 0, start);
          e = t10 - t90;
        end
        $display("%s time set %.1f ns measured %.3f ns", which ? "fall" : "rise", t_q / 40.0, e);
        check(e > t_q / 40.0 - 0.3 && e < t_q / 40.0 + 0.3, "edge time value");
        if (i > 0) check(e - e_prev > 1.8 && e - e_prev < 2.2, "edge time step");
        e_prev = e;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
