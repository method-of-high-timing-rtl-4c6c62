// tb_pulse_control: checks the phase accumulator and region selection.
// A 200-tick period with Tw = 10 ns, Tr = Tf = 2.5 ns (ticks of 100 ps) runs for three
// periods; every tick K must count 0..period-1 and the source must match the region of
// the ideal trapezoid at t = K. A second set (100-tick period, 5 ns width) is loaded in
// mid-period and must take over exactly at the next wrap, not before.
`timescale 1ns/1ps
module tb_pulse_control;
  import pulse_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, run = 0, load = 0;
  pulse_params_t pend;
  logic [K_W-1:0] k;
  src_e src;
  pulse_params_t act;
  logic wrap;
  int checks = 0, failures = 0;

  pulse_control dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic src_e ref_src(input int kk, input real tw, input real tr, input real tf);
    real t = real'(kk);
    if (t < tr / 0.8) return SRC_RISE;
    if (t < tw + (tr - tf) / 1.6) return SRC_HIGH;
    if (t < tw + (tr + tf) / 1.6) return SRC_FALL;
    return SRC_LOW;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s (k=%0d src=%0d)", msg, k, src);
    end
  endtask

  int exp_k;
  int wraps;
  real tw, tr, tf;
  int period;

  initial begin
    pend = make_params(200, 400, 100, 100, 20000, 0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;
    @(negedge clk);
    check(act.period == 200, "set taken while stopped");
    check(k == 0 && src == SRC_LOW, "idle at K=0, low level");
    run = 1;
    tw = 100.0; tr = 25.0; tf = 25.0; period = 200;
    exp_k = 0;
    wraps = 0;
    @(negedge clk);
    for (int i = 0; i < 3 * 200 + 50; i++) begin
      check(int'(k) == exp_k, "K count");
      check(src == ref_src(exp_k, tw, tr, tf), "region");
      check(wrap == (exp_k == 0), "wrap flag");
      if (exp_k == 0) wraps++;
      if (i == 3 * 200 + 20) begin
        // load a new set mid-period: period 100, Tw 5 ns
        pend = make_params(100, 200, 100, 100, 20000, 0);
        load = 1;
      end else load = 0;
      exp_k = (exp_k + 1) % period;
      if (i == 3 * 200 + 21) check(act.period == 200, "no change before wrap");
      @(negedge clk);
    end
    // old set runs to its end, then the new set
    for (int i = 0; i < 400; i++) begin
      check(int'(k) == exp_k, "K count after update");
      check(src == ref_src(exp_k, tw, tr, tf), "region after update");
      check(act.period == K_W'(period), "set in use");
      if (exp_k == 0) wraps++;
      exp_k = (exp_k + 1) % period;
      if (exp_k == 0) begin
        period = 100; tw = 50.0;
      end
      @(negedge clk);
    end
    check(wraps == 4 + 3, "period starts seen");
    run = 0;
    @(negedge clk);
    check(k == 0 && src == SRC_LOW, "stop returns to K=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
