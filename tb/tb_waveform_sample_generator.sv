// tb_waveform_sample_generator: original waveform samples against the ideal pulse.
// Runs the parameter sets of the simulated and measured pulses in turn: 50 MHz
// (200 ticks of 100 ps) with Tr/Tf/Tw of 2.5/2.5/10, 2.6/2.6/10.1, 2.7/2.7/10.2 and
// 2.8/2.8/10.3 ns, 100 MHz with 2.5/2.5/5 ns, and 50 MHz with a 4.25 ns width. Each set
// is loaded in mid-period; every sample of every whole period must be within 1 LSB of
// the trapezoid of the set in force, the switch must happen at a period start, and each
// period must hold exactly its number of samples.
`timescale 1ns/1ps
module tb_waveform_sample_generator;
  import pulse_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, run = 0, load = 0;
  pulse_params_t pend;
  sample_t sample;
  logic sample_wrap;
  int checks = 0, failures = 0;

  waveform_sample_generator dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NSETS = 6;
  int set_period [NSETS] = '{200, 200, 200, 200, 100, 200};
  int set_tw     [NSETS] = '{400, 404, 408, 412, 200, 170};
  int set_tr     [NSETS] = '{100, 104, 108, 112, 100, 100};
  int set_tf     [NSETS] = '{100, 104, 108, 112, 100, 100};
  localparam int VH = 26000;
  localparam int VL = -1000;

  int cur, nxt, pos, periods_done;
  bit pending, started;
  real expv;

  initial begin
    pend = make_params(set_period[0], set_tw[0], set_tr[0], set_tf[0], VH, VL);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;
    run = 1;
    cur = 0; nxt = 0; pending = 0; started = 0; pos = 0; periods_done = 0;
    while (cur < NSETS - 1 || periods_done < 2) begin
      @(posedge clk);
      #0.1;
      if (sample_wrap) begin
        if (started) begin
          checks++;
          if (pos != set_period[cur]) begin
            failures++;
            $display("FAIL period of set %0d held %0d samples", cur, pos);
          end
        end
        if (pending) begin
          cur = nxt; pending = 0; periods_done = 0;
        end else if (started) periods_done++;
        started = 1;
        pos = 0;
      end
      if (started) begin
        expv = ideal_pulse(real'(pos), set_tw[cur] / 4.0, set_tr[cur] / 4.0,
                           set_tf[cur] / 4.0, real'(VH), real'(VL));
        checks++;
        if (absr(real'(sample) - expv) > 1.0) begin
          failures++;
          if (failures < 10) $display("FAIL set %0d k=%0d got %0d exp %f", cur, pos, sample, expv);
        end
        pos++;
      end
      // after two whole periods of a set, load the next one in mid-period
      if (started && !pending && periods_done == 2 && pos == 50 && cur < NSETS - 1) begin
        nxt = cur + 1;
        pend = make_params(set_period[nxt], set_tw[nxt], set_tr[nxt], set_tf[nxt], VH, VL);
        load = 1;
        pending = 1;
      end else load = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
