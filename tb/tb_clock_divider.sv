// tb_clock_divider: the fs strobe must come exactly once every N clocks for N = 8 (the
// method's factor), 1, 2, 3, 5 and 16; `sync` must restart the count so the next strobe
// is N clocks later; no strobe while disabled.
`timescale 1ns/1ps
module tb_clock_divider;
  import pulse_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, sync = 0;
  logic [DECIM_W-1:0] n;
  logic fs_en;
  int checks = 0, failures = 0;

  clock_divider dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  int ns [6] = '{8, 1, 2, 3, 5, 16};
  int last, cnt;

  initial begin
    n = 8;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < 6; j++) begin
      @(negedge clk);
      n = DECIM_W'(ns[j]);
      en = 1;
      sync = 1;
      @(negedge clk);
      sync = 0;
      last = 0;
      cnt = 0;
      for (int i = 1; i <= 20 * ns[j]; i++) begin
        @(posedge clk);
        #0.1;
        if (fs_en) begin
          check(i - last == ns[j], $sformatf("N=%0d strobe spacing %0d", ns[j], i - last));
          last = i;
          cnt++;
        end
      end
      check(cnt == 20, $sformatf("N=%0d strobe count %0d", ns[j], cnt));
    end
    @(negedge clk);
    en = 0;
    cnt = 0;
    for (int i = 0; i < 50; i++) begin
      @(posedge clk);
      #0.1;
      if (fs_en) cnt++;
    end
    check(cnt == 0, "strobe while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
