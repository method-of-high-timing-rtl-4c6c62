// tb_local_interface: packets of random length and address must turn into exactly the
// local-bus writes they describe, in order, addresses counting up from the header's;
// headers with a wrong opcode must be flagged and produce no write; idle gaps between
// words (host_valid low) must not matter.
`timescale 1ns/1ps
module tb_local_interface;
  import pulse_pkg::*;

  logic clk = 0, rst_n = 0, host_valid = 0;
  logic [31:0] host_data;
  lbus_wr_t lbus;
  logic bad_header;
  int checks = 0, failures = 0;

  local_interface dut (.*);

  always #0.5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] exp_addr [$];
  logic [31:0] exp_data [$];
  int bad_seen, bad_sent;

  always @(posedge clk) begin
    #0.1;
    if (lbus.we) begin
      checks++;
      if (exp_addr.size() == 0) begin
        failures++;
        $display("FAIL unexpected write");
      end else begin
        if (lbus.addr != exp_addr.pop_front() || lbus.data != exp_data.pop_front()) begin
          failures++;
          if (failures < 10) $display("FAIL write %h %h", lbus.addr, lbus.data);
        end
      end
    end
    if (bad_header) bad_seen++;
  end

  task automatic word(input logic [31:0] w);
    @(negedge clk);
    host_valid = 1;
    host_data = w;
    @(negedge clk);
    host_valid = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    int cnt;
    logic [15:0] a;
    logic [31:0] d;
    bad_seen = 0;
    bad_sent = 0;
    host_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 60; p++) begin
      if (p % 7 == 3) begin
        word({2'b10, 14'd3, 16'h1234});
        bad_sent++;
        continue;
      end
      cnt = int'($urandom_range(1, 12));
      a = 16'($urandom);
      word({2'b01, 14'(cnt), a});
      for (int i = 0; i < cnt; i++) begin
        d = $urandom;
        exp_addr.push_back(a + 16'(i));
        exp_data.push_back(d);
        word(d);
      end
    end
    // a packet with count 0 writes nothing
    word({2'b01, 14'd0, 16'h0005});
    repeat (5) @(posedge clk);
    checks++;
    if (exp_addr.size() != 0) begin
      failures++;
      $display("FAIL %0d writes missing", exp_addr.size());
    end
    checks++;
    if (bad_seen != bad_sent) begin
      failures++;
      $display("FAIL bad headers %0d of %0d", bad_seen, bad_sent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
