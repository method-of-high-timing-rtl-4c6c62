// serial_divider: unsigned restoring divider, one quotient bit per clock.
//
// `start` latches numerator and denominator; NW clocks later `done` pulses for one
// clock with `quot` = floor(num/den) (all ones when den is 0). `busy` is high in between.
// Used by the parameter control to turn edge times into per-tick slopes.
module serial_divider #(
  parameter int NW = 40,
  parameter int DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quot
);

  logic [NW-1:0]        n_sh;
  logic [DW-1:0]        rem;
  logic [DW-1:0]        d_q;
  logic [$clog2(NW+1)-1:0] cnt;
  logic [DW:0]          trial;

  assign trial = {rem, n_sh[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_sh <= '0;
      rem  <= '0;
      d_q  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      quot <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        n_sh <= num;
        d_q  <= den;
        rem  <= '0;
        cnt  <= ($clog2(NW+1))'(NW);
        busy <= 1'b1;
      end else if (busy) begin
        n_sh <= n_sh << 1;
        if (trial >= {1'b0, d_q}) begin
          rem  <= DW'(trial - {1'b0, d_q});
          quot <= {quot[NW-2:0], 1'b1};
        end else begin
          rem  <= DW'(trial);
          quot <= {quot[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
