// local_interface: turns the host's word stream into local-bus register writes.
//
// The host link delivers 32-bit words. Words come in packets: a header
//   [31:30] opcode, 2'b01 = write    [29:16] count of data words    [15:0] first address
// followed by `count` data words, written to first address, first address + 1, and so
// on. A header with another opcode is dropped and flagged on `bad_header`; a header
// with count 0 writes nothing. Every data word becomes one local-bus write, so the
// interface never has to stall the host and has no ready signal. The packet format is
// this design's choice; the role (receive parameters and waveform data, decode them into
// local-bus form, pass them to the parameter control) follows the method.
//
// Timing: the local-bus write for a data word is registered, one clock after the word.
module local_interface
  import pulse_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 host_valid,
  input  logic [31:0]          host_data,
  output lbus_wr_t             lbus,
  output logic                 bad_header
);

  localparam logic [1:0] OP_WRITE = 2'b01;

  typedef enum logic {ST_HEADER, ST_DATA} state_e;

  state_e               state;
  logic [13:0]          remaining;
  logic [LB_ADDR_W-1:0] addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_HEADER;
      remaining  <= '0;
      addr       <= '0;
      lbus       <= '0;
      bad_header <= 1'b0;
    end else begin
      lbus.we    <= 1'b0;
      bad_header <= 1'b0;
      if (host_valid) begin
        unique case (state)
          ST_HEADER: begin
            if (host_data[31:30] != OP_WRITE) begin
              bad_header <= 1'b1;
            end else if (host_data[29:16] != '0) begin
              remaining <= host_data[29:16];
              addr      <= host_data[15:0];
              state     <= ST_DATA;
            end
          end
          ST_DATA: begin
            lbus.we   <= 1'b1;
            lbus.addr <= addr;
            lbus.data <= host_data;
            addr      <= addr + 1'b1;
            remaining <= remaining - 1'b1;
            if (remaining == 14'd1) state <= ST_HEADER;
          end
        endcase
      end
    end
  end

endmodule
