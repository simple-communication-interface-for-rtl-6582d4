// TX_UART: asynchronous serial transmitter, 1 start bit, 8 data bits (LSB
// first), 1 stop bit, no parity, as the link format requires (115200 bit/s).
//
// A byte is accepted when tx_valid and tx_ready are both high on a clock
// edge; tx_ready is high only while the transmitter is idle. The start bit,
// the eight data bits and the stop bit then each hold the line for
// CLKS_PER_BIT clocks. The line idles high.
// Timing: one byte takes 10 * CLKS_PER_BIT clocks; tx_ready returns on the
// clock after the stop bit ends, so back-to-back bytes need 10 * CLKS_PER_BIT
// + 1 clocks each. The divider (default 50 MHz / 115200 = 434) and the
// valid/ready handshake are choices of this design.
`timescale 1ns/1ps
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_ready,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic          busy;
  logic [CW-1:0] cnt;
  logic [3:0]    bit_idx;   // 0 start, 1..8 data, 9 stop
  logic [9:0]    frame;

  assign tx_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cnt     <= '0;
      bit_idx <= '0;
      frame   <= '1;
      txd     <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (tx_valid) begin
        busy    <= 1'b1;
        frame   <= {1'b1, tx_data, 1'b0};
        cnt     <= '0;
        bit_idx <= '0;
        txd     <= 1'b0;
      end
    end else begin
      if (cnt == CW'(CLKS_PER_BIT - 1)) begin
        cnt <= '0;
        if (bit_idx == 4'd9) begin
          busy <= 1'b0;
          txd  <= 1'b1;
        end else begin
          bit_idx <= bit_idx + 1'b1;
          txd     <= frame[bit_idx + 1'b1];
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
