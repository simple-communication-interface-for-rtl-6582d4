// RX_UART: asynchronous serial receiver, 1 start bit, 8 data bits (LSB
// first), 1 stop bit, no parity, as the link format requires (115200 bit/s).
//
// The line is brought into the clock domain by a two-flop synchronizer. A
// falling edge starts a frame; the start bit is checked again at its middle
// (a glitch shorter than half a bit is ignored), then each data bit and the
// stop bit are sampled at their middles, CLKS_PER_BIT clocks apart.
//
// Interface: rx_valid is a one-clock pulse with rx_data holding the byte,
// issued in the middle of the stop bit when the stop bit is high. A low stop
// bit drops the byte and pulses rx_frame_err instead.
// Timing: the byte is delivered about 9.5 bit times after the start edge,
// plus 2 clocks of synchronizer delay.
// The bit-rate divider (CLKS_PER_BIT = f_clk / baud, default 50 MHz /
// 115200 = 434) and the error flag are choices of this design; the frame
// format and the rate are those of the protocol.
`timescale 1ns/1ps
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       rx_frame_err
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_e;

  rx_state_e     state;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic [1:0]    sync;
  logic          rxs;

  assign rxs = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rxd};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= R_IDLE;
      cnt          <= '0;
      bit_idx      <= '0;
      shreg        <= '0;
      rx_valid     <= 1'b0;
      rx_data      <= '0;
      rx_frame_err <= 1'b0;
    end else begin
      rx_valid     <= 1'b0;
      rx_frame_err <= 1'b0;
      case (state)
        R_IDLE: begin
          cnt <= '0;
          if (!rxs) state <= R_START;
        end
        R_START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rxs ? R_IDLE : R_DATA;   // false start if high again
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        R_DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rxs, shreg[7:1]};
            if (bit_idx == 3'd7) state <= R_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        R_STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= R_IDLE;
            if (rxs) begin
              rx_valid <= 1'b1;
              rx_data  <= shreg;
            end else begin
              rx_frame_err <= 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
