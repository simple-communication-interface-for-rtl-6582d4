// SAMPLES_TX: delivers the stored samples to the computer, over and over,
// once per (simulated) antenna revolution.
//
// After a start pulse it loops forever through:
//   DELAY   acq_enable is high and a timer counts DELAY_CYCLES clocks, the
//           2.73 s an antenna revolution of the reference radar takes (the
//           acquisition itself is done by an external system; here its
//           duration is only timed);
//   DD      offers the byte 0xDD to announce that samples are available;
//   WAIT    waits until the controller reports a received 0xDD (ACK DD);
//   SEND    reads addresses 0 .. total-1 of the sample RAM and sends each
//           14-bit sample as two bytes, low byte first, the high byte
//           zero-extended from 6 to 8 bits;
// and then returns to DELAY. clear (the 0xEE restart) stops it at once.
// Interface: ram_re/ram_addr read the RAM (one clock latency; the RAM
// output holds the word until the next read, so it is sent from there); tx_req is
// held until tx_ready accepts it; xfer_done pulses after the last byte of a
// block has been accepted. A total of zero sends no samples.
// Timing: DELAY_CYCLES clocks of delay, then one byte time for 0xDD; a block
// takes 2 * total byte times on the serial link.
// The loop follows the hardware flow of the interface; the byte order, the
// start address 0 and the 50 MHz clock behind the default of DELAY_CYCLES
// (2.73 s x 50 MHz) are choices of this design.
`timescale 1ns/1ps
module samples_tx
  import sci_pkg::*;
#(
  parameter int unsigned DELAY_CYCLES = 136_500_000,
  parameter int unsigned ADDR_W       = 14,
  parameter int unsigned DATA_W       = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              start,
  input  logic [15:0]       total,
  input  logic              dd_rx,
  input  logic              tx_ready,
  output tx_req_t           tx_req,
  output logic              ram_re,
  output logic [ADDR_W-1:0] ram_addr,
  input  logic [DATA_W-1:0] ram_rdata,
  output logic              acq_enable,
  output logic              xfer_done
);

  localparam int unsigned DW = $clog2(DELAY_CYCLES + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_DELAY, S_DD, S_WAIT, S_READ, S_LOW, S_HIGH
  } smp_state_e;

  smp_state_e        state;
  logic [DW-1:0]     timer;
  logic [15:0]       count;     // samples sent in this block

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      timer     <= '0;
      count     <= '0;
      xfer_done <= 1'b0;
    end else begin
      xfer_done <= 1'b0;
      if (clear) begin
        state <= S_IDLE;
        timer <= '0;
        count <= '0;
      end else begin
        case (state)
          S_IDLE: if (start) begin
            state <= S_DELAY;
            timer <= '0;
          end
          S_DELAY: begin
            if (timer == DW'(DELAY_CYCLES - 1)) begin
              timer <= '0;
              state <= S_DD;
            end else begin
              timer <= timer + 1'b1;
            end
          end
          S_DD: if (tx_ready) state <= S_WAIT;
          S_WAIT: if (dd_rx) begin
            count <= '0;
            if (total == '0) begin
              state     <= S_DELAY;
              xfer_done <= 1'b1;
            end else begin
              state <= S_READ;
            end
          end
          S_READ: begin
            // read issued in this state; data is valid in the next one
            state <= S_LOW;
          end
          S_LOW: begin
            if (tx_ready) state <= S_HIGH;
          end
          S_HIGH: if (tx_ready) begin
            if (count == total - 1'b1) begin
              state     <= S_DELAY;
              xfer_done <= 1'b1;
            end else begin
              state <= S_READ;
            end
            count <= count + 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign ram_re     = (state == S_READ);
  assign ram_addr   = count[ADDR_W-1:0];
  assign acq_enable = (state == S_DELAY);

  always_comb begin
    tx_req = '0;
    case (state)
      S_DD:    tx_req = '{valid: 1'b1, data: CMD_DD};
      S_LOW:   tx_req = '{valid: 1'b1, data: ram_rdata[7:0]};
      S_HIGH:  tx_req = '{valid: 1'b1, data: 8'(ram_rdata[DATA_W-1:8])};
      default: tx_req = '0;
    endcase
  end

  // Handshake rule: a byte offered to the transmitter stays offered, and
  // unchanged, until it is accepted (or the sequence is cleared).
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n || clear)
    (tx_req.valid && !tx_ready) |=> (tx_req.valid && $stable(tx_req.data)))
    else $error("samples_tx: byte request dropped or changed before it was accepted");

endmodule
