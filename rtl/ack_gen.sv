// ACK: sends the acknowledgment of the configuration frame, which is the same
// 11 bytes the computer sent: AA, Ri low/high, Rf low/high, Ai, BB, mode, CC,
// Total low/high. The computer compares it byte by byte with its own frame.
//
// The bytes are rebuilt from the PARAMETERS registers (and the three
// delimiter constants) rather than stored again, so the echo shows exactly
// what the hardware holds. A start pulse begins the sequence; each byte is
// offered on tx_req until the transmitter accepts it (valid/ready); done
// pulses for one clock after the eleventh byte has been accepted. clear
// abandons the sequence.
// Timing: the first byte is offered on the clock after start; over the
// serial link the whole echo takes 11 byte times.
// Rebuilding the echo from the registers is a choice of this design.
`timescale 1ns/1ps
module ack_gen
  import sci_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        start,
  input  sci_params_t params,
  input  logic        tx_ready,
  output tx_req_t     tx_req,
  output logic        done
);

  logic       active;
  logic [3:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      idx    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        active <= 1'b0;
        idx    <= '0;
      end else if (!active) begin
        if (start) begin
          active <= 1'b1;
          idx    <= '0;
        end
      end else if (tx_ready) begin
        if (idx == 4'(FRAME_LEN - 1)) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
        idx <= idx + 1'b1;
      end
    end
  end

  assign tx_req.valid = active;
  assign tx_req.data  = frame_byte(params, idx);

  // Handshake rule: a byte offered to the transmitter stays offered, and
  // unchanged, until it is accepted (or the sequence is cleared).
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n || clear)
    (tx_req.valid && !tx_ready) |=> (tx_req.valid && $stable(tx_req.data)))
    else $error("ack_gen: byte request dropped or changed before it was accepted");

endmodule
