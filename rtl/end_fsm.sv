// END: attends the computer's request to end all processes. While enabled it
// compares every received byte with 0xEE; on a match it pulses restart for
// one clock, which returns every other part of the interface to its initial
// state, and then answers the computer with an 0xEE byte of its own (the
// "ACK EE" of the protocol).
//
// The controller disables the comparison from the 0xAA that opens a
// configuration frame until the frame has been received, because a frame
// field may legally hold the value 0xEE. Reception of 0xEE otherwise has the
// highest priority: it is acted on in any state, also in the middle of a
// sample transfer.
// Interface: busy is high from the restart until the answer byte has been
// accepted by the transmitter; the controller gives END the transmitter
// while busy is high. Timing: restart is issued on the clock after the
// received byte's rx_valid pulse.
// The one-clock restart pulse and the valid/ready handshake are choices of
// this design. The data of tx_req is the constant 0xEE.
`timescale 1ns/1ps
module end_fsm
  import sci_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       rx_valid,
  input  logic [7:0] rx_data,
  input  logic       tx_ready,
  output tx_req_t    tx_req,
  output logic       restart,
  output logic       busy
);

  typedef enum logic {E_WATCH, E_ANSWER} end_state_e;

  end_state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= E_WATCH;
      restart <= 1'b0;
    end else begin
      restart <= 1'b0;
      if (enable && rx_valid && rx_data == CMD_END) begin
        // a further 0xEE before the answer went out restarts again
        restart <= 1'b1;
        state   <= E_ANSWER;
      end else if (state == E_ANSWER && tx_ready) begin
        state <= E_WATCH;
      end
    end
  end

  assign busy        = (state == E_ANSWER);
  assign tx_req.valid = (state == E_ANSWER);
  assign tx_req.data  = CMD_END;

  // Handshake rule: the answer stays offered until it is accepted.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    (tx_req.valid && !tx_ready) |=> tx_req.valid)
    else $error("end_fsm: answer withdrawn before it was accepted");

endmodule
