// MUX: shares the single serial transmitter between the three subsystems that
// talk to the computer: ACK (echo of the configuration frame), SAMPLES_TX
// (0xDD and the samples) and END (the 0xEE answer).
//
// The controller's select picks which request reaches the transmitter, and
// the transmitter's ready is returned only to the selected source, so an
// unselected source never sees its byte accepted. Purely combinational.
// Returning ready to the selected source only is a choice of this design.
`timescale 1ns/1ps
module tx_mux
  import sci_pkg::*;
(
  input  tx_sel_e    sel,
  input  tx_req_t    ack_req,
  input  tx_req_t    smp_req,
  input  tx_req_t    end_req,
  input  logic       tx_ready,
  output tx_req_t    tx_req,
  output logic       ack_ready,
  output logic       smp_ready,
  output logic       end_ready
);

  always_comb begin
    ack_ready = 1'b0;
    smp_ready = 1'b0;
    end_ready = 1'b0;
    case (sel)
      TX_SEL_ACK: begin
        tx_req    = ack_req;
        ack_ready = tx_ready;
      end
      TX_SEL_SAMPLES: begin
        tx_req    = smp_req;
        smp_ready = tx_ready;
      end
      TX_SEL_END: begin
        tx_req    = end_req;
        end_ready = tx_ready;
      end
      default: tx_req = '0;
    endcase
  end

endmodule
