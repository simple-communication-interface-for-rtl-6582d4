// CONTROL: the main state machine of the interface.
//
//   C_IDLE   waits for 0xAA, the first byte of a configuration frame;
//   C_FRAME  collects the other ten bytes into a holding register and checks
//            that byte 6 is 0xBB and byte 8 is 0xCC; a wrong delimiter drops
//            the frame silently (the computer then sees no ACK and gives up);
//   C_LOAD   copies the eight parameter bytes into PARAMETERS at once and
//            starts ACK;
//   C_ACK    gives the transmitter to ACK until the echo has been sent;
//   C_RUN    starts SAMPLES_TX, gives it the transmitter and passes every
//            received 0xDD to it as dd_rx; stays here until a restart.
// A restart from END (received 0xEE) returns the machine to C_IDLE from any
// state. END's comparison is disabled while in C_FRAME, so that a field equal
// to 0xEE is not taken as a stop request; it is enabled everywhere else.
// While END is answering (end_busy) the transmitter select points at END,
// overriding the state.
// Interface: rx_valid/rx_data come from the receiver; param_load is a
// one-clock pulse with param_d; ack_start and smp_start are one-clock pulses;
// frame_drop pulses when a frame is rejected.
// Timing: PARAMETERS are loaded two clocks after the last frame byte is
// received, and ACK starts in the same clock.
// The states follow the hardware flow of the interface; the holding register
// (parameters change only when a whole frame is good) and the silent drop on
// a wrong delimiter are the reading of this design where the description is
// brief.
`timescale 1ns/1ps
module ctrl_fsm
  import sci_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        restart,
  input  logic        rx_valid,
  input  logic [7:0]  rx_data,
  input  logic        ack_done,
  input  logic        end_busy,
  output logic        param_load,
  output sci_params_t param_d,
  output logic        end_enable,
  output logic        ack_start,
  output logic        smp_start,
  output logic        dd_rx,
  output tx_sel_e     tx_sel,
  output logic        frame_drop
);

  typedef enum logic [2:0] {C_IDLE, C_FRAME, C_LOAD, C_ACK, C_RUN} ctrl_state_e;

  ctrl_state_e state;
  logic [3:0]  pos;       // index of the next frame byte expected
  sci_params_t hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      pos        <= '0;
      hold       <= '0;
      smp_start  <= 1'b0;
      frame_drop <= 1'b0;
    end else begin
      smp_start  <= 1'b0;
      frame_drop <= 1'b0;
      if (restart) begin
        state <= C_IDLE;
        pos   <= '0;
      end else begin
        case (state)
          C_IDLE: if (rx_valid && rx_data == CMD_WIN) begin
            state <= C_FRAME;
            pos   <= 4'd1;
          end
          C_FRAME: if (rx_valid) begin
            pos <= pos + 1'b1;
            case (pos)
              4'd1:  hold.ri[7:0]     <= rx_data;
              4'd2:  hold.ri[15:8]    <= rx_data;
              4'd3:  hold.rf[7:0]     <= rx_data;
              4'd4:  hold.rf[15:8]    <= rx_data;
              4'd5:  hold.ai          <= rx_data;
              4'd7:  hold.mode        <= rx_data;
              4'd9:  hold.total[7:0]  <= rx_data;
              4'd10: hold.total[15:8] <= rx_data;
              default: ;
            endcase
            if ((pos == 4'(POS_MODE)  && rx_data != CMD_MODE) ||
                (pos == 4'(POS_TOTAL) && rx_data != CMD_TOTAL)) begin
              state      <= C_IDLE;
              frame_drop <= 1'b1;
            end else if (pos == 4'(FRAME_LEN - 1)) begin
              state <= C_LOAD;
            end
          end
          C_LOAD: state <= C_ACK;
          C_ACK: if (ack_done) begin
            state     <= C_RUN;
            smp_start <= 1'b1;
          end
          C_RUN: ;
          default: state <= C_IDLE;
        endcase
      end
    end
  end

  assign param_load = (state == C_LOAD) && !restart;
  assign ack_start  = param_load;
  assign param_d    = hold;
  assign end_enable = (state != C_FRAME);
  assign dd_rx      = (state == C_RUN) && rx_valid && rx_data == CMD_DD;

  always_comb begin
    if (end_busy)           tx_sel = TX_SEL_END;
    else if (state == C_RUN) tx_sel = TX_SEL_SAMPLES;
    else                    tx_sel = TX_SEL_ACK;
  end

endmodule
