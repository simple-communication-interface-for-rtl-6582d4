// Shared definitions of the serial communication interface.
//
// The protocol between the computer and the FPGA uses five command bytes:
// 0xAA, 0xBB and 0xCC delimit the fields of the configuration frame, 0xDD
// announces and acknowledges a block of samples, and 0xEE ends all activity.
// The configuration frame is 11 bytes long:
//   AA, Ri low, Ri high, Rf low, Rf high, Ai, BB, mode, CC, Total low, Total high
// where Ri/Rf are the first and last range-ring indexes, Ai the first angular
// sector index, mode the radar operating mode (0..3) and Total the number of
// sample addresses to read from memory. The command values and the frame
// layout follow the protocol definition; the field widths of the record
// below follow the byte counts of the frame.
`timescale 1ns/1ps
package sci_pkg;

  localparam logic [7:0] CMD_WIN   = 8'hAA;  // searching window beginning
  localparam logic [7:0] CMD_MODE  = 8'hBB;  // mode beginning
  localparam logic [7:0] CMD_TOTAL = 8'hCC;  // total samples beginning
  localparam logic [7:0] CMD_DD    = 8'hDD;  // send samples request / ACK DD
  localparam logic [7:0] CMD_END   = 8'hEE;  // end of communication

  localparam int unsigned FRAME_LEN = 11;    // bytes in the configuration frame

  // Positions of the delimiters and fields inside the frame.
  localparam int unsigned POS_MODE  = 6;
  localparam int unsigned POS_TOTAL = 8;

  // Contents of the PARAMETERS register group (8 bytes of the frame).
  typedef struct packed {
    logic [15:0] ri;     // initial range ring index, 0..499
    logic [15:0] rf;     // final range ring index, 0..499
    logic [7:0]  ai;     // initial angular sector index, 0..199
    logic [7:0]  mode;   // operating mode, 0x00..0x03
    logic [15:0] total;  // number of sample addresses to transmit
  } sci_params_t;

  // One byte offered to the shared transmitter (held until accepted).
  typedef struct packed {
    logic       valid;
    logic [7:0] data;
  } tx_req_t;

  // Which subsystem owns the transmitter.
  typedef enum logic [1:0] {
    TX_SEL_ACK     = 2'd0,
    TX_SEL_SAMPLES = 2'd1,
    TX_SEL_END     = 2'd2
  } tx_sel_e;

  // Byte number idx (0..10) of the frame that carries the given parameters.
  function automatic logic [7:0] frame_byte(input sci_params_t p, input logic [3:0] idx);
    case (idx)
      4'd0:    return CMD_WIN;
      4'd1:    return p.ri[7:0];
      4'd2:    return p.ri[15:8];
      4'd3:    return p.rf[7:0];
      4'd4:    return p.rf[15:8];
      4'd5:    return p.ai;
      4'd6:    return CMD_MODE;
      4'd7:    return p.mode;
      4'd8:    return CMD_TOTAL;
      4'd9:    return p.total[7:0];
      4'd10:   return p.total[15:8];
      default: return 8'h00;
    endcase
  endfunction

endpackage
