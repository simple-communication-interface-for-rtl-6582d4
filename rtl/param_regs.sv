// PARAMETERS: register group that holds the operating specifications taken
// from the configuration frame: the searching window (Ri, Rf, Ai: five
// bytes), the radar operating mode (one byte) and the total number of sample
// addresses (two bytes).
//
// The controller loads all eight bytes at once with a one-clock load pulse,
// after the whole frame has been received and checked; params_valid then
// rises and tells the acquisition system that the values are usable. A
// clear pulse (the restart requested by an 0xEE byte) returns the registers
// to zero and lowers params_valid. clear wins over load.
// Timing: the new values appear on the clock after load.
// Loading all fields at once, the zero reset value and params_valid are
// choices of this design; the fields and their sizes follow the frame.
`timescale 1ns/1ps
module param_regs
  import sci_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        load,
  input  sci_params_t d,
  output sci_params_t params,
  output logic        params_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      params       <= '0;
      params_valid <= 1'b0;
    end else if (clear) begin
      params       <= '0;
      params_valid <= 1'b0;
    end else if (load) begin
      params       <= d;
      params_valid <= 1'b1;
    end
  end

endmodule
