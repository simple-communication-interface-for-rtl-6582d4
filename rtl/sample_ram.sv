// RAM: sample memory of 16384 locations of 14 bits (one ADC sample each),
// enough for the 13824 samples of the largest searching window in operating
// mode 1 (512 cells x 27 pulses).
//
// Simple dual port: the acquisition system writes through the write port,
// SAMPLES_TX reads through the read port. Both ports are synchronous to clk;
// a read returns the word on the clock after re is high (one clock latency).
// A read of the address being written returns the old word.
// When INIT_SAWTOOTH is set the memory starts with a known test pattern so
// that transfers can be checked without an acquisition system: locations
// 0..SAW_PERIOD*SAW_REPEAT-1 hold (addr mod SAW_PERIOD) + 1, that is 1..1728
// repeated eight times (27 pulses x 64 rings, once per angular sector), and
// the rest hold 0. Size, width and pattern follow the description of the
// interface; the port arrangement and read latency are choices of this
// design.
`timescale 1ns/1ps
module sample_ram #(
  parameter int unsigned ADDR_W        = 14,
  parameter int unsigned DATA_W        = 14,
  parameter bit          INIT_SAWTOOTH = 1'b1,
  parameter int unsigned SAW_PERIOD    = 1728,
  parameter int unsigned SAW_REPEAT    = 8
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) begin
      if (INIT_SAWTOOTH && i < SAW_PERIOD * SAW_REPEAT)
        mem[i] = DATA_W'((i % SAW_PERIOD) + 1);
      else
        mem[i] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
