// Serial communication interface between a radar sample memory in an FPGA and
// a computer (FPGA side).
//
// The computer configures the acquisition with an 11-byte frame
// (AA Ri Ri Rf Rf Ai BB mode CC Total Total). The interface stores the
// eight specification bytes in PARAMETERS, echoes the frame as an ACK, then
// repeats forever: wait one simulated antenna revolution (DELAY_CYCLES),
// send 0xDD, wait for the computer's 0xDD, send Total 14-bit samples from the
// RAM as two bytes each. A received 0xEE restarts everything from any state
// and is answered with 0xEE, except while a configuration frame is being
// received.
//
// Blocks: uart_rx (RX_UART), ctrl_fsm (CONTROL), param_regs (PARAMETERS),
// ack_gen (ACK), samples_tx (SAMPLES_TX), sample_ram (RAM 16k x 14),
// end_fsm (END), tx_mux (MUX), uart_tx (TX_UART), connected as in the block
// diagram of the interface.
// Ports: rxd/txd are the serial lines (idle high). params/params_valid and
// acq_enable go to the external acquisition system, which writes samples
// through acq_we/acq_waddr/acq_wdata. xfer_done (a block of samples sent),
// frame_drop (a frame rejected) and rx_frame_err (a byte with a low stop
// bit) are status pulses. All logic runs on clk; rst_n is an asynchronous active-low reset.
// The default clock of 50 MHz (CLK_HZ) is a choice of this design; the bit
// rate of 115200 and the 2.73 s revolution time are those of the interface.
`timescale 1ns/1ps
module sci_top
  import sci_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 50_000_000,
  parameter int unsigned BAUD          = 115_200,
  parameter int unsigned DELAY_CYCLES  = 136_500_000,
  parameter int unsigned ADDR_W        = 14,
  parameter int unsigned DATA_W        = 14,
  parameter bit          INIT_SAWTOOTH = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rxd,
  output logic              txd,
  output sci_params_t       params,
  output logic              params_valid,
  output logic              acq_enable,
  input  logic              acq_we,
  input  logic [ADDR_W-1:0] acq_waddr,
  input  logic [DATA_W-1:0] acq_wdata,
  output logic              xfer_done,
  output logic              frame_drop,
  output logic              rx_frame_err
);

  localparam int unsigned CLKS_PER_BIT = CLK_HZ / BAUD;

  logic              rx_valid;
  logic [7:0]        rx_data;
  logic              restart, end_busy, end_enable;
  logic              param_load, ack_start, ack_done, smp_start, dd_rx;
  sci_params_t       param_d;
  tx_sel_e           tx_sel;
  tx_req_t           ack_req, smp_req, end_req, tx_req;
  logic              tx_ready, ack_ready, smp_ready, end_ready;
  logic              ram_re;
  logic [ADDR_W-1:0] ram_addr;
  logic [DATA_W-1:0] ram_rdata;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd, .rx_valid, .rx_data, .rx_frame_err
  );

  end_fsm u_end (
    .clk, .rst_n, .enable(end_enable), .rx_valid, .rx_data,
    .tx_ready(end_ready), .tx_req(end_req), .restart, .busy(end_busy)
  );

  ctrl_fsm u_ctrl (
    .clk, .rst_n, .restart, .rx_valid, .rx_data, .ack_done, .end_busy,
    .param_load, .param_d, .end_enable, .ack_start, .smp_start, .dd_rx,
    .tx_sel, .frame_drop
  );

  param_regs u_params (
    .clk, .rst_n, .clear(restart), .load(param_load), .d(param_d),
    .params, .params_valid
  );

  ack_gen u_ack (
    .clk, .rst_n, .clear(restart), .start(ack_start), .params,
    .tx_ready(ack_ready), .tx_req(ack_req), .done(ack_done)
  );

  samples_tx #(.DELAY_CYCLES(DELAY_CYCLES), .ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_smp (
    .clk, .rst_n, .clear(restart), .start(smp_start), .total(params.total),
    .dd_rx, .tx_ready(smp_ready), .tx_req(smp_req), .ram_re, .ram_addr,
    .ram_rdata, .acq_enable, .xfer_done
  );

  sample_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .INIT_SAWTOOTH(INIT_SAWTOOTH)) u_ram (
    .clk, .we(acq_we), .waddr(acq_waddr), .wdata(acq_wdata),
    .re(ram_re), .raddr(ram_addr), .rdata(ram_rdata)
  );

  tx_mux u_mux (
    .sel(tx_sel), .ack_req, .smp_req, .end_req, .tx_ready,
    .tx_req, .ack_ready, .smp_ready, .end_ready
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .tx_valid(tx_req.valid), .tx_data(tx_req.data),
    .tx_ready, .txd
  );

endmodule
