// Self-checking testbench of ctrl_fsm. Sends configuration frames byte by
// byte (some with a field equal to 0xEE, some with a wrong delimiter) and
// checks: param_load with the record decoded independently from the bytes,
// ack_start together with it, end_enable low exactly while a frame is being
// received, frame_drop and no load for a bad frame, the transmitter select
// (ACK, then SAMPLES after ack_done, END while end_busy), smp_start once,
// dd_rx only for 0xDD in the run state, and return to idle on restart.
`timescale 1ns/1ps
module tb_ctrl_fsm;
  import sci_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, restart = 1'b0, rx_valid = 1'b0, ack_done = 1'b0, end_busy = 1'b0;
  logic [7:0] rx_data = '0;
  logic param_load, end_enable, ack_start, smp_start, dd_rx, frame_drop;
  sci_params_t param_d, loaded;
  tx_sel_e tx_sel;
  int checks = 0, failures = 0;
  int nload = 0, nack = 0, nsmp = 0, ndrop = 0, ndd = 0;

  ctrl_fsm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (param_load) begin nload++; loaded = param_d; end
    if (ack_start) nack++;
    if (smp_start) nsmp++;
    if (frame_drop) ndrop++;
    if (dd_rx) ndd++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rx(input logic [7:0] b);
    rx_valid = 1'b1; rx_data = b;
    @(negedge clk);
    rx_valid = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] f[11];
    sci_params_t want;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(end_enable && tx_sel == TX_SEL_ACK, "idle: END enabled");
    // bytes other than 0xAA are ignored in idle
    rx(8'hDD); rx(8'h12);
    check(end_enable && nload == 0 && ndd == 0, "idle ignores other bytes");
    for (int k = 0; k < 6; k++) begin
      want.ri = 16'($urandom_range(0, 499)); want.rf = 16'($urandom_range(0, 499));
      want.ai = (k == 1) ? 8'hEE : 8'($urandom_range(0, 199));
      want.mode = (k == 2) ? 8'hEE : 8'($urandom_range(0, 3));
      want.total = (k == 3) ? 16'hEEEE : 16'($urandom_range(1, 13824));
      f = '{8'hAA, want.ri[7:0], want.ri[15:8], want.rf[7:0], want.rf[15:8], want.ai,
            8'hBB, want.mode, 8'hCC, want.total[7:0], want.total[15:8]};
      if (k == 4) f[6] = 8'hBC;   // wrong mode delimiter
      if (k == 5) f[8] = 8'hCD;   // wrong total delimiter
      nload = 0; nack = 0; ndrop = 0; nsmp = 0; ndd = 0;
      for (int i = 0; i < 11; i++) begin
        rx(f[i]);
        if (k >= 4 && ((k == 4 && i >= 6) || (k == 5 && i >= 8))) begin
          if (i == ((k == 4) ? 6 : 8))
            check(end_enable && ndrop == 1, $sformatf("frame %0d dropped at byte %0d", k, i));
        end else if (i < 10) begin
          check(!end_enable, $sformatf("frame %0d byte %0d: END disabled", k, i));
        end
      end
      if (k >= 4) begin
        check(nload == 0 && nack == 0, $sformatf("bad frame %0d not loaded", k));
        check(end_enable && tx_sel == TX_SEL_ACK, "back to idle after bad frame");
        continue;
      end
      check(nload == 1 && nack == 1, $sformatf("frame %0d loaded once, ACK started", k));
      check(loaded == want, $sformatf("frame %0d decoded record", k));
      check(end_enable && tx_sel == TX_SEL_ACK, "ACK owns the transmitter");
      rx(8'hDD);
      check(ndd == 0, "0xDD ignored before the run state");
      end_busy = 1'b1; #1;
      check(tx_sel == TX_SEL_END, "END overrides the select");
      @(negedge clk); end_busy = 1'b0;
      ack_done = 1'b1; @(negedge clk); ack_done = 1'b0;
      @(negedge clk);
      check(nsmp == 1 && tx_sel == TX_SEL_SAMPLES, "samples started and selected");
      rx(8'hDD); rx(8'h55); rx(8'hDD);
      check(ndd == 2, "dd_rx for each 0xDD only");
      rx(8'hAA); rx(8'h01);
      check(end_enable && nload == 1 && tx_sel == TX_SEL_SAMPLES, "frames ignored while running");
      restart = 1'b1; @(negedge clk); restart = 1'b0;
      check(tx_sel == TX_SEL_ACK && end_enable, "restart returns to idle");
    end
    // restart in the middle of a frame
    rx(8'hAA); rx(8'h01); rx(8'h00);
    check(!end_enable, "inside a frame");
    restart = 1'b1; @(negedge clk); restart = 1'b0;
    check(end_enable, "restart aborts the frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
