// Self-checking testbench of end_fsm. Feeds received bytes and checks that
// only 0xEE with enable high causes a one-clock restart pulse (on the clock
// after the byte), that the answer byte 0xEE is then offered until the
// transmitter accepts it, that busy covers exactly that time, and that 0xEE
// is ignored while disabled.
`timescale 1ns/1ps
module tb_end_fsm;
  import sci_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, enable = 1'b1, rx_valid = 1'b0, tx_ready = 1'b0;
  logic [7:0] rx_data = '0;
  tx_req_t tx_req;
  logic restart, busy;
  int checks = 0, failures = 0, nrestart = 0;

  end_fsm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && restart) nrestart++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rx(input logic [7:0] b);
    rx_valid = 1'b1; rx_data = b;
    @(negedge clk);
    rx_valid = 1'b0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // other bytes do nothing
    for (int k = 0; k < 20; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      if (b == CMD_END) b = 8'h00;
      rx(b);
      check(!restart && !busy && !tx_req.valid, $sformatf("byte %02h ignored", b));
    end
    // 0xEE while disabled
    enable = 1'b0;
    rx(CMD_END);
    check(!restart && !busy, "disabled: no restart");
    @(negedge clk);
    enable = 1'b1;
    // 0xEE while enabled
    for (int k = 0; k < 5; k++) begin
      n = nrestart;
      rx(CMD_END);
      check(restart && busy, "restart pulse on clock after byte");
      check(tx_req.valid && tx_req.data == CMD_END, "answer 0xEE offered");
      @(negedge clk);
      check(!restart, "restart lasts one clock");
      repeat (k * 3) begin
        check(busy && tx_req.valid, "answer held until accepted");
        @(negedge clk);
      end
      tx_ready = 1'b1;
      @(negedge clk);
      tx_ready = 1'b0;
      check(!busy && !tx_req.valid, "answer released after accept");
      check(nrestart == n + 1, "exactly one restart");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
