// Self-checking testbench of uart_rx. Drives the serial line bit by bit with
// random bytes at CLKS_PER_BIT = 16 and checks each delivered byte, the
// delivery time (within 9.5 bit times plus a few clocks of the start edge),
// that a low stop bit raises rx_frame_err instead of rx_valid, and that a
// short low glitch on the idle line produces no byte.
`timescale 1ns/1ps
module tb_uart_rx;
  localparam int unsigned CPB = 16;
  logic clk = 1'b0, rst_n = 1'b1, rxd = 1'b1;
  logic rx_valid, rx_frame_err;
  logic [7:0] rx_data;
  int checks = 0, failures = 0;
  int nvalid = 0, nerr = 0;
  logic [7:0] last;
  longint cyc = 0, t_valid;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rx_valid) begin nvalid++; last = rx_data; t_valid = cyc; end
    if (rx_frame_err) nerr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input bit stop);
    rxd = 1'b0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = stop; repeat (CPB) @(posedge clk);
    rxd = 1'b1; repeat (CPB) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    logic [7:0] b;
    int nv;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      b  = (k == 0) ? 8'hAA : (k == 1) ? 8'hEE : 8'($urandom);
      nv = nvalid;
      t0 = cyc;
      send(b, 1'b1);
      check(nvalid == nv + 1, $sformatf("byte %0d delivered once", k));
      check(last == b, $sformatf("byte %0d: got %02h want %02h", k, last, b));
      check(t_valid - t0 <= longint'(CPB * 19 / 2 + 4) && t_valid - t0 >= longint'(CPB * 9),
            $sformatf("byte %0d latency %0d", k, t_valid - t0));
    end
    // stop bit low -> framing error, no byte
    nv = nvalid;
    send(8'h5A, 1'b0);
    repeat (2 * CPB) @(posedge clk);
    check(nerr == 1, $sformatf("framing error flagged (%0d)", nerr));
    check(nvalid == nv, "no byte on framing error");
    // glitch of CPB/4 clocks: no start
    rxd = 1'b0; repeat (CPB / 4) @(posedge clk); rxd = 1'b1;
    repeat (12 * CPB) @(posedge clk);
    check(nvalid == nv && nerr == 1, "glitch ignored");
    // receiver still works afterwards
    send(8'h3C, 1'b1);
    check(nvalid == nv + 1 && last == 8'h3C, "byte after glitch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
