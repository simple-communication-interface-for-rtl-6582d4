// Self-checking testbench of uart_tx. Offers random bytes with random gaps at
// CLKS_PER_BIT = 16, decodes the line independently by sampling the middle
// of every bit, and checks the data, the start and stop bits, that the line
// idles high, that tx_ready is low while a byte is on the line and that one
// byte occupies 10 bit times (10 * CPB + 1 clocks from accept to ready).
`timescale 1ns/1ps
module tb_uart_tx;
  localparam int unsigned CPB = 16;
  logic clk = 1'b0, rst_n = 1'b1;
  logic tx_valid = 1'b0, tx_ready, txd;
  logic [7:0] tx_data = '0;
  int checks = 0, failures = 0;
  logic [7:0] sent[$];

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // line decoder
  int nrx = 0;
  initial begin
    logic [7:0] b;
    int low_cycles;
    @(posedge rst_n);
    forever begin
      @(negedge txd);
      // count how long the frame lasts: start bit edge to stop bit end
      repeat (CPB / 2) @(posedge clk);
      check(txd == 1'b0, "start bit low");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      check(txd == 1'b1, "stop bit high");
      check(tx_ready == 1'b0, "busy during stop bit");
      check(sent.size() > 0 && b == sent[0],
            $sformatf("byte %0d: got %02h want %02h", nrx, b, sent.size() ? sent[0] : 8'h00));
      if (sent.size()) void'(sent.pop_front());
      nrx++;
    end
  end

  initial begin
    longint t0, t1;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(txd == 1'b1 && tx_ready == 1'b1, "idle high and ready");
    for (int k = 0; k < 30; k++) begin
      tx_valid <= 1'b1;
      tx_data  <= 8'($urandom);
      @(posedge clk);
      while (!tx_ready) @(posedge clk);
      sent.push_back(tx_data);
      t0 = $time;
      tx_valid <= 1'b0;
      @(posedge clk);
      while (!tx_ready) @(posedge clk);
      t1 = $time;
      check((t1 - t0) / 10 == longint'(10 * CPB + 1),
            $sformatf("byte %0d took %0d clocks", k, (t1 - t0) / 10));
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    repeat (CPB * 2) @(posedge clk);
    check(nrx == 30, $sformatf("decoded %0d bytes", nrx));
    check(txd == 1'b1, "idle high at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
