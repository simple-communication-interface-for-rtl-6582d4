// Workload testbench of sci_top: the largest searching window (64 range
// rings x 8 angular sectors = 512 cells) in each of the four operating
// modes, with 27, 13, 10 and 6 pulses per cell, that is 13824, 6656, 5120
// and 3072 samples per revolution. Runs at 16 clocks per bit and a 3000-clock
// acquisition to stay short; the RAM is at its full 16k x 14 size with the
// saw-tooth contents. For each mode it configures the interface, receives one
// block and checks every sample, that the block took exactly
// 2N x (10 x 16 + 1) clocks from first to last byte end, and, scaling that
// count to the default 434 clocks per bit at 50 MHz, that the block fits in
// the 2.73 s of one antenna revolution. Between modes it stops the
// interface with 0xEE.
`timescale 1ns/1ps
module tb_sci_top_workloads;
  import sci_pkg::*;
  localparam int unsigned CPB    = 16;
  localparam int unsigned CLK_NS = 10;
  localparam int unsigned BIT_NS = CPB * CLK_NS;
  localparam int unsigned DELAY  = 3000;

  logic clk = 1'b0, rst_n = 1'b1;
  logic rxd, txd, params_valid, acq_enable, xfer_done, frame_drop, rx_frame_err;
  logic acq_we = 1'b0;
  logic [13:0] acq_waddr = '0, acq_wdata = '0;
  sci_params_t params;
  int checks = 0, failures = 0;
  int pulses[4] = '{27, 13, 10, 6};
  int want_samples[4] = '{13824, 6656, 5120, 3072};

  sci_top #(.CLK_HZ(CPB * 100_000), .BAUD(100_000), .DELAY_CYCLES(DELAY)) dut (.*);
  uart_host #(.BIT_NS(BIT_NS)) host (.txd(rxd), .rxd(txd));

  always #(CLK_NS / 2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_bytes(input int n, input longint max_ns);
    longint t0;
    t0 = $time;
    while (host.rxq.size() < n && $time - t0 < max_ns) #(BIT_NS);
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sci_params_t p;
    logic [7:0] f[11];
    int n, bad;
    longint clocks;
    real secs;
    #1 rst_n = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    for (int m = 0; m < 4; m++) begin
      n = 64 * 8 * pulses[m];
      check(n == want_samples[m], $sformatf("mode %0d: %0d samples", m + 1, n));
      p = '{ri: 16'd0, rf: 16'd63, ai: 8'd0, mode: 8'(m), total: 16'(n)};
      f = '{8'hAA, p.ri[7:0], p.ri[15:8], p.rf[7:0], p.rf[15:8], p.ai,
            8'hBB, p.mode, 8'hCC, p.total[7:0], p.total[15:8]};
      host.rxq.delete(); host.rxt.delete();
      for (int i = 0; i < 11; i++) host.send_byte(f[i]);
      wait_bytes(11, 20 * 10 * BIT_NS);
      check(host.rxq.size() == 11, $sformatf("mode %0d ACK", m + 1));
      for (int i = 0; i < 11 && i < host.rxq.size(); i++)
        check(host.rxq[i] == f[i], $sformatf("mode %0d ACK byte %0d", m + 1, i));
      host.rxq.delete(); host.rxt.delete();
      wait_bytes(1, longint'(DELAY + 40 * CPB) * CLK_NS);
      check(host.rxq.size() == 1 && host.rxq[0] == CMD_DD, $sformatf("mode %0d 0xDD", m + 1));
      host.rxq.delete(); host.rxt.delete();
      host.send_byte(CMD_DD);
      wait_bytes(2 * n, longint'(2 * n + 10) * 11 * BIT_NS);
      check(host.rxq.size() == 2 * n, $sformatf("mode %0d: %0d bytes", m + 1, host.rxq.size()));
      bad = 0;
      for (int i = 0; i < n && 2 * i + 1 < host.rxq.size(); i++)
        if ({host.rxq[2 * i + 1], host.rxq[2 * i]} != 16'((i % 1728) + 1)) bad++;
      check(bad == 0, $sformatf("mode %0d: %0d wrong samples", m + 1, bad));
      if (host.rxt.size() == 2 * n) begin
        clocks = (host.rxt[2 * n - 1] - host.rxt[0]) / CLK_NS;
        check(clocks == longint'(2 * n - 1) * (10 * CPB + 1),
              $sformatf("mode %0d: block of %0d clocks", m + 1, clocks));
        // the same block at 434 clocks per bit and 20 ns per clock
        secs = real'(2 * n) * (10 * 434 + 1) * 20.0e-9;
        $display("mode %0d: %0d samples, %0d bytes, %0.3f s at 115200 bit/s", m + 1, n, 2 * n, secs);
        check(secs < 2.73, $sformatf("mode %0d fits one revolution", m + 1));
      end
      host.rxq.delete();
      host.send_byte(CMD_END);
      wait_bytes(1, 30 * BIT_NS);
      check(host.rxq.size() >= 1 && host.rxq[host.rxq.size() - 1] == CMD_END,
            $sformatf("mode %0d stopped", m + 1));
      repeat (100) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
