// Full-size testbench of sci_top with every parameter at its default: 50 MHz
// clock, 115200 bit/s (434 clocks per bit), a simulated acquisition of 2.73 s
// (136 500 000 clocks) and the 16k x 14 saw-tooth RAM. A behavioural serial
// host runs two complete operations: the worked example (rings 139..191,
// sectors from 14, mode 0x02, 2650 samples) and the critical window (64
// rings x 8 sectors in mode 0x00, 27 pulses, 13824 samples). Each is a
// configuration frame and its echo, the acquisition delay, 0xDD, the host's
// 0xDD, the samples, and finally 0xEE and its answer. It checks every byte,
// the length of the acquisition delay, and that the sample block takes the
// time the bit rate allows (2N bytes of 10 bits at 434 clocks per bit, plus
// one clock per byte) and ends within the 2.73 s of one antenna revolution
// (2.40 s for the critical window).
`timescale 1ns/1ps
module tb_sci_top_full;
  import sci_pkg::*;
  localparam int unsigned CLK_NS = 20;
  localparam int unsigned CPB    = 434;
  localparam int unsigned BIT_NS = CPB * CLK_NS;
  localparam longint      DELAY  = 136_500_000;

  logic clk = 1'b0, rst_n = 1'b1;
  logic rxd, txd, params_valid, acq_enable, xfer_done, frame_drop, rx_frame_err;
  logic acq_we = 1'b0;
  logic [13:0] acq_waddr = '0, acq_wdata = '0;
  sci_params_t params;
  int checks = 0, failures = 0;
  longint en_len = 0, last_en_len = 0;

  sci_top dut (.*);
  uart_host #(.BIT_NS(BIT_NS)) host (.txd(rxd), .rxd(txd));

  always #(CLK_NS / 2) clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (acq_enable) en_len++;
    else if (en_len != 0) begin last_en_len = en_len; en_len = 0; end
  end

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
    #(64'd10_000_000_000);   // 10 s of simulated time
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One complete operation: frame, ACK, acquisition, 0xDD, samples, 0xEE.
  task automatic session(input sci_params_t p);
    logic [7:0] f[11];
    int bad, n;
    longint t_dd, t_first, t_last, want_ns;
    n = int'(p.total);
    f = '{8'hAA, p.ri[7:0], p.ri[15:8], p.rf[7:0], p.rf[15:8], p.ai,
          8'hBB, p.mode, 8'hCC, p.total[7:0], p.total[15:8]};
    host.rxq.delete(); host.rxt.delete();
    for (int i = 0; i < 11; i++) host.send_byte(f[i]);
    wait_bytes(11, 20 * 10 * BIT_NS);
    check(host.rxq.size() == 11, $sformatf("ACK length %0d", host.rxq.size()));
    for (int i = 0; i < 11; i++)
      check(i < host.rxq.size() && host.rxq[i] == f[i], $sformatf("ACK byte %0d", i));
    check(params == p && params_valid, "parameters stored");
    host.rxq.delete(); host.rxt.delete();

    wait_bytes(1, DELAY * CLK_NS + 40 * BIT_NS);
    check(host.rxq.size() == 1 && host.rxq[0] == CMD_DD, "0xDD after the acquisition");
    check(last_en_len == DELAY, $sformatf("acquisition lasted %0d clocks", last_en_len));
    t_dd = (host.rxt.size() > 0) ? host.rxt[0] : 0;
    host.rxq.delete(); host.rxt.delete();
    host.send_byte(CMD_DD);
    wait_bytes(2 * n, longint'(2 * n + 10) * 11 * BIT_NS);
    check(host.rxq.size() == 2 * n, $sformatf("%0d bytes received for %0d samples", host.rxq.size(), n));
    bad = 0;
    for (int i = 0; i < n && 2 * i + 1 < host.rxq.size(); i++)
      if ({host.rxq[2 * i + 1], host.rxq[2 * i]} != 16'((i % 1728) + 1)) bad++;
    check(bad == 0, $sformatf("%0d wrong samples", bad));
    if (host.rxt.size() == 2 * n) begin
      t_first = host.rxt[0];
      t_last  = host.rxt[2 * n - 1];
      want_ns = longint'(2 * n - 1) * (10 * CPB + 1) * CLK_NS;
      check(t_last - t_first == want_ns,
            $sformatf("block time %0d ns, want %0d ns", t_last - t_first, want_ns));
      check(t_last - t_dd < 64'd2_730_000_000, "block sent within one revolution");
      $display("%0d samples sent in %0d ms after 0xDD", n, (t_last - t_dd) / 1_000_000);
    end
    host.rxq.delete();
    host.send_byte(CMD_END);
    wait_bytes(1, 30 * BIT_NS);
    check(host.rxq.size() >= 1 && host.rxq[host.rxq.size() - 1] == CMD_END, "0xEE answered");
    check(!params_valid, "parameters cleared");
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    // worked example: rings 139..191, sectors from 14, mode 3 (0x02)
    session('{ri: 16'd139, rf: 16'd191, ai: 8'd14, mode: 8'h02, total: 16'd2650});
    repeat (1000) @(negedge clk);
    // critical window: 64 rings x 8 sectors, mode 1 (0x00), 27 pulses
    session('{ri: 16'd0, rf: 16'd63, ai: 8'd0, mode: 8'h00, total: 16'd13824});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
