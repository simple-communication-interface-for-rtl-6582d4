// End-to-end testbench of sci_top at reduced speed: 16 clocks per bit and a
// simulated acquisition of 3000 clocks (the other parameters at their
// defaults, including the 16k x 14 RAM with its saw-tooth contents). A
// behavioural serial host plays the computer's side of the protocol and every
// received byte is checked against values worked out in the testbench:
//   - 0xEE in idle is answered with 0xEE;
//   - a frame with a wrong delimiter gets no ACK;
//   - a good frame whose fields hold 0xEE is stored and echoed, not taken
//     as a stop request;
//   - the acquisition delay (acq_enable) lasts DELAY_CYCLES clocks, then
//     0xDD is sent; nothing more is sent until the host answers 0xDD;
//   - the samples (low byte first) match a reference copy of the RAM,
//     including words written through the acquisition port, and the block
//     repeats after the next delay;
//   - 0xEE in the middle of a sample block stops it, is answered with 0xEE,
//     clears the parameters and leaves the interface idle;
//   - the configuration of the worked example (rings 139..191, sectors from
//     14, mode 0x02, 265 cells x 10 pulses = 2650 samples) runs one block
//     whose samples wrap around the 1728-sample saw-tooth.
// Each of these mechanisms is counted, and one that never happened is a
// failure.
`timescale 1ns/1ps
module tb_sci_top;
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
  logic [13:0] ref_mem [16384];
  int en_len = 0, last_en_len = 0, nxfer = 0;

  // mechanism counters
  int m_end_idle = 0, m_bad_frame = 0, m_ee_field = 0, m_ack = 0, m_delay = 0,
      m_dd_wait = 0, m_block = 0, m_repeat = 0, m_acq_write = 0, m_end_tx = 0,
      m_example = 0;

  sci_top #(.CLK_HZ(CPB * 100_000), .BAUD(100_000), .DELAY_CYCLES(DELAY)) dut (.*);
  uart_host #(.BIT_NS(BIT_NS)) host (.txd(rxd), .rxd(txd));

  always #(CLK_NS / 2) clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (acq_enable) en_len++;
    else if (en_len != 0) begin last_en_len = en_len; en_len = 0; end
    if (xfer_done) nxfer++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // wait until the host holds n bytes, or give up after max_ns
  task automatic wait_bytes(input int n, input longint max_ns);
    longint t0;
    t0 = $time;
    while (host.rxq.size() < n && $time - t0 < max_ns) #(BIT_NS);
  endtask

  function automatic void frame_of(input sci_params_t p, output logic [7:0] f[11]);
    f = '{8'hAA, p.ri[7:0], p.ri[15:8], p.rf[7:0], p.rf[15:8], p.ai,
          8'hBB, p.mode, 8'hCC, p.total[7:0], p.total[15:8]};
  endfunction

  task automatic send_frame(input logic [7:0] f[11]);
    for (int i = 0; i < 11; i++) host.send_byte(f[i]);
  endtask

  // configure, check the ACK and the stored parameters
  task automatic configure(input sci_params_t p);
    logic [7:0] f[11];
    frame_of(p, f);
    host.rxq.delete();
    send_frame(f);
    wait_bytes(11, 20 * 10 * BIT_NS);
    check(host.rxq.size() == 11, $sformatf("ACK length %0d", host.rxq.size()));
    for (int i = 0; i < 11; i++)
      check(i < host.rxq.size() && host.rxq[i] == f[i], $sformatf("ACK byte %0d", i));
    check(params == p && params_valid, "parameters stored");
    if (host.rxq.size() == 11) m_ack++;
    host.rxq.delete();
  endtask

  // one sample block: 0xDD, host's 0xDD, total samples
  task automatic run_block(input int total, input bit write_during_delay);
    int bad;
    // wait for 0xDD, optionally writing samples during the acquisition
    if (write_during_delay) begin
      @(negedge clk);
      while (!acq_enable) @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        acq_we = 1'b1; acq_waddr = 14'(i * 5); acq_wdata = 14'($urandom);
        ref_mem[acq_waddr] = acq_wdata;
        @(negedge clk);
      end
      acq_we = 1'b0;
      m_acq_write++;
    end
    wait_bytes(1, longint'(DELAY + 40 * CPB) * CLK_NS);
    check(host.rxq.size() == 1 && host.rxq[0] == CMD_DD, "0xDD announces samples");
    check(last_en_len == DELAY, $sformatf("acquisition lasted %0d clocks", last_en_len));
    if (last_en_len == DELAY) m_delay++;
    #(30 * BIT_NS);
    check(host.rxq.size() == 1, "nothing sent before the host's 0xDD");
    if (host.rxq.size() == 1) m_dd_wait++;
    host.rxq.delete();
    host.send_byte(CMD_DD);
    wait_bytes(2 * total, longint'(2 * total + 4) * 11 * BIT_NS);
    check(host.rxq.size() == 2 * total, $sformatf("block: %0d bytes for %0d samples",
                                                   host.rxq.size(), total));
    bad = 0;
    for (int i = 0; i < total && 2 * i + 1 < host.rxq.size(); i++) begin
      if ({host.rxq[2 * i + 1], host.rxq[2 * i]} != {2'b00, ref_mem[i]}) begin
        bad++;
        if (bad < 4) $display("sample %0d: got %02h%02h want %04h", i,
                              host.rxq[2 * i + 1], host.rxq[2 * i], ref_mem[i]);
      end
    end
    check(bad == 0, $sformatf("%0d wrong samples", bad));
    if (bad == 0 && host.rxq.size() == 2 * total) m_block++;
    host.rxq.delete();
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sci_params_t p;
    logic [7:0] f[11];
    int nx;
    for (int i = 0; i < 16384; i++) ref_mem[i] = (i < 13824) ? 14'((i % 1728) + 1) : 14'd0;
    #1 rst_n = 1'b0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);

    // 0xEE while idle
    host.rxq.delete();
    host.send_byte(CMD_END);
    wait_bytes(1, 20 * BIT_NS);
    check(host.rxq.size() == 1 && host.rxq[0] == CMD_END, "0xEE answered in idle");
    if (host.rxq.size() == 1 && host.rxq[0] == CMD_END) m_end_idle++;
    host.rxq.delete();

    // frame with a wrong 0xBB
    p = '{ri: 16'd10, rf: 16'd20, ai: 8'd3, mode: 8'd0, total: 16'd5};
    frame_of(p, f);
    f[6] = 8'hB0;
    send_frame(f);
    #(30 * BIT_NS);
    check(host.rxq.size() == 0 && !params_valid, "bad frame gets no ACK");
    if (host.rxq.size() == 0) m_bad_frame++;
    // the 0xCC and the two total bytes that follow the bad 0xBB fall into
    // idle and are ignored there

    // good frame whose Ai, Ri and total low bytes are 0xEE
    p = '{ri: 16'h01EE, rf: 16'd499, ai: 8'hEE, mode: 8'd0, total: 16'h00EE};
    configure(p);
    check(params.ai == 8'hEE, "0xEE inside the frame is data");
    if (params.ai == 8'hEE) m_ee_field++;
    run_block(int'(p.total), 1'b0);
    nx = nxfer;
    run_block(int'(p.total), 1'b1);
    if (nxfer == nx + 1) m_repeat++;

    // 0xEE in the middle of a block
    wait_bytes(1, longint'(DELAY + 40 * CPB) * CLK_NS);
    check(host.rxq.size() == 1 && host.rxq[0] == CMD_DD, "0xDD before the stop test");
    host.rxq.delete();
    host.send_byte(CMD_DD);
    wait_bytes(50, 60 * 11 * BIT_NS);
    host.send_byte(CMD_END);
    #(40 * BIT_NS);
    check(host.rxq.size() > 50 && host.rxq.size() < 2 * int'(p.total),
          $sformatf("block cut short after %0d bytes", host.rxq.size()));
    check(host.rxq.size() > 0 && host.rxq[host.rxq.size() - 1] == CMD_END,
          "0xEE answered during samples");
    check(!params_valid && params == '0, "parameters cleared");
    if (host.rxq.size() > 0 && host.rxq[host.rxq.size() - 1] == CMD_END &&
        host.rxq.size() < 2 * int'(p.total)) m_end_tx++;
    host.rxq.delete();
    repeat (2 * DELAY) @(negedge clk);
    check(host.rxq.size() == 0 && !acq_enable, "idle after 0xEE");

    // the worked example: 53 rings x 5 sectors x 10 pulses, mode 0x02
    p = '{ri: 16'd139, rf: 16'd191, ai: 8'd14, mode: 8'h02,
          total: 16'((191 - 139 + 1) * 5 * 10)};
    check(p.total == 16'd2650, "example total");
    configure(p);
    run_block(int'(p.total), 1'b0);
    if (ref_mem[1728] == 14'd1) m_example++;
    host.rxq.delete();
    host.send_byte(CMD_END);
    wait_bytes(1, 30 * BIT_NS);
    check(host.rxq.size() == 1 && host.rxq[0] == CMD_END, "final 0xEE answered");
    check(host.nbad == 0 && rx_frame_err == 1'b0, "no framing errors");

    $display("mechanisms: end_idle=%0d bad_frame=%0d ee_field=%0d ack=%0d delay=%0d dd_wait=%0d block=%0d repeat=%0d acq_write=%0d end_tx=%0d example=%0d",
             m_end_idle, m_bad_frame, m_ee_field, m_ack, m_delay, m_dd_wait, m_block,
             m_repeat, m_acq_write, m_end_tx, m_example);
    check(m_end_idle > 0, "mechanism: 0xEE in idle");
    check(m_bad_frame > 0, "mechanism: bad frame rejected");
    check(m_ee_field > 0, "mechanism: 0xEE as frame data");
    check(m_ack > 0, "mechanism: ACK echo");
    check(m_delay > 0, "mechanism: simulated acquisition delay");
    check(m_dd_wait > 0, "mechanism: wait for ACK DD");
    check(m_block > 0, "mechanism: sample block");
    check(m_repeat > 0, "mechanism: repeated block");
    check(m_acq_write > 0, "mechanism: acquisition write port");
    check(m_end_tx > 0, "mechanism: 0xEE during transmission");
    check(m_example > 0, "mechanism: worked example");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
