// Self-checking testbench of samples_tx with DELAY_CYCLES = 100. A reference
// RAM model in the testbench answers reads one clock later with a known
// function of the address; the transmitter's ready stalls at random. For
// several blocks of different sizes it checks that acq_enable stays high for
// exactly DELAY_CYCLES clocks, that 0xDD is the first byte offered, that
// nothing is sent before the ACK DD (dd_rx), that the samples of addresses
// 0..total-1 follow low byte first, that xfer_done pulses once per block and
// that the loop restarts. A total of zero and a clear in the middle of a
// block are exercised too.
`timescale 1ns/1ps
module tb_samples_tx;
  import sci_pkg::*;
  localparam int unsigned DELAY = 100;
  logic clk = 1'b0, rst_n = 1'b1, clear = 1'b0, start = 1'b0, dd_rx = 1'b0, tx_ready = 1'b0;
  logic [15:0] total = '0;
  tx_req_t tx_req;
  logic ram_re, acq_enable, xfer_done;
  logic [13:0] ram_addr, ram_rdata;
  int checks = 0, failures = 0;
  logic [7:0] got[$];
  int en_len = 0, last_en_len = 0, ndone = 0;

  samples_tx #(.DELAY_CYCLES(DELAY)) dut (.*);

  function automatic logic [13:0] word(input logic [13:0] a);
    return 14'((a * 37 + 5) & 14'h3fff);
  endfunction

  always #5 clk = ~clk;
  always @(posedge clk) if (ram_re) ram_rdata <= word(ram_addr);
  always @(posedge clk) if (rst_n) begin
    if (tx_req.valid && tx_ready) got.push_back(tx_req.data);
    if (xfer_done) ndone++;
    if (acq_enable) en_len++;
    else if (en_len != 0) begin last_en_len = en_len; en_len = 0; end
  end
  always @(negedge clk) tx_ready <= ($urandom_range(0, 3) != 0);

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

  // One block: wait for 0xDD, answer, collect and check n samples.
  task automatic block(input int n);
    int nd;
    got.delete();
    nd = ndone;
    total = 16'(n);
    while (got.size() == 0) @(negedge clk);
    check(last_en_len == DELAY, $sformatf("acquisition delay %0d clocks", last_en_len));
    check(got[0] == CMD_DD, $sformatf("first byte %02h is 0xDD", got[0]));
    repeat (40) @(negedge clk);
    check(got.size() == 1, "nothing sent before ACK DD");
    dd_rx = 1'b1; @(negedge clk); dd_rx = 1'b0;
    while (ndone == nd) @(negedge clk);
    check(got.size() == 1 + 2 * n, $sformatf("block of %0d: %0d bytes", n, got.size()));
    for (int i = 0; i < n && 2 * i + 2 < got.size(); i++) begin
      logic [13:0] w;
      w = word(14'(i));
      check(got[1 + 2 * i] == w[7:0] && got[2 + 2 * i] == {2'b00, w[13:8]},
            $sformatf("sample %0d", i));
    end
    @(negedge clk);
    check(ndone == nd + 1, "one xfer_done");
    check(acq_enable, "next acquisition started");
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(!acq_enable && !tx_req.valid, "idle before start");
    start = 1'b1; @(negedge clk); start = 1'b0;
    block(7);
    block(1);
    block(0);
    block(150);
    // clear in the middle of a block
    got.delete();
    total = 16'd200;
    while (got.size() == 0) @(negedge clk);
    dd_rx = 1'b1; @(negedge clk); dd_rx = 1'b0;
    repeat (50) @(negedge clk);
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    @(negedge clk);
    check(!tx_req.valid && !acq_enable && !ram_re, "clear stops the block");
    repeat (300) @(negedge clk);
    check(!tx_req.valid && !acq_enable, "stays idle after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
