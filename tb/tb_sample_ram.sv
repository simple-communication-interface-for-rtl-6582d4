// Self-checking testbench of sample_ram at its full size (16384 x 14). Reads
// back the whole initial saw-tooth pattern ((addr mod 1728) + 1 for the first
// 13824 words, 0 after), checks the one-clock read latency and that rdata
// holds between reads, then writes random words at random addresses and
// reads them back against a reference copy.
`timescale 1ns/1ps
module tb_sample_ram;
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [13:0] waddr = '0, raddr = '0, wdata = '0, rdata;
  logic [13:0] ref_mem [16384];
  int checks = 0, failures = 0;

  sample_ram dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    for (int i = 0; i < 16384; i++) ref_mem[i] = (i < 13824) ? 14'((i % 1728) + 1) : 14'd0;
    @(negedge clk);
    bad = 0;
    for (int i = 0; i < 16384; i++) begin
      re = 1'b1; raddr = 14'(i);
      @(negedge clk);
      if (rdata != ref_mem[i]) begin
        bad++;
        if (bad < 5) $display("init word %0d: got %0d want %0d", i, rdata, ref_mem[i]);
      end
    end
    check(bad == 0, $sformatf("initial pattern, %0d bad words", bad));
    check(rdata == 14'd0, "last word is zero");
    // named spots of the pattern
    re = 1'b1; raddr = 14'd1727; @(negedge clk); check(rdata == 14'd1728, "word 1727 = 1728");
    raddr = 14'd1728; @(negedge clk); check(rdata == 14'd1, "word 1728 = 1");
    raddr = 14'd13823; @(negedge clk); check(rdata == 14'd1728, "word 13823 = 1728");
    // rdata holds while re is low
    re = 1'b0; raddr = 14'd5;
    repeat (3) @(negedge clk);
    check(rdata == 14'd1728, "rdata holds without re");
    // random writes and reads
    for (int k = 0; k < 500; k++) begin
      we = 1'b1; waddr = 14'($urandom); wdata = 14'($urandom); re = 1'b0;
      ref_mem[waddr] = wdata;
      @(negedge clk);
      we = 1'b0;
      re = 1'b1; raddr = (k % 2) ? waddr : 14'($urandom);
      @(negedge clk);
      check(rdata == ref_mem[raddr], $sformatf("read %0d after write", raddr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
