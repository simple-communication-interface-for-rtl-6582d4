// Self-checking testbench of ack_gen. For random parameter records it starts
// the echo, accepts bytes with a randomly stalling ready, and compares the
// 11 accepted bytes with a frame built independently in the testbench. It
// also checks the done pulse and that clear abandons a sequence.
`timescale 1ns/1ps
module tb_ack_gen;
  import sci_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, clear = 1'b0, start = 1'b0, tx_ready = 1'b0;
  sci_params_t params = '0;
  tx_req_t tx_req;
  logic done;
  int checks = 0, failures = 0;
  logic [7:0] got[$];
  int ndone = 0;

  ack_gen dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (tx_req.valid && tx_ready) got.push_back(tx_req.data);
    if (done) ndone++;
  end
  always @(negedge clk) tx_ready <= ($urandom_range(0, 2) == 0);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] want[11];
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 12; k++) begin
      params.ri = 16'($urandom_range(0, 499)); params.rf = 16'($urandom_range(0, 499));
      params.ai = (k == 0) ? 8'hEE : 8'($urandom_range(0, 199));
      params.mode = 8'($urandom_range(0, 3)); params.total = 16'($urandom_range(1, 13824));
      want = '{8'hAA, params.ri[7:0], params.ri[15:8], params.rf[7:0], params.rf[15:8],
               params.ai, 8'hBB, params.mode, 8'hCC, params.total[7:0], params.total[15:8]};
      got.delete();
      ndone = 0;
      start = 1'b1; @(negedge clk); start = 1'b0;
      if (k == 5) begin
        // abandon this one part way
        repeat (20) @(negedge clk);
        clear = 1'b1; @(negedge clk); clear = 1'b0;
        repeat (30) @(negedge clk);
        check(!tx_req.valid && ndone == 0, "clear abandons the echo");
        continue;
      end
      while (ndone == 0) @(negedge clk);
      check(got.size() == 11, $sformatf("frame %0d: %0d bytes", k, got.size()));
      for (int i = 0; i < 11; i++)
        check(got.size() == 11 && got[i] == want[i],
              $sformatf("frame %0d byte %0d: got %02h want %02h", k, i,
                        (i < got.size()) ? got[i] : 8'h00, want[i]));
      repeat (5) @(negedge clk);
      check(ndone == 1 && !tx_req.valid, "one done, then idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
