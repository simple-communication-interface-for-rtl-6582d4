// Self-checking testbench of param_regs. Loads random parameter records,
// checks that they appear on the next clock and are held while load is low,
// that clear zeroes them and lowers params_valid, and that clear wins over a
// simultaneous load.
`timescale 1ns/1ps
module tb_param_regs;
  import sci_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, clear = 1'b0, load = 1'b0, params_valid;
  sci_params_t d = '0, params, want;
  int checks = 0, failures = 0;

  param_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic sci_params_t rnd();
    sci_params_t p;
    p.ri = 16'($urandom_range(0, 499)); p.rf = 16'($urandom_range(0, 499));
    p.ai = 8'($urandom_range(0, 199));  p.mode = 8'($urandom_range(0, 3));
    p.total = 16'($urandom);
    return p;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(params == '0 && !params_valid, "reset state");
    for (int k = 0; k < 20; k++) begin
      want = rnd();
      d = want; load = 1'b1;
      @(negedge clk);
      load = 1'b0; d = rnd();
      check(params == want && params_valid, $sformatf("load %0d", k));
      check(params.total == want.total && params.ri == want.ri, "fields");
      repeat (2) @(negedge clk);
      check(params == want, $sformatf("hold %0d", k));
      if (k % 5 == 4) begin
        clear = 1'b1; load = (k % 10 == 9);
        @(negedge clk);
        clear = 1'b0; load = 1'b0;
        check(params == '0 && !params_valid, $sformatf("clear %0d", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
