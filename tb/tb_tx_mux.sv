// Self-checking testbench of tx_mux. Applies random requests, selects and
// ready values and checks that the selected request reaches the transmitter
// and that ready returns only to the selected source.
`timescale 1ns/1ps
module tb_tx_mux;
  import sci_pkg::*;
  tx_sel_e sel;
  tx_req_t ack_req, smp_req, end_req, tx_req, want;
  logic tx_ready, ack_ready, smp_ready, end_ready;
  int checks = 0, failures = 0;

  tx_mux dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 300; k++) begin
      int s;
      s = k % 3;
      sel = tx_sel_e'(s);
      ack_req = tx_req_t'($urandom); smp_req = tx_req_t'($urandom);
      end_req = tx_req_t'($urandom); tx_ready = 1'($urandom);
      #1;
      want = (s == 0) ? ack_req : (s == 1) ? smp_req : end_req;
      check(tx_req == want, $sformatf("sel %0d request", s));
      check(ack_ready == (s == 0 && tx_ready) && smp_ready == (s == 1 && tx_ready) &&
            end_ready == (s == 2 && tx_ready), $sformatf("sel %0d ready", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
