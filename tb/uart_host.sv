// Behavioural model of the computer's serial port for the top-level
// testbenches (not synthesizable). It sends bytes on txd with send_byte()
// (1 start bit, 8 data bits LSB first, 1 stop bit, BIT_NS per bit) and
// decodes every byte that arrives on rxd, sampling each bit in its middle.
// Decoded bytes are appended to the queue rxq with their arrival times in
// rxt; nbad counts bytes whose stop bit was low.
`timescale 1ns/1ps
module uart_host #(
  parameter int unsigned BIT_NS = 8680
) (
  output logic txd,
  input  logic rxd
);
  logic [7:0] rxq[$];
  longint     rxt[$];
  int         nbad = 0;

  initial txd = 1'b1;

  task automatic send_byte(input logic [7:0] b);
    txd = 1'b0;
    #(BIT_NS);
    for (int i = 0; i < 8; i++) begin
      txd = b[i];
      #(BIT_NS);
    end
    txd = 1'b1;
    #(BIT_NS);
  endtask

  initial begin
    logic [7:0] b;
    #100;
    forever begin
      @(negedge rxd);
      #(BIT_NS / 2);
      if (rxd == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          #(BIT_NS);
          b[i] = rxd;
        end
        #(BIT_NS);
        if (rxd) begin
          rxq.push_back(b);
          rxt.push_back(longint'($time));
        end else begin
          nbad++;
        end
      end
    end
  end
endmodule
