// uart_rx_model: testbench receiver for an 8N1 serial line. It waits for a
// falling edge, samples the start bit half a bit time later, then each data bit
// (least significant first) and the stop bit one bit time apart, counted in
// clock cycles. Received bytes are appended to the queue `bytes` with the cycle
// of their start edge in `starts`; a start bit that is not low or a stop bit that
// is not high counts in framing_errors. The first five cycles are ignored.
`timescale 1ns/1ps
module uart_rx_model #(
  parameter int BIT_CYCLES = 5208
) (
  input logic clk,
  input logic line
);
  byte unsigned bytes[$];
  longint       starts[$];
  int           framing_errors = 0;
  longint       cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    logic [7:0] b;
    logic       prev;
    longint     t0;
    prev = 1'b1;
    repeat (5) @(posedge clk);  // let the transmitter leave reset
    forever begin
      @(posedge clk);
      if (prev && !line) begin
        t0 = cyc;
        repeat (BIT_CYCLES / 2) @(posedge clk);
        if (line !== 1'b0) framing_errors++;
        for (int i = 0; i < 8; i++) begin
          repeat (BIT_CYCLES) @(posedge clk);
          b[i] = line;
        end
        repeat (BIT_CYCLES) @(posedge clk);
        if (line !== 1'b1) framing_errors++;
        bytes.push_back(b);
        starts.push_back(t0);
      end
      prev = line;
    end
  end
endmodule
