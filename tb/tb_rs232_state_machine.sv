// tb_rs232_state_machine: random 48-bit words are sent with a bit tick every
// 4 cycles. A receiver model must get the six bytes, lowest first, with correct
// start and stop bits, back to back (60 bit times from first start edge to the
// end of the last stop bit). A word must go out exactly once per send phase;
// with button low nothing may be sent; the word is captured when the transfer
// starts, so changing db during it must not matter.
`timescale 1ns/1ps
module tb_rs232_state_machine;
  localparam int BT = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, reset = 1'b1;
  logic baud_tick;
  logic [47:0] db;
  logic send = 1'b0, button = 1'b1;
  logic bitout, busy;
  int tcnt = 0;

  always #5 clk = ~clk;
  always @(posedge clk) tcnt <= (tcnt == BT - 1) ? 0 : tcnt + 1;
  assign baud_tick = (tcnt == BT - 1);

  rs232_state_machine dut (.clk(clk), .reset(reset), .baud_tick(baud_tick), .db(db),
    .send(send), .button(button), .bitout(bitout), .busy(busy));
  uart_rx_model #(.BIT_CYCLES(BT)) rx (.clk(clk), .line(bitout));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  task automatic one_phase(input logic [47:0] word);
    logic [47:0] got;
    db = word;
    rx.bytes.delete(); rx.starts.delete();
    @(negedge clk) send = 1'b1;
    repeat (2) @(posedge clk iff baud_tick);
    db = ~word;   // must not affect the word in flight
    repeat (100) @(posedge clk iff baud_tick);
    check(rx.bytes.size() == 6, $sformatf("six bytes per phase, got %0d", rx.bytes.size()));
    if (rx.bytes.size() == 6) begin
      for (int i = 0; i < 6; i++) got[8*i +: 8] = rx.bytes[i];
      check(got == word, $sformatf("word %h got %h", word, got));
      check(rx.starts[5] - rx.starts[0] == 50 * BT, "bytes back to back");
    end
    check(bitout == 1'b1, "line idle high after word");
    @(negedge clk) send = 1'b0;
    repeat (20) @(posedge clk iff baud_tick);
  endtask

  initial begin
    db = '0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    repeat (10) @(posedge clk);
    check(bitout == 1'b1, "idle high");
    for (int k = 0; k < 6; k++) one_phase(48'({$urandom(), $urandom()}));
    one_phase(48'h0000_0000_0000);
    one_phase(48'hFFFF_FFFF_FFFF);
    // button low blocks sending
    button = 1'b0;
    rx.bytes.delete();
    @(negedge clk) send = 1'b1;
    repeat (100) @(posedge clk iff baud_tick);
    check(rx.bytes.size() == 0, "nothing sent with button low");
    @(negedge clk) send = 1'b0;
    button = 1'b1;
    check(rx.framing_errors == 0, "no framing errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
