// tb_send_get_state_machine: send must be low after reset and flip exactly
// once, one cycle later, for every tick; it must hold between ticks.
`timescale 1ns/1ps
module tb_send_get_state_machine;
  int checks = 0, failures = 0;
  logic clk = 1'b0, reset = 1'b1, tick = 1'b0;
  logic send;
  logic expected = 1'b0;
  int toggles = 0;

  always #5 clk = ~clk;

  send_get_state_machine dut (.clk(clk), .reset(reset), .tick(tick), .send(send));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(send == 1'b0, "reset value");
    reset = 1'b0;
    repeat (500) begin
      @(negedge clk);
      tick = ($urandom_range(0, 3) == 0);
      if (tick) begin expected = ~expected; toggles++; end
      @(posedge clk);
      #1 check(send == expected, "send follows ticks");
    end
    check(toggles > 50, "enough toggles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
