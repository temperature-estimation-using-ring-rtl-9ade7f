// tb_ro_counter: the full measuring chain at its default size (51-stage ring,
// 2^14-period window, 100 MHz clock). The sample must equal the window length in
// clock cycles less one, where the window is 2^14 ring periods of
// 2 * 51 * stage delay (the half period rounded to the simulator's 1 ps):
// within one count. The stage delay is then raised twice,
// as a warming die would, and the count must follow; while send is high the
// sample must hold.
`timescale 1ns/1ps
module tb_ro_counter;
  int checks = 0, failures = 0;
  logic clk = 1'b0, reset = 1'b1, send = 1'b0;
  logic [31:0] sample;
  logic done;
  int windows = 0;

  always #5 clk = ~clk;

  ro_counter dut (.clk(clk), .reset(reset), .send(send), .sample(sample), .window_done(done));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (done) windows <= windows + 1;

  task automatic measure(input real d);
    real expect_c;
    int  diff;
    dut.u_osc.u_ring.u_line.stage_delay_fs = int'(d * 1.0e6);
    repeat (2) @(posedge clk iff done);
    @(posedge clk);
    expect_c = 16384.0 * 2.0 * $rtoi(51 * d * 1000.0 + 0.5) / 10000.0 - 1.0;  // half period rounds to 1 ps
    diff = int'(sample) - $rtoi(expect_c + 0.5);
    $display("stage %f ns: sample %0d expected %f", d, sample, expect_c);
    check(diff >= -1 && diff <= 1, "count matches ring period");
  endtask

  initial begin
    logic [31:0] held;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    measure(0.4169);
    measure(0.4158);
    measure(0.4180);
    send = 1'b1;
    @(posedge clk);
    held = sample;
    dut.u_osc.u_ring.u_line.stage_delay_fs = 416_500;
    repeat (2) @(posedge clk iff done);
    @(posedge clk);
    check(sample == held, "sample held while send is high");
    send = 1'b0;
    measure(0.4165);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
