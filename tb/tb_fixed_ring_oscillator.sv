// tb_fixed_ring_oscillator: the synchronized output must equal the raw ring
// output as it was two clock edges earlier, and over 20 us it must show as many
// rising edges as the ring period predicts (20000 / 42.53 ns, within one).
`timescale 1ns/1ps
module tb_fixed_ring_oscillator;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic en = 1'b0;
  logic sync_osc;
  logic raw_d1, raw_d2;
  logic prev_sync;
  int rises = 0;
  bit counting = 0;
  int cyc = 0;

  always #5 clk = ~clk;

  fixed_ring_oscillator dut (.clk(clk), .en(en), .sync_oscillation(sync_osc));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // Reference pipeline on the raw ring output, sampled at the same edges.
  always @(posedge clk) begin
    raw_d1 <= dut.osc;
    raw_d2 <= raw_d1;
    prev_sync <= sync_osc;
    cyc++;
    if (cyc > 4) check(sync_osc == raw_d2, "two-stage delay");
    if (counting && sync_osc && !prev_sync) rises++;
  end

  initial begin
    real expect_r;
    #100;
    en = 1'b1;
    #500;
    @(posedge clk);
    counting = 1;
    #20000;
    counting = 0;
    expect_r = 20000.0 / (2.0 * 51 * 0.4169);
    $display("rises %0d expected %f", rises, expect_r);
    checks++;
    if (rises < $rtoi(expect_r) - 1 || rises > $rtoi(expect_r) + 2) begin
      failures++; $display("FAIL: edge count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
