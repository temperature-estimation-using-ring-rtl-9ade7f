// tb_ring_oscillator: with en low the output must stay low; with en high the
// period must be 2 * N_INV * stage delay (Equation f = 1 / (2 N tau)); after en
// drops the output must return low and stay there.
`timescale 1ns/1ps
module tb_ring_oscillator;
  int checks = 0, failures = 0;
  logic en = 1'b0;
  logic osc;
  realtime t_first, t_last;
  int rises = 0;
  int rises_off = 0;
  bit measuring = 0;

  ring_oscillator dut (.en(en), .osc(osc));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  always @(posedge osc) begin
    if (!en) rises_off++;
    if (measuring) begin
      if (rises == 0) t_first = $realtime;
      t_last = $realtime;
      rises++;
    end
  end

  initial begin
    real period, expect_p;
    repeat (20) begin #10; check(osc == 1'b0, "osc low while disabled"); end
    en = 1'b1;
    #200;
    measuring = 1;
    #4300;
    measuring = 0;
    period   = (t_last - t_first) / (rises - 1);
    expect_p = 2.0 * 51 * 0.4169;
    $display("period %f ns expected %f ns over %0d rises", period, expect_p, rises);
    check(rises > 90, "oscillating");
    check(period > expect_p - 0.01 && period < expect_p + 0.01, "period");
    en = 1'b0;
    #100;
    repeat (20) begin #10; check(osc == 1'b0, "osc low after disable"); end
    check(rises_off == 0, "no edges while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
