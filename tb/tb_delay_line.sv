// tb_delay_line: checks the delay-line model. Each input edge must reach the
// output inverted (51 stages, an odd count) exactly N_INV * stage delay later,
// not earlier; then the stage delay is raised, as heating would, and the new
// delay is checked the same way.
`timescale 1ns/1ps
module tb_delay_line;
  int checks = 0, failures = 0;
  logic sgnl = 1'b0;
  logic dly;

  delay_line dut (.sgnl(sgnl), .delayed_sgnl(dly));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  task automatic edge_test(input real d_total);
    logic prev_out;
    sgnl = ~sgnl;
    prev_out = dly;
    #(d_total - 0.05);
    check(dly == prev_out, "output changed too early");
    #(0.1);
    check(dly == ~sgnl, "output not inverted input after chain delay");
    #(d_total);
  endtask

  initial begin
    #100;  // power-up settling
    check(dly == ~sgnl, "settled output");
    repeat (6) edge_test(51 * 0.4169);
    dut.stage_delay_fs = 450_000;
    #50;
    repeat (6) edge_test(51 * 0.45);
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
