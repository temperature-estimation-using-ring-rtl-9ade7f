// tb_ctc_lut: compares the table with the calibration quadratic evaluated in
// floating point, T = -0.000234 c^2 + 0.2476 c + 6.3231 rounded to 0.1 degC, for
// every calibrated count 55..449, checks points of the published conversion
// table (count -> degC), and checks clamping and in_range outside the range.
`timescale 1ns/1ps
module tb_ctc_lut;
  int checks = 0, failures = 0;
  logic [31:0] count;
  logic [9:0]  t10;
  logic        inr;

  ctc_lut dut (.count(count), .temp_tenths(t10), .in_range(inr));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic point(input int n, input int tenths);
    count = 32'(n); #1;
    check(inr && t10 == 10'(tenths), $sformatf("count %0d: %0d expected %0d", n, t10, tenths));
  endtask

  initial begin
    real t;
    int  ref10;
    for (int c = 55; c <= 449; c++) begin
      t = -0.000234 * c * c + 0.2476 * c + 6.3231;
      ref10 = $rtoi(t * 10.0 + 0.5);
      count = 32'(69420 + c); #1;
      check(inr == 1'b1, $sformatf("in range at c=%0d", c));
      check(t10 == 10'(ref10), $sformatf("c=%0d: %0d expected %0d", c, t10, ref10));
    end
    // published table points
    point(69475, 192); point(69520, 287); point(69550, 346); point(69600, 433);
    point(69685, 555); point(69724, 600); point(69750, 625); point(69821, 680);
    point(69840, 690); point(69869, 703);
    // outside the calibration
    count = 32'd69474; #1; check(!inr && t10 == 10'd192, "below range clamps low");
    count = 32'd0;     #1; check(!inr && t10 == 10'd192, "zero clamps low");
    count = 32'd69870; #1; check(!inr && t10 == 10'd703, "above range clamps high");
    count = 32'hFFFF_FFFF; #1; check(!inr && t10 == 10'd703, "max clamps high");
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
