// tb_counting_state_machine: drives the counter with a clean synchronous
// square wave of P clock cycles per period. In steady state a window ends every
// CYCLES * P cycles (checked between window_done pulses) and sample must read
// CYCLES * P - 1 (the terminal cycle does not count). While send is high the
// sample must not change, and the next window after send drops must update it.
// A second instance at the default 2^14 periods and P = 4 checks the full-size
// value 65535.
`timescale 1ns/1ps
module tb_counting_state_machine;
  localparam int CYC = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, reset = 1'b1;
  logic osc = 1'b0, osc_big = 1'b0;
  logic send = 1'b0;
  logic [31:0] sample, sample_big;
  logic done, done_big;
  int period = 4;
  int phase = 0;
  int ph_big = 0;
  int cyc = 0, last_done = -1;
  int n_done = 0, n_big = 0;

  always #5 clk = ~clk;

  counting_state_machine #(.CYCLES(CYC)) dut (
    .clk(clk), .reset(reset), .osc(osc), .send(send), .sample(sample), .window_done(done));
  counting_state_machine dut_big (
    .clk(clk), .reset(reset), .osc(osc_big), .send(1'b0), .sample(sample_big), .window_done(done_big));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // Oscillator stand-ins: high for the first half of each period.
  always @(posedge clk) begin
    phase  <= (phase + 1 >= period) ? 0 : phase + 1;
    osc    <= (phase + 1 >= period) ? 1'b1 : (phase + 1 < period / 2);
    ph_big <= (ph_big == 3) ? 0 : ph_big + 1;
    osc_big <= (ph_big == 3) || (ph_big == 0);
    cyc <= cyc + 1;
  end

  int last_gap = 0;
  always @(posedge clk) if (!reset && done) begin
    n_done <= n_done + 1;
    last_gap <= cyc - last_done;
    last_done <= cyc;
  end

  task automatic run_period(input int p);
    int gap;
    period = p;
    // let two windows pass to settle
    repeat (2) begin @(posedge clk iff done); end
    repeat (3) begin
      @(posedge clk iff done);
      @(posedge clk);
      gap = last_gap;
      check(gap == CYC * p, $sformatf("window length %0d for P=%0d", gap, p));
      check(sample == 32'(CYC * p - 1), $sformatf("sample %0d for P=%0d", sample, p));
    end
  endtask

  initial begin
    logic [31:0] held;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    run_period(4);
    run_period(7);
    run_period(2);
    run_period(11);
    // hold while sending
    send = 1'b1;
    @(posedge clk);
    held = sample;
    period = 5;
    repeat (4) begin
      @(posedge clk iff done);
      @(posedge clk);
      check(sample == held, "sample held while send is high");
    end
    send = 1'b0;
    repeat (2) @(posedge clk iff done);
    @(posedge clk);
    check(sample == 32'(CYC * 5 - 1), "sample updates after send drops");
    // full-size window
    @(posedge clk iff done_big);
    @(posedge clk iff done_big);
    @(posedge clk);
    check(sample_big == 32'd65535, $sformatf("full-size sample %0d", sample_big));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
