// tb_clock_convert: with small dividers the first tick of each output must
// come HALF cycles after reset and the following ones every 2*HALF cycles; the
// default divider's baud tick must recur every 5208 cycles (19201 Hz).
`timescale 1ns/1ps
module tb_clock_convert;
  localparam int SH = 7, BH = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0, reset = 1'b1;
  logic st, bt, st_def, bt_def;
  int cyc = 0;
  int last_st = 0, last_bt = 0, last_bd = -1;
  int n_st = 0, n_bt = 0, n_bd = 0;

  always #5 clk = ~clk;

  clock_convert #(.STATE_HALF(SH), .BAUD_HALF(BH)) dut (
    .clk(clk), .reset(reset), .state_tick(st), .baud_tick(bt));
  clock_convert dut_def (.clk(clk), .reset(reset), .state_tick(st_def), .baud_tick(bt_def));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // cyc counts clock edges since reset was released; a tick seen at edge k.
  always @(posedge clk) if (!reset) begin
    cyc <= cyc + 1;
    if (st) begin
      check((n_st == 0) ? (cyc + 1 == SH) : (cyc - last_st == 2 * SH), "state tick spacing");
      last_st <= cyc; n_st <= n_st + 1;
    end
    if (bt) begin
      check((n_bt == 0) ? (cyc + 1 == BH) : (cyc - last_bt == 2 * BH), "baud tick spacing");
      last_bt <= cyc; n_bt <= n_bt + 1;
    end
    if (bt_def) begin
      if (n_bd > 0) check(cyc - last_bd == 5208, "default baud period 5208");
      last_bd <= cyc; n_bd <= n_bd + 1;
    end
    check(!st_def, "no 1 Hz tick in this short run");
  end

  initial begin
    repeat (3) @(posedge clk);
    reset = 1'b0;
    repeat (30000) @(posedge clk);
    check(n_st > 100 && n_bt > 100 && n_bd >= 5, "ticks seen");
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
