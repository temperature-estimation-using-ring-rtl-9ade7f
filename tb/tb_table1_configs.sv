// tb_table1_configs: runs the measuring chain (ro_counter) in the ring-length /
// window-length combinations of the early exploration (for example 421
// inverters over 256 periods, 51 over 13579, 25 over 15000). A 4200-inverter
// ring and a 100-inverter one are left out: with an even number of inversions
// they cannot oscillate. For each one the
// per-inverter delay is set to the value the published count implies,
// delay = count * 10 ns / (2 * inverters * periods), and the counter must then
// report that count (within 0.5 %, the published counts being rounded) and,
// exactly, the window length less one for the simulated period. A 16-bit
// counter at the default 51 inverters / 2^14 periods must wrap (about 69670 >
// 65535), the overflow that led to the 32-bit counter. Last, the proposed
// 511-inverter ring at the data-sheet delay of 0.238 ns (about 121.6 ns through
// the ring) must give its window count, about ten times the 51-inverter one.
`timescale 1ns/1ps
module tb_table1_configs;
  localparam int NCFG = 10;
  localparam int    INV  [NCFG] = '{421, 421, 421,  41,   41,   41,  51,    51,    51,    25};
  localparam int    CYC  [NCFG] = '{256, 512, 1000, 1000, 4096, 8192, 10000, 12345, 13579, 15000};
  localparam int    CNT  [NCFG] = '{8100, 16200, 33400, 4300, 16700, 31500, 41000, 49100, 56200, 33500};

  int checks = 0, failures = 0;
  logic clk = 1'b0, reset = 1'b1;
  logic [31:0] sample [NCFG];
  logic        done   [NCFG];
  logic [15:0] sample16;
  logic        done16;
  int          ndone  [NCFG];
  logic [31:0] sample511;
  logic        done511;

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    localparam real D = CNT[i] * 10.0 / (2.0 * INV[i] * CYC[i]);
    ro_counter #(.N_INV(INV[i]), .STAGE_DELAY_NS(D), .CYCLES(CYC[i])) u (
      .clk(clk), .reset(reset), .send(1'b0), .sample(sample[i]), .window_done(done[i]));
    initial ndone[i] = 0;
    always @(posedge clk) if (!reset && done[i]) ndone[i] <= ndone[i] + 1;
  end

  ro_counter #(.COUNT_W(16)) u16 (
    .clk(clk), .reset(reset), .send(1'b0), .sample(sample16), .window_done(done16));

  ro_counter #(.N_INV(511), .STAGE_DELAY_NS(0.238)) u511 (
    .clk(clk), .reset(reset), .send(1'b0), .sample(sample511), .window_done(done511));

  initial begin
    bit all_done;
    real d, expect_c, dev;
    int diff, n16, n511;
    n16 = 0;
    n511 = 0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    do begin
      @(posedge clk);
      if (done16) n16++;
      if (done511) n511++;
      all_done = 1;
      for (int i = 0; i < NCFG; i++) if (ndone[i] < 2) all_done = 0;
      if (n16 < 2 || n511 < 2) all_done = 0;
    end while (!all_done);
    @(posedge clk);
    for (int i = 0; i < NCFG; i++) begin
      d = CNT[i] * 10.0 / (2.0 * INV[i] * CYC[i]);
      expect_c = CYC[i] * 2.0 * $rtoi(INV[i] * d * 1000.0 + 0.5) / 10000.0 - 1.0;
      diff = int'(sample[i]) - $rtoi(expect_c + 0.5);
      dev = (real'(sample[i]) - CNT[i]) / CNT[i];
      $display("%0d inverters, %0d periods: count %0d (published %0d)", INV[i], CYC[i], sample[i], CNT[i]);
      check(diff >= -1 && diff <= 1, $sformatf("window count, config %0d", i));
      check(dev > -0.005 && dev < 0.005, $sformatf("published count, config %0d", i));
    end
    expect_c = 16384.0 * 2.0 * $rtoi(51 * 0.4169 * 1000.0 + 0.5) / 10000.0 - 1.0;
    $display("16-bit counter, 51 inverters, 16384 periods: %0d (full count %f)", sample16, expect_c);
    diff = int'(sample16) - ($rtoi(expect_c + 0.5) - 65536);
    check(diff >= -1 && diff <= 1, "16-bit counter wraps past 65535");
    expect_c = 16384.0 * 2.0 * $rtoi(511 * 0.238 * 1000.0 + 0.5) / 10000.0 - 1.0;
    $display("511 inverters at 0.238 ns, 16384 periods: %0d (expected %f)", sample511, expect_c);
    diff = int'(sample511) - $rtoi(expect_c + 0.5);
    check(diff >= -1 && diff <= 1, "511-inverter window count");
    check(sample511 > 398_000 && sample511 < 399_000, "511-inverter count near 2^14 * 2 * 121.6 ns / 10 ns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    for (int i = 0; i < NCFG; i++) $display("cfg %0d windows %0d sample %0d", i, ndone[i], sample[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
