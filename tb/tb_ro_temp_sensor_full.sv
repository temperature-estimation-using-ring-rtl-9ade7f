// tb_ro_temp_sensor_full: one complete operation of the sensor at its default
// size: 51-stage ring, 2^14-period window, 100 MHz clock, 1 Hz send/get rate
// and 19200 baud (5208 cycles per bit). From reset the sensor measures for half
// a second, then the first send phase starts and one 48-bit frame goes out. The
// frame is received and checked: count against the ring period (within one),
// System Monitor field, pad bits, bit timing, start within one bit time of the
// send phase, and the CTC output against the calibration quadratic. About 0.51 s
// of simulated time.
`timescale 1ns/1ps
module tb_ro_temp_sensor_full;
  localparam int BITC = 5208;
  int checks = 0, failures = 0;
  logic clk = 1'b0, reset = 1'b1;
  logic bitout;
  logic [15:0] sm_do;
  logic [4:0]  sm_ch;
  logic        sm_eos, sm_drdy, sm_den;
  logic [6:0]  sm_addr;
  logic [31:0] sample;
  logic [9:0]  t10;
  logic        inr;
  longint      cyc = 0, send_cyc = -1;
  int          windows = 0;

  always #5 clk = ~clk;

  ro_temp_sensor dut (
    .clk(clk), .reset(reset), .bitout(bitout),
    .sysmon_do(sm_do), .sysmon_channel(sm_ch), .sysmon_eos(sm_eos),
    .sysmon_den(sm_den), .sysmon_daddr(sm_addr),
    .sample(sample), .temp_tenths(t10), .temp_in_range(inr));
  sysmon_model sm (.dclk(clk), .den(sm_den), .daddr(sm_addr), .do_out(sm_do),
    .channel(sm_ch), .eos(sm_eos), .drdy(sm_drdy));
  uart_rx_model #(.BIT_CYCLES(BITC)) rx (.clk(clk), .line(bitout));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!reset && dut.window_done) windows <= windows + 1;
    if (!reset && dut.send && send_cyc < 0) send_cyc <= cyc;
  end

  initial begin
    logic [47:0] got;
    real expect_c, c;
    int diff, ref10;
    sm.temp_c = 47.5;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    @(posedge clk iff dut.send);
    repeat (62 * BITC) @(posedge clk);
    $display("send phase at cycle %0d after %0d windows", send_cyc, windows);
    check(send_cyc >= 50_000_000 && send_cyc <= 50_000_010, "first send phase after 0.5 s");
    check(rx.bytes.size() == 6, "one frame");
    if (rx.bytes.size() == 6) begin
      for (int i = 0; i < 6; i++) got[8*i +: 8] = rx.bytes[i];
      expect_c = 16384.0 * 2.0 * $rtoi(51 * 0.4169 * 1000.0 + 0.5) / 10000.0 - 1.0;
      diff = int'(got[31:0]) - $rtoi(expect_c + 0.5);
      $display("count %0d expected %f, sysmon %0d, CTC %0d.%0d degC", got[31:0], expect_c,
               got[41:32], t10 / 10, t10 % 10);
      check(diff >= -1 && diff <= 1, "count field against ring period");
      check(got[31:0] == sample, "count field equals sample");
      check(got[41:32] == 10'($rtoi((47.5 + 273.0) / 0.49 + 0.5)), "temperature field");
      check(got[47:42] == 6'b0, "pad bits");
      check(rx.starts[0] - send_cyc <= longint'(BITC) + 2, "frame starts within one bit");
      check(rx.starts[5] - rx.starts[0] == longint'(50 * BITC), "19200 baud, bytes back to back");
      c = real'(int'(got[31:0]) - 69420);
      ref10 = $rtoi((-0.000234 * c * c + 0.2476 * c + 6.3231) * 10.0 + 0.5);
      check(inr && t10 == 10'(ref10), "CTC temperature");
    end
    check(windows > 700, "windows completed during the get phase");
    check(rx.framing_errors == 0, "no framing errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (52_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
