// tb_ro_temp_sensor: end-to-end test of the whole sensor with the real ring,
// window (2^14 periods) and counter, but a 3 ms instead of 1 s send/get phase
// (STATE_HALF = 300000) and an 8-cycle bit time, so that several phases fit.
// Before each phase the ring's stage delay and the System Monitor temperature
// are set as a die temperature would set them. Each phase lasts 2 * STATE_HALF
// cycles. The ring's half period is rounded to the simulator's 1 ps
// resolution, and the expected counts use the rounded value. Every frame received on the
// serial line is checked: count field against the ring period (within one),
// equal to the sample output, temperature field against the monitor code, the
// CTC output against the calibration quadratic, frame spacing and timing
// against the send phase. Mechanisms counted and required at least once:
// windows completed, a result held through windows during a send phase, get and
// send phases, frames, count rising with the stage delay, CTC in range and out
// of range.
`timescale 1ns/1ps
module tb_ro_temp_sensor;
  localparam int SH = 300_000, BH = 4, BITC = 2 * BH;
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

  // mechanism counters
  int n_windows = 0, n_held = 0, n_get = 0, n_send = 0, n_frames = 0;
  int n_rise = 0, n_in = 0, n_out = 0;

  always #5 clk = ~clk;

  ro_temp_sensor #(.STATE_HALF(SH), .BAUD_HALF(BH)) dut (
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

  // Observe the send phases and windows through the hierarchy.
  logic send_q = 1'b0;
  logic [31:0] sample_at_send;
  longint cyc = 0;
  longint send_rise_cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!reset) begin
      send_q <= dut.send;
      if (dut.send && !send_q) begin n_send++; sample_at_send <= sample; send_rise_cyc <= cyc; end
      if (!dut.send && send_q) n_get++;
      if (dut.window_done) begin
        n_windows++;
        if (dut.send) n_held++;
      end
      if (dut.send && send_q) check(sample == sample_at_send, "sample frozen in send phase");
      check(sm_den == sm_eos && sm_addr == {2'b00, sm_ch}, "System Monitor DRP wiring");
    end
  end

  // Stage delays (die temperatures) and System Monitor readings per phase.
  localparam real DELAYS [5] = '{0.4169, 0.4160, 0.4175, 0.4150, 0.4179};
  localparam real TEMPS  [5] = '{52.0, 30.0, 62.0, 10.0, 69.0};

  function automatic int ctc_ref(input int n);
    real c;
    c = n - 69420;
    return $rtoi((-0.000234 * c * c + 0.2476 * c + 6.3231) * 10.0 + 0.5);
  endfunction

  initial begin
    logic [47:0] got;
    int last_count;
    real expect_c;
    int diff;
    last_count = 0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    for (int k = 0; k < 5; k++) begin
      // get phase: set the "temperature", let windows complete
      @(posedge clk iff !dut.send);
      dut.u_core.u_counter.u_osc.u_ring.u_line.stage_delay_fs = int'(DELAYS[k] * 1.0e6);
      sm.temp_c = TEMPS[k];
      rx.bytes.delete(); rx.starts.delete();
      @(posedge clk iff dut.send);
      expect_c = 16384.0 * 2.0 * $rtoi(51 * DELAYS[k] * 1000.0 + 0.5) / 10000.0 - 1.0;  // half period rounds to 1 ps
      repeat (70 * BITC) @(posedge clk);
      check(rx.bytes.size() == 6, $sformatf("one frame in send phase %0d", k));
      if (rx.bytes.size() == 6) begin
        n_frames++;
        for (int i = 0; i < 6; i++) got[8*i +: 8] = rx.bytes[i];
        diff = int'(got[31:0]) - $rtoi(expect_c + 0.5);
        $display("phase %0d: count %0d expected %f  sysmon %0d  ctc %0d.%0d in_range %0d",
                 k, got[31:0], expect_c, got[41:32], t10 / 10, t10 % 10, inr);
        check(diff >= -1 && diff <= 1, "count field against ring period");
        check(got[31:0] == sample, "count field equals sample output");
        check(got[41:32] == 10'($rtoi((TEMPS[k] + 273.0) / 0.49 + 0.5)), "temperature field");
        check(got[47:42] == 6'b0, "pad bits");
        check(rx.starts[0] - send_rise_cyc <= longint'(2 * BITC), "frame starts at send phase start");
        check(rx.starts[5] - rx.starts[0] == longint'(50 * BITC), "bytes back to back");
        if (int'(got[31:0]) - 69420 >= 55 && int'(got[31:0]) - 69420 <= 449) begin
          n_in++;
          check(inr && t10 == 10'(ctc_ref(int'(got[31:0]))), "CTC temperature");
        end else begin
          n_out++;
          check(!inr, "CTC out of range flagged");
        end
        if (k > 0 && DELAYS[k] > DELAYS[k-1]) begin
          check(int'(got[31:0]) > last_count, "count rises with delay");
          n_rise++;
        end
        last_count = int'(got[31:0]);
      end
    end
    check(rx.framing_errors == 0, "no framing errors");
    $display("windows %0d held %0d get %0d send %0d frames %0d rise %0d ctc_in %0d ctc_out %0d",
             n_windows, n_held, n_get, n_send, n_frames, n_rise, n_in, n_out);
    check(n_windows > 0, "mechanism: window");
    check(n_held > 0,    "mechanism: result held while sending");
    check(n_get > 0,     "mechanism: get phase");
    check(n_send > 0,    "mechanism: send phase");
    check(n_frames > 0,  "mechanism: frame");
    check(n_rise > 0,    "mechanism: count follows temperature");
    check(n_in > 0,      "mechanism: CTC in range");
    check(n_out > 0,     "mechanism: CTC out of range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * SH) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
