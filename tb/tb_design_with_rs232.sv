// tb_design_with_rs232: ring counter plus sender with a shortened window
// (CYCLES = 256) and bit time (8 cycles). After a measuring phase, a send phase
// must deliver one frame whose count field equals the window length less one
// (256 ring periods, within one count) and whose temperature field is the
// System Monitor code; the count must stay frozen during the send phase.
`timescale 1ns/1ps
module tb_design_with_rs232;
  localparam int CYC = 256, BH = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, reset = 1'b1, send = 1'b0;
  logic bitout;
  logic [15:0] sm_do;
  logic [4:0]  sm_ch;
  logic        sm_eos, sm_drdy, sm_den;
  logic [6:0]  sm_addr;
  logic [31:0] sample;
  logic        done;

  always #5 clk = ~clk;

  design_with_rs232 #(.CYCLES(CYC), .BAUD_HALF(BH)) dut (
    .clk(clk), .reset(reset), .send(send), .button(1'b1), .bitout(bitout),
    .sysmon_do(sm_do), .sysmon_channel(sm_ch), .sysmon_eos(sm_eos),
    .sysmon_den(sm_den), .sysmon_daddr(sm_addr), .sample(sample), .window_done(done));
  sysmon_model sm (.dclk(clk), .den(sm_den), .daddr(sm_addr), .do_out(sm_do),
    .channel(sm_ch), .eos(sm_eos), .drdy(sm_drdy));
  uart_rx_model #(.BIT_CYCLES(2 * BH)) rx (.clk(clk), .line(bitout));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    logic [47:0] got;
    real d, expect_c;
    int  diff;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    for (int k = 0; k < 4; k++) begin
      d = 0.4150 + 0.001 * k;
      dut.u_counter.u_osc.u_ring.u_line.stage_delay_fs = int'(d * 1.0e6);
      sm.temp_c = 25.0 + 10.0 * k;
      repeat (3) @(posedge clk iff done);
      expect_c = CYC * 2.0 * $rtoi(51 * d * 1000.0 + 0.5) / 10000.0 - 1.0;  // half period rounds to 1 ps
      rx.bytes.delete();
      send = 1'b1;
      repeat (2) @(posedge clk);
      dut.u_counter.u_osc.u_ring.u_line.stage_delay_fs = int'((d + 0.01) * 1.0e6);  // must not show
      repeat (70 * 2 * BH) @(posedge clk);
      check(rx.bytes.size() == 6, "one frame per send phase");
      if (rx.bytes.size() == 6) begin
        for (int i = 0; i < 6; i++) got[8*i +: 8] = rx.bytes[i];
        diff = int'(got[31:0]) - $rtoi(expect_c + 0.5);
        $display("frame count %0d expected %f", got[31:0], expect_c);
        check(diff >= -1 && diff <= 1, "count field");
        check(got[41:32] == 10'($rtoi((sm.temp_c + 273.0) / 0.49 + 0.5)), "temperature field");
        check(got[47:42] == 6'b0, "pad");
      end
      send = 1'b0;
    end
    check(rx.framing_errors == 0, "no framing errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
