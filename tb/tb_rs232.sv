// tb_rs232: the frame sender with a short bit time (BAUD_HALF = 4, 8 cycles per
// bit) and the System Monitor model. Each send phase must deliver six bytes
// forming {6'b0, System Monitor code, sample}; the code must track the model's
// temperature. The DRP read enable must equal EOS and the address must be
// {2'b00, channel}.
`timescale 1ns/1ps
module tb_rs232;
  localparam int BH = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, reset = 1'b1;
  logic [31:0] sample;
  logic send = 1'b0;
  logic bitout;
  logic [15:0] sm_do;
  logic [4:0]  sm_ch;
  logic        sm_eos, sm_drdy, sm_den;
  logic [6:0]  sm_addr;

  always #5 clk = ~clk;

  rs232 #(.BAUD_HALF(BH)) dut (
    .clk(clk), .reset(reset), .sample(sample), .send(send), .button(1'b1), .bitout(bitout),
    .sysmon_do(sm_do), .sysmon_channel(sm_ch), .sysmon_eos(sm_eos),
    .sysmon_den(sm_den), .sysmon_daddr(sm_addr));
  sysmon_model sm (.dclk(clk), .den(sm_den), .daddr(sm_addr), .do_out(sm_do),
    .channel(sm_ch), .eos(sm_eos), .drdy(sm_drdy));
  uart_rx_model #(.BIT_CYCLES(2 * BH)) rx (.clk(clk), .line(bitout));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (!reset) begin
    check(sm_den == sm_eos, "DEN follows EOS");
    check(sm_addr == {2'b00, sm_ch}, "DADDR from CHANNEL");
  end

  initial begin
    logic [47:0] got;
    logic [9:0]  code;
    sample = '0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    for (int k = 0; k < 5; k++) begin
      sm.temp_c = 20.0 + 12.5 * k;
      sample = $urandom();
      repeat (200) @(posedge clk);   // several System Monitor sequences
      code = 10'($rtoi((sm.temp_c + 273.0) / 0.49 + 0.5));
      rx.bytes.delete();
      send = 1'b1;
      repeat (70 * 2 * BH) @(posedge clk);
      check(rx.bytes.size() == 6, "six bytes");
      if (rx.bytes.size() == 6) begin
        for (int i = 0; i < 6; i++) got[8*i +: 8] = rx.bytes[i];
        check(got[31:0] == sample, $sformatf("count field %h vs %h", got[31:0], sample));
        check(got[41:32] == code, $sformatf("temperature field %0d vs %0d", got[41:32], code));
        check(got[47:42] == 6'b0, "pad bits zero");
      end
      send = 1'b0;
      repeat (40) @(posedge clk);
    end
    check(rx.framing_errors == 0, "no framing errors");
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
