// sysmon_model: testbench stand-in for the FPGA's System Monitor hard macro in
// continuous sequencer mode, reduced to what the sensor reads. Every
// EOS_PERIOD cycles it ends a sequence (eos high for one cycle) reporting the
// temperature channel (channel 0). A DRP read (den high) of address 0 returns,
// two cycles later, the temperature conversion result on do_out[15:6] with
// drdy; do_out then holds. The 10-bit code follows
// temperature = code * 0.49 - 273 (degC), so code = (T + 273) / 0.49,
// rounded; temp_c may be changed at any time by the testbench.
`timescale 1ns/1ps
module sysmon_model #(
  parameter int EOS_PERIOD = 50
) (
  input  logic        dclk,
  input  logic        den,
  input  logic [6:0]  daddr,
  output logic [15:0] do_out,
  output logic [4:0]  channel,
  output logic        eos,
  output logic        drdy
);
  real temp_c = 45.0;
  int  cnt = 0;
  int  pending = 0;
  logic [6:0] addr_q;

  function automatic logic [9:0] code_of(input real t);
    return 10'($rtoi((t + 273.0) / 0.49 + 0.5));
  endfunction

  initial begin
    do_out = '0; channel = '0; eos = 1'b0; drdy = 1'b0; addr_q = '0;
  end

  always @(posedge dclk) begin
    cnt  <= (cnt == EOS_PERIOD - 1) ? 0 : cnt + 1;
    eos  <= (cnt == EOS_PERIOD - 1);
    drdy <= 1'b0;
    if (den) begin
      pending <= 2;
      addr_q  <= daddr;
    end else if (pending > 0) begin
      pending <= pending - 1;
      if (pending == 1) begin
        drdy   <= 1'b1;
        do_out <= (addr_q == 7'd0) ? {code_of(temp_c), 6'b0} : 16'h0;
      end
    end
  end
endmodule
