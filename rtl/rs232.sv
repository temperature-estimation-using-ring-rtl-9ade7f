// rs232: the reporting side of the sensor. It assembles the 48-bit result frame
// {6 zero bits, System Monitor temperature code, 32-bit window count}
// (ro_sensor_pkg::frame_t), so that every transmitted ring-oscillator count
// carries the die temperature read by the FPGA's own ADC for calibration. It
// runs its own clock divider for the 19200 baud bit rate and hands the frame to
// the serial state machine, which sends it once per send phase.
//
// The System Monitor is external to this module (a hard macro). As in the
// reference design its DRP port is read continuously in sequencer mode: the
// read enable is the monitor's end-of-sequence flag, and the address is the
// channel the monitor reports, with the upper two address bits zero. Only
// DO[15:6], the 10-bit conversion result, enters the frame; DO[5:0] are left
// unused, which lint reports.
//
// Interface: clk, reset (asynchronous, active high), sample (window count),
// send, button; bitout (serial line). System Monitor side: sysmon_do,
// sysmon_channel, sysmon_eos in; sysmon_den, sysmon_daddr out.
`timescale 1ns/1ps
module rs232 #(
  parameter int unsigned BAUD_HALF = ro_sensor_pkg::BAUD_HALF
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [31:0] sample,
  input  logic        send,
  input  logic        button,
  output logic        bitout,
  input  logic [15:0] sysmon_do,
  input  logic [4:0]  sysmon_channel,
  input  logic        sysmon_eos,
  output logic        sysmon_den,
  output logic [6:0]  sysmon_daddr
);

  ro_sensor_pkg::frame_t frame;
  logic   baud_tick;
  logic   busy;  // not needed here; a waveform shows the transfer by it

  assign sysmon_den   = sysmon_eos;
  assign sysmon_daddr = {2'b00, sysmon_channel};

  always_comb begin
    frame.pad         = '0;
    frame.sysmon_temp = sysmon_do[15:6];
    frame.count       = sample;
  end

  // Only the baud output of this divider is used; its 1 Hz output drives nothing.
  clock_convert #(.STATE_HALF(2), .BAUD_HALF(BAUD_HALF)) u_baud (
    .clk        (clk),
    .reset      (reset),
    .state_tick (),
    .baud_tick  (baud_tick)
  );

  rs232_state_machine #(.NBYTES(ro_sensor_pkg::FRAME_BYTES)) u_tx (
    .clk       (clk),
    .reset     (reset),
    .baud_tick (baud_tick),
    .db        (frame),
    .send      (send),
    .button    (button),
    .bitout    (bitout),
    .busy      (busy)
  );

endmodule
