// design_with_rs232: the sensor without its send/get sequencing. The ring
// oscillator counter measures continuously; its latest result is framed with
// the System Monitor temperature and sent over RS-232 when send is high
// (and button is high). send is an input here; the top level drives it.
//
// Interface: clk, reset (asynchronous, active high), send, button; bitout; the
// System Monitor DRP signals of rs232; sample and window_done for observation.
`timescale 1ns/1ps
module design_with_rs232 #(
  parameter int unsigned N_INV          = ro_sensor_pkg::N_INV,
  parameter real         STAGE_DELAY_NS = 0.4169,
  parameter int unsigned CYCLES         = ro_sensor_pkg::CYCLES,
  parameter int unsigned BAUD_HALF      = ro_sensor_pkg::BAUD_HALF
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        send,
  input  logic        button,
  output logic        bitout,
  input  logic [15:0] sysmon_do,
  input  logic [4:0]  sysmon_channel,
  input  logic        sysmon_eos,
  output logic        sysmon_den,
  output logic [6:0]  sysmon_daddr,
  output logic [31:0] sample,
  output logic        window_done
);

  ro_counter #(.N_INV(N_INV), .STAGE_DELAY_NS(STAGE_DELAY_NS), .CYCLES(CYCLES), .COUNT_W(32)) u_counter (
    .clk         (clk),
    .reset       (reset),
    .send        (send),
    .sample      (sample),
    .window_done (window_done)
  );

  rs232 #(.BAUD_HALF(BAUD_HALF)) u_rs232 (
    .clk            (clk),
    .reset          (reset),
    .sample         (sample),
    .send           (send),
    .button         (button),
    .bitout         (bitout),
    .sysmon_do      (sysmon_do),
    .sysmon_channel (sysmon_channel),
    .sysmon_eos     (sysmon_eos),
    .sysmon_den     (sysmon_den),
    .sysmon_daddr   (sysmon_daddr)
  );

endmodule
