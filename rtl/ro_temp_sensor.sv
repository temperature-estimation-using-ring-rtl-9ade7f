// ro_temp_sensor: all-digital FPGA die-temperature sensor built from a ring
// oscillator. A ring of 51 inverters slows down as the die warms; the sensor
// counts how many 100 MHz clock cycles 2^14 ring periods take (about 70000) and
// reports that count. Once per second it alternates between measuring (get) and
// sending the frozen result over RS-232 at 19200 baud, together with the
// temperature read by the FPGA's System Monitor ADC, which serves as the
// reference for calibration. The count is also converted to degrees through the
// calibration table (ctc_lut); that conversion is offered by the reference work
// as the next step and is included here as an output beside the raw count.
//
// Structure: design_with_rs232 (ring counter + serial sender), a clock_convert
// for the 1 Hz rate, and send_get_state_machine. The serial "button" input of the
// sender is tied high, as in the reference design.
//
// Interface: clk (100 MHz), reset (asynchronous, active high), bitout (serial
// out). The System Monitor hard macro sits outside: its DO, CHANNEL and EOS come
// in, DEN and DADDR go out. sample, temp_tenths and temp_in_range are brought out
// for observation.
// Timing: the first send phase starts STATE_HALF cycles (0.5 s) after reset,
// then send toggles every 2*STATE_HALF cycles (1 s); a result goes out 60 bit
// times (3.1 ms) after the start of each send phase.
`timescale 1ns/1ps
module ro_temp_sensor #(
  parameter int unsigned N_INV          = ro_sensor_pkg::N_INV,
  parameter real         STAGE_DELAY_NS = 0.4169,
  parameter int unsigned CYCLES         = ro_sensor_pkg::CYCLES,
  parameter int unsigned STATE_HALF     = ro_sensor_pkg::STATE_HALF,
  parameter int unsigned BAUD_HALF      = ro_sensor_pkg::BAUD_HALF
) (
  input  logic        clk,
  input  logic        reset,
  output logic        bitout,
  input  logic [15:0] sysmon_do,
  input  logic [4:0]  sysmon_channel,
  input  logic        sysmon_eos,
  output logic        sysmon_den,
  output logic [6:0]  sysmon_daddr,
  output logic [31:0] sample,
  output logic [9:0]  temp_tenths,
  output logic        temp_in_range
);

  logic state_tick;
  logic send;
  logic window_done;  // end of each measuring window; observed in simulation only

  design_with_rs232 #(
    .N_INV(N_INV), .STAGE_DELAY_NS(STAGE_DELAY_NS), .CYCLES(CYCLES), .BAUD_HALF(BAUD_HALF)
  ) u_core (
    .clk            (clk),
    .reset          (reset),
    .send           (send),
    .button         (1'b1),
    .bitout         (bitout),
    .sysmon_do      (sysmon_do),
    .sysmon_channel (sysmon_channel),
    .sysmon_eos     (sysmon_eos),
    .sysmon_den     (sysmon_den),
    .sysmon_daddr   (sysmon_daddr),
    .sample         (sample),
    .window_done    (window_done)
  );

  // Only the 1 Hz output of this divider is used.
  clock_convert #(.STATE_HALF(STATE_HALF), .BAUD_HALF(2)) u_div (
    .clk        (clk),
    .reset      (reset),
    .state_tick (state_tick),
    .baud_tick  ()
  );

  send_get_state_machine u_sendget (
    .clk   (clk),
    .reset (reset),
    .tick  (state_tick),
    .send  (send)
  );

  ctc_lut #(.COUNT_W(32)) u_ctc (
    .count       (sample),
    .temp_tenths (temp_tenths),
    .in_range    (temp_in_range)
  );

endmodule
