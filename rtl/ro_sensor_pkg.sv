// ro_sensor_pkg: constants and types shared by the ring-oscillator temperature
// sensor. The numbers are those of the reference design: a 100 MHz master clock,
// a 51-inverter ring, a measurement window of 2^14 oscillator periods, a 32-bit
// clock counter, a 1 Hz send/get rate and a 19200 baud serial link.
// The 48-bit serial frame layout {6 zero bits, 10-bit System Monitor temperature
// code, 32-bit count} follows the reference design; naming it as a struct is
// this implementation's choice.
`timescale 1ns/1ps
package ro_sensor_pkg;

  localparam int unsigned N_INV       = 51;          // inverters in the ring
  localparam int unsigned CYCLES      = 16384;       // oscillator periods per window (2^14)
  localparam int unsigned COUNT_W     = 32;          // width of the clock counter
  localparam int unsigned STATE_HALF  = 50_000_000;  // half period of the 1 Hz state clock
  localparam int unsigned BAUD_HALF   = 2604;        // half period of the 19200 baud clock
  localparam int unsigned FRAME_BYTES = 6;           // bytes sent per result

  // Serial frame, sent least significant byte first.
  typedef struct packed {
    logic [5:0]  pad;         // always zero
    logic [9:0]  sysmon_temp; // System Monitor temperature code (DO[15:6])
    logic [31:0] count;       // window count of the ring oscillator
  } frame_t;

endpackage
