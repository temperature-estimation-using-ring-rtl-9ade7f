// delay_line: behavioural model, not synthesizable logic. It models the chain
// of N_INV inverters (51 in the reference design) that forms the
// temperature-sensitive delay of the ring oscillator. On silicon each stage is a
// LUT configured as an inverter and kept through synthesis; the chain's delay
// grows with die temperature, which is what the sensor measures.
//
// The chain is modelled as one lumped stage: the output is the input inverted
// N_INV times (inverted for an odd count), delivered N_INV stage delays
// later. Lumping the stages keeps the event count per oscillator half period at
// one, so a whole second of sensor operation can be simulated; the per-stage
// delay is a variable so a testbench can emulate a temperature change.
// The default stage delay, 0.4169 ns, puts the window count (2^14 periods at
// 100 MHz) at about 69670, in the middle of the counts measured between 20 and
// 70 degC (69461 .. 69869); rounding the count to 70000 gives the often quoted
// 0.419 ns mean inverter delay, while the FPGA data sheet gives 0.238 ns.
//
// Interface: sgnl in, delayed_sgnl out. Timing: pure transport delay.
// Synthesis drops the delay and sees one inverter; closed into the ring it is
// reported as a combinational loop, which is the intended oscillator.
`timescale 1ns/1ps
module delay_line #(
  parameter int unsigned N_INV          = ro_sensor_pkg::N_INV,
  parameter real         STAGE_DELAY_NS = 0.4169
) (
  input  logic sgnl,
  output logic delayed_sgnl
);

  // Mean delay of one inverter in femtoseconds; a testbench may overwrite it
  // to model heating. An integer keeps the model readable by synthesis front
  // ends, which drop the delays.
  int unsigned stage_delay_fs = int'(STAGE_DELAY_NS * 1.0e6);

  // Power-up: the output starts low and, one chain delay later, takes the value
  // the input has by then, so a ring built around the line always starts.
  initial begin
    delayed_sgnl = 1'b0;
    #(N_INV * stage_delay_fs / 1.0e6) delayed_sgnl = ((N_INV % 2) == 1) ? ~sgnl : sgnl;
  end

  always @(sgnl) begin
    delayed_sgnl <= #(N_INV * stage_delay_fs / 1.0e6) ((N_INV % 2) == 1) ? ~sgnl : sgnl;
  end

endmodule
