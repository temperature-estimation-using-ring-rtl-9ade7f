// ring_oscillator: behavioural model, not synthesizable logic (a combinational
// loop). It models the reference design's ring oscillator: the delay line is
// closed into a loop through a two-input AND with the enable, so that with
// en = 1 the loop holds an odd number of inversions and oscillates with period
// 2 * (N_INV * t_inv + t_and) (about 42.5 ns at the default 0.4169 ns per
// inverter). A second two-input AND gates the output with the enable, so osc
// is held at 0 while en = 0, and while disabled the loop settles to a quiet
// state. The two AND2 gates and their connections are taken from the reference
// schematic; the AND delay value is this model's choice.
//
// Interface: en in, osc out (asynchronous to any clock).
// An even N_INV cannot oscillate and is reported as an elaboration error.
//
// Tool warnings that stand: synthesis reports a combinational loop through the
// AND2 and the delay line. That loop is the oscillator, so it is kept on
// purpose; a real build keeps the inverters and allows the loop in its timing
// constraints. Lint also notes that en and the loop are used both here, without
// a clock, and in the clocked synchronizer; that too is inherent to sampling
// a free-running ring.
`timescale 1ns/1ps
module ring_oscillator #(
  parameter int unsigned N_INV          = ro_sensor_pkg::N_INV,
  parameter real         STAGE_DELAY_NS = 0.4169,
  parameter real         AND_DELAY_NS   = 0.0
) (
  input  logic en,
  output logic osc
);

  // The AND2 does not invert, so the inverters must be odd in number.
  if ((N_INV % 2) == 0) begin : g_even_ring
    $error("ring_oscillator: N_INV must be odd for the ring to oscillate");
  end

  logic loop_in;   // AND2 output feeding the delay line
  logic loop_out;  // delay line output, fed back

  initial loop_in = 1'b0;

  always @(en or loop_out) loop_in <= #(AND_DELAY_NS) en & loop_out;

  delay_line #(.N_INV(N_INV), .STAGE_DELAY_NS(STAGE_DELAY_NS)) u_line (
    .sgnl         (loop_in),
    .delayed_sgnl (loop_out)
  );

  assign osc = en & loop_out;

endmodule
