// fixed_ring_oscillator: the ring oscillator followed by two D flip-flops in
// series, clocked by the master clock, so that the counting logic only sees a
// signal that has had a full clock period to resolve metastability. The two
// flip-flops come from the reference schematic ("FD" -> "FD" ->
// sync_oscillation); the ring itself is a behavioural model (see
// ring_oscillator). The flip-flops have no reset, as in the reference
// schematic: whatever they hold at power-up is flushed after two clocks.
//
// Interface: clk, en in; sync_oscillation out, two clock cycles behind the
// oscillator. The oscillator must run below half the clock rate for every
// period to be seen.
`timescale 1ns/1ps
module fixed_ring_oscillator #(
  parameter int unsigned N_INV          = ro_sensor_pkg::N_INV,
  parameter real         STAGE_DELAY_NS = 0.4169
) (
  input  logic clk,
  input  logic en,
  output logic sync_oscillation
);

  logic osc;
  logic meta_q;   // first stage, may go metastable on silicon
  logic sync_q;   // second stage

  ring_oscillator #(.N_INV(N_INV), .STAGE_DELAY_NS(STAGE_DELAY_NS)) u_ring (
    .en  (en),
    .osc (osc)
  );

  always_ff @(posedge clk) begin
    meta_q <= osc;
    sync_q <= meta_q;
  end

  assign sync_oscillation = sync_q;

endmodule
