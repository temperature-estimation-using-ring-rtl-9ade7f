// ro_counter: the measuring half of the sensor. The synchronized ring
// oscillator feeds the counting state machine, which reports how many 10 ns
// clock cycles 2^14 oscillator periods take (about 70000 near room temperature,
// rising with temperature). The ring is enabled whenever reset is low; the
// reference design does not show how its enable is driven, so tying it to
// reset is this design's choice.
//
// Interface: clk, reset (asynchronous, active high), send; sample out (32 bits,
// held while send is high), window_done (one cycle at the end of each window).
`timescale 1ns/1ps
module ro_counter #(
  parameter int unsigned N_INV          = ro_sensor_pkg::N_INV,
  parameter real         STAGE_DELAY_NS = 0.4169,
  parameter int unsigned CYCLES         = ro_sensor_pkg::CYCLES,
  parameter int unsigned COUNT_W        = ro_sensor_pkg::COUNT_W
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               send,
  output logic [COUNT_W-1:0] sample,
  output logic               window_done
);

  logic osc_sync;

  fixed_ring_oscillator #(.N_INV(N_INV), .STAGE_DELAY_NS(STAGE_DELAY_NS)) u_osc (
    .clk              (clk),
    .en               (~reset),
    .sync_oscillation (osc_sync)
  );

  counting_state_machine #(.CYCLES(CYCLES), .COUNT_W(COUNT_W)) u_count (
    .clk         (clk),
    .reset       (reset),
    .osc         (osc_sync),
    .send        (send),
    .sample      (sample),
    .window_done (window_done)
  );

endmodule
