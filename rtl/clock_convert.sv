// clock_convert: divides the 100 MHz master clock down to the two slow rates of
// the sensor. The reference design toggles a derived clock every STATE_HALF
// master cycles (1 Hz state-machine clock) and another every BAUD_HALF cycles
// (5208-cycle period, 19201 Hz, for 19200 baud). Here the same counters produce,
// instead of derived clocks, one-cycle enable strobes in the master clock
// domain at the instants the derived clocks would rise: every 2*STATE_HALF and
// 2*BAUD_HALF master cycles. Everything downstream stays on one clock, which is
// this design's choice; the rates are the reference design's.
//
// Interface: clk, reset (asynchronous, active high); state_tick and baud_tick
// out, each high for one cycle. As the derived clocks start low, the first
// state_tick is STATE_HALF cycles after reset and the next ones follow every
// 2*STATE_HALF cycles; likewise baud_tick with BAUD_HALF.
// Both instances in this design take the system reset. The reference ties the
// divider's reset low, so its rates run freely from power-up; resetting them
// here makes the phase of both rates known after reset.
`timescale 1ns/1ps
module clock_convert #(
  parameter int unsigned STATE_HALF = ro_sensor_pkg::STATE_HALF,
  parameter int unsigned BAUD_HALF  = ro_sensor_pkg::BAUD_HALF
) (
  input  logic clk,
  input  logic reset,
  output logic state_tick,
  output logic baud_tick
);

  localparam int unsigned SW = $clog2(STATE_HALF + 1);
  localparam int unsigned BW = $clog2(BAUD_HALF + 1);

  logic [SW-1:0] state_cnt;
  logic [BW-1:0] baud_cnt;
  logic          state_phase;  // level of the equivalent derived clock
  logic          baud_phase;
  logic          state_wrap;
  logic          baud_wrap;

  assign state_wrap = (state_cnt == SW'(STATE_HALF - 1));
  assign baud_wrap  = (baud_cnt  == BW'(BAUD_HALF - 1));

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state_cnt   <= '0;
      baud_cnt    <= '0;
      state_phase <= 1'b0;
      baud_phase  <= 1'b0;
    end else begin
      state_cnt <= state_wrap ? '0 : state_cnt + 1'b1;
      baud_cnt  <= baud_wrap  ? '0 : baud_cnt  + 1'b1;
      if (state_wrap) state_phase <= ~state_phase;
      if (baud_wrap)  baud_phase  <= ~baud_phase;
    end
  end

  // A rising edge of the derived clock happens when it toggles while low.
  assign state_tick = state_wrap & ~state_phase;
  assign baud_tick  = baud_wrap  & ~baud_phase;

endmodule
