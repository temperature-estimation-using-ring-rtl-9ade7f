// send_get_state_machine: alternates the sensor between its two phases. While
// send is low ("get") the counting state machine updates its result after every
// window; while send is high the result is frozen and transmitted. send toggles
// on every tick of the 1 Hz state rate, so each phase lasts one second. The
// reference design toggles a flip-flop on each edge of its 1 Hz derived clock;
// here the flip-flop toggles on a one-cycle enable in the master clock domain,
// and it has an asynchronous reset to get (the reference gives it only a
// power-up value of 0).
//
// Interface: clk, reset, tick in; send out, changes one cycle after tick.
`timescale 1ns/1ps
module send_get_state_machine (
  input  logic clk,
  input  logic reset,
  input  logic tick,
  output logic send
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset)     send <= 1'b0;
    else if (tick) send <= ~send;
  end

endmodule
