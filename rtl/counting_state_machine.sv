// counting_state_machine: the time-to-digital converter of the sensor. It
// counts master-clock cycles (count register, COUNT_W bits) while counting the
// rising edges of the synchronized oscillator (cycle register). When the cycle
// register reaches CYCLES the window is over: the clock count is copied to
// sample, unless send is high (the result is then being transmitted and is held),
// and both registers restart from zero. The count is thus proportional to the
// oscillator period, which grows with temperature.
//
// Timing, as in the reference design: the window ends in the clock cycle after
// the CYCLES-th rising edge is seen; that terminal cycle does no counting, so a
// window spans sample + 1 clock cycles and an edge falling in the terminal
// cycle is not counted. The edge detector compares osc with its value one clock
// earlier. With the reference numbers (2^14 periods of about 42.7 ns, 10 ns
// clock) sample is about 70000, which needs more than 16 bits; the reference
// design therefore uses 32.
// window_done (one cycle, in the terminal cycle) is an addition of this design
// for observation.
//
// Interface: clk, reset (asynchronous, active high), osc (already synchronized),
// send; sample out, changes only in a terminal cycle with send low.
// An assertion checks that sample holds still while send is high.
`timescale 1ns/1ps
module counting_state_machine #(
  parameter int unsigned CYCLES  = ro_sensor_pkg::CYCLES,
  parameter int unsigned COUNT_W = ro_sensor_pkg::COUNT_W
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               osc,
  input  logic               send,
  output logic [COUNT_W-1:0] sample,
  output logic               window_done
);

  localparam int unsigned CYC_W = $clog2(CYCLES + 1);

  logic [COUNT_W-1:0] count_q;
  logic [CYC_W-1:0]   cycle_q;
  logic               osc_prev;
  logic               terminal;
  logic               osc_rise;

  assign terminal = (cycle_q == CYC_W'(CYCLES));
  assign osc_rise = osc & ~osc_prev;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      osc_prev <= 1'b0;
      count_q  <= '0;
      cycle_q  <= '0;
      sample   <= '0;
    end else begin
      osc_prev <= osc;
      if (terminal) begin
        if (!send) sample <= count_q;
        count_q <= '0;
        cycle_q <= '0;
      end else begin
        count_q <= count_q + 1'b1;
        if (osc_rise) cycle_q <= cycle_q + 1'b1;
      end
    end
  end

  assign window_done = terminal;

  // While sending, the stored result must not move.
  a_hold_while_sending: assert property (
    @(posedge clk) disable iff (reset) ($past(send) && !$past(reset)) |-> $stable(sample)
  );

endmodule
