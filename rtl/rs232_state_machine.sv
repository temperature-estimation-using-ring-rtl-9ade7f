// rs232_state_machine: asynchronous serial transmitter for one result word of
// NBYTES bytes (6, i.e. 48 bits). Each byte goes out as a start bit (0), eight
// data bits least significant first and a stop bit (1), and the bytes follow one
// another without idle time, lowest byte first: 60 bit times for the whole word.
// The machine waits (line high) until a bit tick finds send and button both high,
// sends the word once, then waits with the line high until send returns low, so
// exactly one word goes out per send phase. State changes happen only on
// baud_tick, one bit time per state, as in the reference design, where the
// machine runs on a 19.2 kHz derived clock.
// Choices of this design: the word is copied into a shift register when the
// transfer starts, so a word that changes during the transfer is not torn, and
// the line is driven from a flip-flop so it cannot glitch.
//
// Interface: clk, reset (asynchronous, active high), baud_tick (one-cycle
// enable at the bit rate), db (the word), send, button; bitout (serial line);
// busy (high from start bit to stop bit of the last byte).
// Assertions check that the line idles high and changes only on a bit tick.
`timescale 1ns/1ps
module rs232_state_machine #(
  parameter int unsigned NBYTES = ro_sensor_pkg::FRAME_BYTES
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                baud_tick,
  input  logic [8*NBYTES-1:0] db,
  input  logic                send,
  input  logic                button,
  output logic                bitout,
  output logic                busy
);

  typedef enum logic [2:0] {
    S_IDLE_WAIT, // waiting for send & button
    S_START,     // start bit
    S_DATA,      // eight data bits
    S_STOP,      // stop bit
    S_IDLE_DONE  // word sent, waiting for send to drop
  } state_t;

  localparam int unsigned BYW = (NBYTES > 1) ? $clog2(NBYTES) : 1;

  state_t              state;
  logic [8*NBYTES-1:0] shreg;     // bits still to send, next one in bit 0
  logic [2:0]          bit_idx;   // data bit being sent
  logic [BYW-1:0]      byte_idx;  // byte being sent

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state    <= S_IDLE_WAIT;
      shreg    <= '0;
      bit_idx  <= '0;
      byte_idx <= '0;
      bitout   <= 1'b1;
    end else if (baud_tick) begin
      unique case (state)
        S_IDLE_WAIT: begin
          bitout <= 1'b1;
          if (send && button) begin
            state    <= S_START;
            shreg    <= db;
            byte_idx <= '0;
            bitout   <= 1'b0;
          end
        end
        S_START: begin
          state   <= S_DATA;
          bit_idx <= '0;
          bitout  <= shreg[0];
          shreg   <= shreg >> 1;
        end
        S_DATA: begin
          if (bit_idx == 3'd7) begin
            state  <= S_STOP;
            bitout <= 1'b1;
          end else begin
            bit_idx <= bit_idx + 1'b1;
            bitout  <= shreg[0];
            shreg   <= shreg >> 1;
          end
        end
        S_STOP: begin
          if (byte_idx == BYW'(NBYTES - 1)) begin
            state  <= S_IDLE_DONE;
            bitout <= 1'b1;
          end else begin
            state    <= S_START;
            byte_idx <= byte_idx + 1'b1;
            bitout   <= 1'b0;
          end
        end
        S_IDLE_DONE: begin
          bitout <= 1'b1;
          if (!send) state <= S_IDLE_WAIT;
        end
        default: state <= S_IDLE_WAIT;
      endcase
    end
  end

  assign busy = (state == S_START) || (state == S_DATA) || (state == S_STOP);

  // The line idles high between transfers.
  a_idle_high: assert property (@(posedge clk) disable iff (reset) !busy |-> bitout);
  // The line only changes on a bit tick.
  a_bit_timing: assert property (
    @(posedge clk) disable iff (reset) !$past(reset) && !$past(baud_tick) |-> $stable(bitout)
  );

endmodule
