// ctc_lut: count-to-temperature conversion. It turns the ring-oscillator window
// count into a die temperature in tenths of a degree Celsius, in 10 bits (enough
// for three decimal digits, the width of the System Monitor's result).
//
// The calibration is the quadratic fitted to temperature-chamber data for the
// 51-inverter, 2^14-period sensor:
//   c = count - 69420                     (calibrated count)
//   T = -0.000234 c^2 + 0.2476 c + 6.3231 (degrees Celsius)
// valid for c = 55 .. 449, i.e. about 19.2 .. 70.3 degC. The table is computed at
// elaboration time from that formula in integer arithmetic,
//   T10(c) = floor((-234 c^2 + 247600 c + 6323100 + 50000) / 100000),
// i.e. the temperature in tenths rounded to nearest, and stored as a ROM indexed
// by c. Counts outside the calibrated range are clamped to the nearest end of
// the table and flagged with in_range = 0. Building the table as a ROM, the
// rounding and the clamping are this design's choices; the formula and its range
// are those of the calibration.
//
// Interface: count in (COUNT_W bits); temp_tenths (10 bits) and in_range out,
// purely combinational.
`timescale 1ns/1ps
module ctc_lut #(
  parameter int unsigned COUNT_W    = 32,
  parameter int unsigned CAL_OFFSET = 69420,
  parameter int unsigned C_MIN      = 55,
  parameter int unsigned C_MAX      = 449
) (
  input  logic [COUNT_W-1:0] count,
  output logic [9:0]         temp_tenths,
  output logic               in_range
);

  localparam int unsigned IDX_W   = $clog2(C_MAX + 1);
  localparam int unsigned ENTRIES = 1 << IDX_W;

  typedef logic [ENTRIES*10-1:0] rom_t;

  function automatic rom_t build_rom();
    rom_t   rom;
    longint t;
    rom = '0;
    for (int c = 0; c < ENTRIES; c++) begin
      t = (-64'sd234 * c * c + 64'sd247600 * c + 64'sd6323100 + 64'sd50000) / 64'sd100000;
      if (t < 0)    t = 0;
      if (t > 1023) t = 1023;
      rom[c*10 +: 10] = 10'(t);
    end
    return rom;
  endfunction

  localparam rom_t ROM = build_rom();

  logic signed [COUNT_W+1:0] cal;   // calibrated count, may be negative
  logic [IDX_W-1:0]          idx;

  always_comb begin
    cal = $signed({2'b00, count}) - $signed((COUNT_W+2)'(CAL_OFFSET));
    if (cal < $signed((COUNT_W+2)'(C_MIN))) begin
      idx      = IDX_W'(C_MIN);
      in_range = 1'b0;
    end else if (cal > $signed((COUNT_W+2)'(C_MAX))) begin
      idx      = IDX_W'(C_MAX);
      in_range = 1'b0;
    end else begin
      idx      = IDX_W'(cal);
      in_range = 1'b1;
    end
    temp_tenths = ROM[idx*10 +: 10];
  end

endmodule
