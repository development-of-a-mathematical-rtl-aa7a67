// seg7_driver: four-digit seven-segment display driver.
//
// Splits a 16-bit value into four nibbles and decodes each with its own
// seg7_lut, digit 0 (rightmost indicator) taking bits [3:0] and digit 3
// bits [15:12], as the document's four-instance decoder does. When `dash`
// is high every indicator shows a single middle bar, giving the "----"
// the calculator uses for an overflow or a failed calculation; this
// override is this design's way of producing that pattern. Each digit also
// has a decimal point, lit by the matching bit of `dp`. All segment and
// decimal-point outputs are active low. Purely combinational.
module seg7_driver
  import calc_pkg::*;
(
  input  logic [15:0]           value,   // four hex digits
  input  logic                  dash,    // show "----" instead of value
  input  logic [DIGITS-1:0]     dp,      // decimal points, active high
  output logic [DIGITS-1:0][6:0] seg_n,  // segments per digit, active low
  output logic [DIGITS-1:0]     dp_n     // decimal points, active low
);

  logic [DIGITS-1:0][6:0] hex_seg_n;

  for (genvar d = 0; d < DIGITS; d++) begin : g_digit
    seg7_lut u_lut (
      .digit (value[4*d +: 4]),
      .seg_n (hex_seg_n[d])
    );
    assign seg_n[d] = dash ? SEG_DASH : hex_seg_n[d];
  end

  assign dp_n = ~dp;

endmodule
