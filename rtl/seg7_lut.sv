// seg7_lut: one seven-segment digit decoder.
//
// Maps a 4-bit value to the segment pattern of a common-anode indicator
// showing the hexadecimal digits 0-9, A, b, C, d, E, F. Outputs are active
// low (a 0 lights the segment), bit 0 is segment a and bit 6 segment g, as
// on the indicators of the Cyclone III starter board the design targets.
// Purely combinational. The document names this decoder and shows four of
// them behind the display driver; the digit shapes are the usual ones.
module seg7_lut (
  input  logic [3:0] digit,   // value to show
  output logic [6:0] seg_n    // segments g..a, active low
);

  always_comb begin
    unique case (digit)
      4'h0: seg_n = 7'b1000000;
      4'h1: seg_n = 7'b1111001;
      4'h2: seg_n = 7'b0100100;
      4'h3: seg_n = 7'b0110000;
      4'h4: seg_n = 7'b0011001;
      4'h5: seg_n = 7'b0010010;
      4'h6: seg_n = 7'b0000010;
      4'h7: seg_n = 7'b1111000;
      4'h8: seg_n = 7'b0000000;
      4'h9: seg_n = 7'b0010000;
      4'hA: seg_n = 7'b0001000;
      4'hB: seg_n = 7'b0000011;
      4'hC: seg_n = 7'b1000110;
      4'hD: seg_n = 7'b0100001;
      4'hE: seg_n = 7'b0000110;
      4'hF: seg_n = 7'b0001110;
    endcase
  end

endmodule
