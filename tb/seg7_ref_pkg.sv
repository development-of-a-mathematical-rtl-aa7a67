// seg7_ref_pkg: reference decoding of seven-segment patterns for the
// testbenches. Each hex digit is described by the list of segments that
// are lit (letters a..g), written from the familiar digit shapes rather
// than from the decoder's table, and converted to the active-low pattern
// (bit 0 = a). decode() maps a pattern back to its digit, or -1.
package seg7_ref_pkg;

  function automatic string lit_segments(int d);
    case (d)
      0: return "abcdef";   1: return "bc";      2: return "abdeg";
      3: return "abcdg";    4: return "bcfg";    5: return "acdfg";
      6: return "acdefg";   7: return "abc";     8: return "abcdefg";
      9: return "abcdfg";   10: return "abcefg"; 11: return "cdefg";
      12: return "adef";    13: return "bcdeg";  14: return "adefg";
      default: return "aefg";
    endcase
  endfunction

  function automatic logic [6:0] pattern_n(string lit);
    logic [6:0] p = 7'h7f;
    for (int i = 0; i < lit.len(); i++) p[3'(lit[i] - "a")] = 1'b0;
    return p;
  endfunction

  function automatic logic [6:0] expected_n(int d);
    return pattern_n(lit_segments(d));
  endfunction

  // -1: not a hex digit; 16: the middle bar "-".
  function automatic int decode(logic [6:0] seg_n);
    for (int d = 0; d < 16; d++) if (expected_n(d) == seg_n) return d;
    if (seg_n == pattern_n("g")) return 16;
    return -1;
  endfunction

endpackage
