// tb_seg7_lut: checks all sixteen digits of the single-digit decoder
// against the segment lists of seg7_ref_pkg.
module tb_seg7_lut;
  import seg7_ref_pkg::*;

  logic [3:0] digit;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;

  seg7_lut dut (.digit(digit), .seg_n(seg_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      digit = 4'(d);
      #1;
      checks++;
      if (seg_n !== expected_n(d)) begin
        failures++;
        $display("digit %h: got %b expected %b", d, seg_n, expected_n(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
