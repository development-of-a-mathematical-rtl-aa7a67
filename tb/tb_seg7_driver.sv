// tb_seg7_driver: drives the four-digit driver with directed and random
// values, with and without the "----" override and with random decimal
// points, and checks every indicator against seg7_ref_pkg.
module tb_seg7_driver;
  import calc_pkg::*;
  import seg7_ref_pkg::*;

  logic [15:0]            value;
  logic                   dash;
  logic [DIGITS-1:0]      dp;
  logic [DIGITS-1:0][6:0] seg_n;
  logic [DIGITS-1:0]      dp_n;
  int checks = 0, failures = 0;

  seg7_driver dut (.value(value), .dash(dash), .dp(dp), .seg_n(seg_n), .dp_n(dp_n));

  task automatic apply(logic [15:0] v, logic ds, logic [3:0] p);
    value = v; dash = ds; dp = p;
    #1;
    for (int d = 0; d < DIGITS; d++) begin
      logic [6:0] exp_seg;
      exp_seg = ds ? pattern_n("g") : expected_n(int'((v >> (4 * d)) & 16'hf));
      checks++;
      if (seg_n[d] !== exp_seg || dp_n[d] !== !p[d]) begin
        failures++;
        $display("value %h dash %b digit %0d: got %b/%b expected %b/%b",
                 v, ds, d, seg_n[d], dp_n[d], exp_seg, !p[d]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'h0000, 0, 4'h0);
    apply(16'h033f, 0, 4'h0);   // 831
    apply(16'h0452, 0, 4'h0);   // 1106
    apply(16'h1234, 0, 4'h5);
    apply(16'hfedc, 1, 4'h0);
    for (int i = 0; i < 200; i++) apply(16'($urandom), 1'($urandom), 4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
