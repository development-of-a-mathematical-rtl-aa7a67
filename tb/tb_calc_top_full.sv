// tb_calc_top_full: one complete operation on the calculator at its
// default parameters (10 ms debounce and 1 s timeout at 50 MHz): save
// 831, save 275, add, with bouncing buttons, and read "0452" (1106 in
// hexadecimal) back from the indicators. Also checks that a button acts
// exactly 2 + 500000 clocks after it settles.
module tb_calc_top_full;
  import calc_pkg::*;
  import seg7_ref_pkg::*;

  localparam int unsigned DEB = 500_000;   // must match the top's default

  logic clk = 0, rst_n = 0;
  logic [DATA_W-1:0]      sw = '0;
  logic [BUTTONS-1:0]     key_n = '1;
  logic [DIGITS-1:0][6:0] hex_n;
  logic [DIGITS-1:0]      hex_dp_n;
  to_cpu_t                to_cpu;
  from_cpu_t              from_cpu;
  logic                   busy;
  calc_events_t           events;
  int checks = 0, failures = 0;

  calc_top dut (
    .clk, .rst_n, .sw, .key_n, .hex_n, .hex_dp_n, .to_cpu, .from_cpu, .busy, .events);

  nios_calc_model #(.POLL_CYCLES(500), .CALC_CYCLES(2000)) cpu (
    .clk, .rst_n, .to_cpu, .from_cpu);

  always #10 clk = ~clk;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int shown();
    int v = 0, d;
    for (int i = DIGITS - 1; i >= 0; i--) begin
      d = decode(hex_n[i]);
      if (d < 0 || d > 15) return -1;
      v = v * 16 + d;
    end
    return v;
  endfunction

  // Bouncing press; returns clocks from the last bounce to the request.
  task automatic press(int k, output int latency);
    for (int i = 0; i < 3; i++) begin
      @(negedge clk) key_n[k] = 0;
      repeat (20_000) @(negedge clk);
      key_n[k] = 1;
      repeat (10_000) @(negedge clk);
    end
    key_n[k] = 0;
    latency = 0;
    while (!busy && latency < 2 * DEB) begin
      @(posedge clk); #1;
      latency++;
    end
    repeat (DEB / 5) @(negedge clk);
    key_n[k] = 1;
    repeat (DEB + 10) @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  initial begin
    int lat;
    repeat (5) @(posedge clk);
    rst_n = 1;
    sw = 10'd831;
    press(0, lat);
    // synchronizer (2) + debounce + one clock for the request register
    check($sformatf("button latency %0d", lat), lat == DEB + 3);
    check("first operand shown", shown() == 831);
    sw = 10'd275;
    press(0, lat);
    check("second operand shown", shown() == 275);
    sw = DATA_W'(OP_ADD);
    press(1, lat);
    check($sformatf("sum shown as %h", shown()), shown() == 16'h0452);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
