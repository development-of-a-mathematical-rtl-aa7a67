// tb_debouncer: feeds the debouncer clean presses, bouncing presses and
// releases, and short glitches. Checks that the clean level and the press
// pulse appear exactly 2 + DEBOUNCE_CYCLES clocks after the input settles,
// that each press gives one pulse, and that glitches shorter than the
// debounce time are ignored.
module tb_debouncer;
  localparam int unsigned N = 16;

  logic clk = 0, rst_n = 0, btn_n = 1;
  logic pressed, press;
  int checks = 0, failures = 0;
  int pulses = 0;
  longint cycle = 0;

  debouncer #(.DEBOUNCE_CYCLES(N)) dut (
    .clk(clk), .rst_n(rst_n), .btn_n(btn_n), .pressed(pressed), .press(press));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    if (press) pulses++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  // Set the input, then wait until `pressed` equals `level`; return the
  // number of clocks that took.
  task automatic settle(logic b, logic level, output int clocks);
    @(negedge clk) btn_n = b;
    clocks = 0;
    while (pressed !== level && clocks < 10 * N) begin
      @(posedge clk); #1;
      clocks++;
    end
  endtask

  task automatic bounce(int times);
    for (int i = 0; i < times; i++) begin
      @(negedge clk) btn_n = ~btn_n;
      repeat (1 + $urandom_range(0, N / 2)) @(negedge clk);
    end
  endtask

  initial begin
    int clocks, p0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check("idle after reset", pressed === 0 && press === 0);

    for (int k = 0; k < 4; k++) begin
      // press, possibly with bounce
      p0 = pulses;
      if (k > 0) bounce(2 * k);   // even count ends where it started
      settle(0, 1, clocks);
      check($sformatf("press %0d latency %0d", k, clocks), clocks == N + 2);
      @(posedge clk); #1;
      check("single pulse per press", pulses == p0 + 1 && press === 0);
      repeat (3 * N) @(posedge clk);
      check("level held", pressed === 1 && pulses == p0 + 1);
      // release, possibly with bounce
      if (k > 0) bounce(2 * k);
      settle(1, 0, clocks);
      check($sformatf("release %0d latency %0d", k, clocks), clocks == N + 2);
      check("no pulse on release", pulses == p0 + 1);
      repeat (2 * N) @(posedge clk);
    end

    // glitches shorter than N clocks never get through
    p0 = pulses;
    for (int g = 0; g < 10; g++) begin
      @(negedge clk) btn_n = 0;
      repeat ($urandom_range(1, N - 3)) @(negedge clk);
      btn_n = 1;
      repeat (N + 4) @(negedge clk);
    end
    check("glitches ignored", pulses == p0 && pressed === 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
