// tb_calc_top: end-to-end test of the calculator front end with the
// behavioural processor model on its I/O word. Buttons are pressed and
// released with contact bounce; the displayed number is read back from
// the segment outputs. It replays the document's test sequence (operands
// 831 and 275, then add, subtract, multiply, divide), then exercises
// every mechanism of the design and counts how often each happened:
// bounce filtered, operand saved, result shown, error shown as "----",
// press ignored while busy, timeout on an unknown operation code, clear.
// A mechanism that never happened counts as a failure.
module tb_calc_top;
  import calc_pkg::*;
  import seg7_ref_pkg::*;

  localparam int unsigned DEB  = 20;
  localparam int unsigned TOUT = 3000;

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
  int n_bounce = 0, n_saved = 0, n_result = 0, n_error = 0,
      n_ignored = 0, n_timeout = 0, n_clear = 0;

  calc_top #(.DEBOUNCE_CYCLES(DEB), .TIMEOUT_CYCLES(TOUT)) dut (
    .clk, .rst_n, .sw, .key_n, .hex_n, .hex_dp_n, .to_cpu, .from_cpu, .busy, .events);

  nios_calc_model #(.POLL_CYCLES(100), .CALC_CYCLES(50)) cpu (
    .clk, .rst_n, .to_cpu, .from_cpu);

  always #10 clk = ~clk;   // 50 MHz

  always @(posedge clk) begin
    if (events.saved)   n_saved++;
    if (events.result)  n_result++;
    if (events.error)   n_error++;
    if (events.timeout) n_timeout++;
  end

  initial begin
    repeat (400000) @(posedge clk);
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

  // What the four indicators show: a value, or -1 for "----", -2 other.
  function automatic int shown();
    int v = 0, dashes = 0, d;
    for (int i = DIGITS - 1; i >= 0; i--) begin
      d = decode(hex_n[i]);
      if (d < 0) return -2;
      if (d == 16) dashes++;
      else v = v * 16 + d;
    end
    if (dashes == DIGITS) return -1;
    if (dashes != 0) return -2;
    return v;
  endfunction

  // Press and release button k, each edge with `bounces` short bounces.
  task automatic press(int k, int bounces);
    if (bounces > 0) n_bounce++;
    for (int i = 0; i < bounces; i++) begin
      @(negedge clk) key_n[k] = 0;
      repeat ($urandom_range(1, DEB / 2)) @(negedge clk);
      key_n[k] = 1;
      repeat ($urandom_range(1, DEB / 2)) @(negedge clk);
    end
    @(negedge clk) key_n[k] = 0;
    repeat (2 * DEB) @(negedge clk);
    for (int i = 0; i < bounces; i++) begin
      key_n[k] = 1;
      repeat ($urandom_range(1, DEB / 2)) @(negedge clk);
      key_n[k] = 0;
      repeat ($urandom_range(1, DEB / 2)) @(negedge clk);
    end
    key_n[k] = 1;
    repeat (2 * DEB) @(negedge clk);
  endtask

  task automatic wait_idle();
    for (int i = 0; i < 4 * TOUT && busy; i++) @(posedge clk);
    @(negedge clk);
  endtask

  task automatic save(int v);
    int s0 = n_saved;
    sw = DATA_W'(v);
    press(0, $urandom_range(0, 3));
    wait_idle();
    check($sformatf("save %0d shown (got %0d)", v, shown()), shown() == v && n_saved == s0 + 1);
  endtask

  function automatic int reference(int a, int b, int op);
    longint r;
    case (op)
      0: r = a + b;
      1: r = a - b;
      2: r = longint'(a) * b;
      default: r = (b == 0) ? -1 : a / b;
    endcase
    return (r < 0 || r > 65535) ? -1 : int'(r);
  endfunction

  task automatic calc(int a, int b, int op);
    int exp_v = reference(a, b, op);
    sw = DATA_W'(op);
    press(1, $urandom_range(0, 3));
    wait_idle();
    check($sformatf("%0d op%0d %0d: shown %0d expected %0d", a, op, b, shown(), exp_v),
          shown() == exp_v);
  endtask

  initial begin
    int a, b, calls0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check("0000 after reset", shown() == 0 && hex_dp_n == '1);

    // the document's test: 831 and 275, four operations
    save(831);
    save(275);
    for (int op = 0; op < 4; op++) calc(831, 275, op);
    check("operands in processor", cpu.operand[0] == 831 && cpu.operand[1] == 275);

    // a save pressed while a calculation is in progress is ignored
    sw = DATA_W'(OP_ADD);
    calls0 = cpu.calls;
    fork
      press(1, 0);
      begin
        wait (busy);
        sw = 10'd9;
        press(0, 1);
        if (busy) n_ignored++;
      end
    join
    wait_idle();
    check("press while busy ignored", shown() == 1106 && cpu.operand[0] == 831 &&
          cpu.calls == calls0 + 1);

    // unknown operation code: no answer, "----" after the timeout
    sw = 10'h2a5;
    press(1, 2);
    wait_idle();
    check("unknown code gives ----", shown() == -1);

    // clear
    press(2, 1);
    n_clear++;
    check("clear shows 0000", shown() == 0 && cpu.operand[0] == 0 && cpu.operand[1] == 0);
    save(100);
    check("after clear the first operand is saved", cpu.operand[0] == 100);
    save(0);
    calc(100, 0, 3);   // division by zero
    calc(100, 0, 0);

    // random workloads
    for (int i = 0; i < 10; i++) begin
      a = $urandom_range(0, 1023);
      b = $urandom_range(1, 1023);
      save(a);
      save(b);
      calc(a, b, $urandom_range(0, 3));
    end

    $display("mechanisms: bounce=%0d saved=%0d result=%0d error=%0d ignored=%0d timeout=%0d clear=%0d",
             n_bounce, n_saved, n_result, n_error, n_ignored, n_timeout, n_clear);
    check("bounce exercised",  n_bounce  > 0);
    check("save exercised",    n_saved   > 0);
    check("result exercised",  n_result  > 0);
    check("error exercised",   n_error   > 0);
    check("ignored exercised", n_ignored > 0);
    check("timeout exercised", n_timeout > 0);
    check("clear exercised",   n_clear   > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
