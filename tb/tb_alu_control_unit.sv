// tb_alu_control_unit: runs the control unit against the behavioural
// processor model. Saves the operands 831 and 275 and runs all four
// operations on them, then random operands and operations; checks the
// displayed value or "----" against a reference computed here, checks
// that the result shows one clock after s_done, that presses during a
// handshake are ignored, that an unknown operation code and a silent
// processor end in a timeout, and that clear resets the operand order
// and the display.
module tb_alu_control_unit;
  import calc_pkg::*;

  localparam int unsigned TIMEOUT = 300;

  logic clk = 0, rst_n = 0;
  logic [DATA_W-1:0] sw = '0;
  logic save_press = 0, calc_press = 0, clear = 0;
  to_cpu_t   to_cpu;
  from_cpu_t from_cpu, model_out;
  logic      silent = 0;
  logic [RESULT_W-1:0] disp_value;
  logic disp_dash, busy, ev_saved, ev_result, ev_error, ev_timeout;
  int checks = 0, failures = 0;
  longint cycle = 0, done_cycle = -1, result_cycle = -1;

  alu_control_unit #(.TIMEOUT_CYCLES(TIMEOUT)) dut (
    .clk, .rst_n, .sw, .save_press, .calc_press, .clear, .to_cpu, .from_cpu,
    .disp_value, .disp_dash, .busy, .ev_saved, .ev_result, .ev_error, .ev_timeout);

  nios_calc_model #(.POLL_CYCLES(3), .CALC_CYCLES(7)) cpu (
    .clk, .rst_n, .to_cpu, .from_cpu(model_out));

  assign from_cpu = silent ? '0 : model_out;

  always #5 clk = ~clk;

  logic done_q = 0;
  always @(posedge clk) begin
    cycle++;
    done_q <= from_cpu.s_done;
    if (from_cpu.s_done && !done_q) done_cycle = cycle;
    if (ev_result || ev_error) result_cycle = cycle;
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic pulse(ref logic sig);
    @(negedge clk) sig = 1;
    @(negedge clk) sig = 0;
  endtask

  // Wait for the handshake to finish; report which event ended it.
  task automatic wait_idle(output string ev);
    ev = "none";
    for (int i = 0; i < 4 * TIMEOUT; i++) begin
      @(posedge clk); #1;
      if (ev_saved)   ev = "saved";
      if (ev_result)  ev = "result";
      if (ev_error)   ev = "error";
      if (ev_timeout) ev = "timeout";
      if (!busy) return;
    end
  endtask

  task automatic save(int v, int idx);
    string ev;
    sw = DATA_W'(v);
    pulse(save_press);
    #1 check("save request raised", to_cpu.s_save_operand && to_cpu.s_ctrl1 == idx[0]);
    wait_idle(ev);
    check($sformatf("save %0d as operand %0d: %s", v, idx, ev), ev == "saved");
    check("operand stored", cpu.operand[idx] == v);
    check("saved value displayed", disp_value == v && !disp_dash);
  endtask

  function automatic longint reference(longint a, longint b, int op, output bit bad);
    longint r = 0;
    bad = 0;
    case (op)
      0: r = a + b;
      1: r = a - b;
      2: r = a * b;
      default: if (b == 0) bad = 1; else r = a / b;
    endcase
    if (r < 0 || r > 65535) bad = 1;
    return r;
  endfunction

  task automatic calc(longint a, longint b, int op);
    string ev;
    bit bad;
    longint r;
    r = reference(a, b, op, bad);
    sw = DATA_W'(op);
    pulse(calc_press);
    #1 check("calc request raised", to_cpu.s_ctrl0 && to_cpu.data_in == op);
    wait_idle(ev);
    if (bad)
      check($sformatf("%0d op%0d %0d -> ---- (%s)", a, op, b, ev), ev == "error" && disp_dash);
    else
      check($sformatf("%0d op%0d %0d -> %0d (got %0d, %s)", a, op, b, r, disp_value, ev),
            ev == "result" && !disp_dash && disp_value == r);
    check("display one clock after s_done", result_cycle == done_cycle + 1);
  endtask

  initial begin
    string ev;
    int a, b;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk); #1;
    check("idle after reset", !busy && disp_value == 0 && !disp_dash && to_cpu == '0);

    // the document's example
    save(831, 0);
    save(275, 1);
    for (int op = 0; op < 4; op++) calc(831, 275, op);

    // presses during a handshake are ignored
    sw = DATA_W'(OP_SUB);
    pulse(calc_press);
    sw = 10'd5;
    save_press = 1;
    calc_press = 1;
    @(negedge clk) save_press = 0;
    calc_press = 0;
    wait_idle(ev);
    check("busy presses ignored", ev == "result" && disp_value == 556 &&
          cpu.operand[0] == 831 && cpu.operand[1] == 275 && cpu.calls == 5);
    repeat (3) @(posedge clk); #1;
    check("back to idle", !busy && to_cpu.s_ctrl0 == 0 && to_cpu.s_save_operand == 0);

    // unknown operation code: the processor ignores it
    sw = 10'h3f4;
    pulse(calc_press);
    wait_idle(ev);
    check("unknown code times out", ev == "timeout" && disp_dash);

    // silent processor during a save
    silent = 1;
    sw = 10'd77;
    pulse(save_press);
    wait_idle(ev);
    check("silent processor times out", ev == "timeout" && disp_dash);
    silent = 0;
    repeat (20) @(posedge clk);

    // clear: s_reset follows the button, display to 0, next save is operand 0
    @(negedge clk) clear = 1;
    repeat (12) @(posedge clk); #1;
    check("s_reset follows clear", to_cpu.s_reset && disp_value == 0 && !disp_dash);
    check("processor cleared", cpu.operand[0] == 0 && cpu.operand[1] == 0);
    @(negedge clk) clear = 0;
    repeat (3) @(posedge clk); #1;
    check("s_reset released", !to_cpu.s_reset);
    save(12, 0);
    save(0, 1);
    calc(12, 0, 3);   // division by zero
    calc(12, 0, 1);   // 12 - 0

    // random operands and operations
    for (int i = 0; i < 40; i++) begin
      a = $urandom_range(0, 1023);
      b = $urandom_range(0, 1023);
      save(a, 0);
      save(b, 1);
      calc(a, b, $urandom_range(0, 3));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
