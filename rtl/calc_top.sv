// calc_top: hand-written logic of the four-function special computer.
//
// The calculator adds, subtracts, multiplies and divides two 10-bit
// numbers. The arithmetic is done in software by a soft processor; this
// module is the rest of the computer as the document's structural scheme
// draws it: three push-button debouncers, the ALU control unit that turns
// switches and buttons into requests for the processor, and the driver of
// the four seven-segment indicators. The processor's 32-bit parallel I/O
// word is brought out as two ports, `to_cpu` (bits 13..0) and `from_cpu`
// (bits 31..14), laid out as in calc_pkg.
//
// Buttons (active low): key_n[0] saves the switch value as the next
// operand, key_n[1] starts the operation whose code is on the switches,
// key_n[2] clears the calculator. The indicators show the last saved
// operand, the last result, or "----" on an error or a timeout. Decimal
// points are not used and stay dark. `events` carries one-clock pulses
// (operand saved, result shown, error, timeout) for status lamps or
// monitoring.
//
// Timing: a request to the processor rises 3 + DEBOUNCE_CYCLES clocks
// after a button settles (synchronizer, debounce, request register);
// the result appears one clock after the processor raises s_done. The
// assignment of buttons and the defaults (10 ms debounce, 1 s timeout at
// 50 MHz) are this design's choices. Of each debouncer only the output
// that is needed is used: the press pulse of the save and calculate
// buttons and the held level of the clear button; lint reports the others
// as unused.
module calc_top
  import calc_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 500_000,
  parameter int unsigned TIMEOUT_CYCLES  = 50_000_000
) (
  input  logic                   clk,       // 50 MHz board clock
  input  logic                   rst_n,     // power-on reset, active low
  input  logic [DATA_W-1:0]      sw,        // ten slide switches
  input  logic [BUTTONS-1:0]     key_n,     // push buttons, active low
  output logic [DIGITS-1:0][6:0] hex_n,     // indicator segments, active low
  output logic [DIGITS-1:0]      hex_dp_n,  // decimal points, active low
  output to_cpu_t                to_cpu,    // pio_0 bits driven by this logic
  input  from_cpu_t              from_cpu,  // pio_0 bits driven by the processor
  output logic                   busy,      // a request is in progress
  output calc_events_t           events     // one-clock event pulses
);

  logic [BUTTONS-1:0] pressed, press;
  logic [RESULT_W-1:0] disp_value;
  logic                disp_dash;

  for (genvar b = 0; b < BUTTONS; b++) begin : g_key
    debouncer #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_debouncer (
      .clk     (clk),
      .rst_n   (rst_n),
      .btn_n   (key_n[b]),
      .pressed (pressed[b]),
      .press   (press[b])
    );
  end

  alu_control_unit #(.TIMEOUT_CYCLES(TIMEOUT_CYCLES)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .sw         (sw),
    .save_press (press[0]),
    .calc_press (press[1]),
    .clear      (pressed[2]),
    .to_cpu     (to_cpu),
    .from_cpu   (from_cpu),
    .disp_value (disp_value),
    .disp_dash  (disp_dash),
    .busy       (busy),
    .ev_saved   (events.saved),
    .ev_result  (events.result),
    .ev_error   (events.error),
    .ev_timeout (events.timeout)
  );

  seg7_driver u_seg7 (
    .value (disp_value),
    .dash  (disp_dash),
    .dp    ('0),
    .seg_n (hex_n),
    .dp_n  (hex_dp_n)
  );

endmodule
