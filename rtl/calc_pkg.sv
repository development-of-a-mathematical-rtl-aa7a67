// calc_pkg: types and constants shared by the calculator front end.
//
// The calculator is split between a soft processor, which does the
// arithmetic in software, and a small block of hand-written logic that
// reads the switches and buttons and drives the four seven-segment
// indicators. The two halves talk through one 32-bit parallel I/O word.
// Its bit allocation follows the document (most significant field first):
//
//   [31:16] Result          processor -> logic, value of the last operation
//   [15]    s_done          processor -> logic, calculation finished
//   [14]    s_operand_saved processor -> logic, operand stored
//   [13]    s_save_operand  logic -> processor, store Data_in as an operand
//   [12]    s_reset         logic -> processor, clear operands and flags
//   [11]    s_ctrl0         logic -> processor, start the calculation
//   [10]    s_ctrl1         logic -> processor, which operand is being saved
//   [9:0]   Data_in         logic -> processor, switches (operand or op code)
//
// The direction of each bit, the meaning of s_ctrl0/s_ctrl1 and the
// operation codes are this design's choices; the document names the bits
// only. An error (overflow, division by zero) is reported by the
// processor raising s_done and s_operand_saved together.
package calc_pkg;

  localparam int unsigned DATA_W   = 10;  // switches / Data_in
  localparam int unsigned RESULT_W = 16;  // Result field, four hex digits
  localparam int unsigned DIGITS   = 4;   // seven-segment indicators
  localparam int unsigned BUTTONS  = 3;   // push buttons

  // Operation codes carried in Data_in[1:0] while s_ctrl0 is high.
  // Data_in[9:2] must be zero; any other code is ignored by the processor.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2,
    OP_DIV = 2'd3
  } op_e;

  // Signals the logic drives towards the processor (bits 13..0).
  typedef struct packed {
    logic               s_save_operand;
    logic               s_reset;
    logic               s_ctrl0;
    logic               s_ctrl1;
    logic [DATA_W-1:0]  data_in;
  } to_cpu_t;

  // Signals the processor drives towards the logic (bits 31..14).
  typedef struct packed {
    logic [RESULT_W-1:0] result;
    logic                s_done;
    logic                s_operand_saved;
  } from_cpu_t;

  // One-clock event pulses of the control unit, for status lamps.
  typedef struct packed {
    logic saved;    // an operand was stored by the processor
    logic result;   // a result was put on the display
    logic error;    // the processor reported overflow or failure
    logic timeout;  // the processor did not answer in time
  } calc_events_t;

  // The whole pio_0 word in the order of the document's bit allocation.
  function automatic logic [31:0] pio_word(from_cpu_t f, to_cpu_t t);
    return {f, t};
  endfunction

  // Active-low segment patterns, bit 0 = segment a ... bit 6 = segment g.
  localparam logic [6:0] SEG_DASH  = 7'b0111111;  // only g lit

endpackage
