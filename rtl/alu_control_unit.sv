// alu_control_unit: user front end and processor handshake of the
// calculator.
//
// The arithmetic itself runs as software on the soft processor. This unit
// turns the user's actions into requests on the shared I/O word and
// decides what the four indicators show:
//
//   * save button: the switch value is latched onto Data_in and
//     s_save_operand is raised, with s_ctrl1 telling which operand (first,
//     then second, then first again) is meant. When the processor answers
//     with s_operand_saved the saved value is put on the display.
//   * calculate button: the switch value (the operation code, see
//     calc_pkg::op_e) is latched onto Data_in and s_ctrl0 is raised. When
//     the processor answers with s_done the 16-bit Result is displayed.
//     If it answers with s_done and s_operand_saved together the operation
//     failed or overflowed and the display shows "----".
//   * clear button: s_reset follows the (debounced) button, the unit
//     returns to idle, the next save goes to the first operand and the
//     display shows 0000.
//
// Both handshakes are four-phase: the request stays high until the
// acknowledge rises, then drops, and the unit waits for the acknowledge to
// drop before taking the next button press. Buttons pressed meanwhile are
// ignored. If an acknowledge does not come (or does not go away) within
// TIMEOUT_CYCLES clocks the request is withdrawn and "----" is shown: this
// is how a calculation that never finishes, for example after an
// operation code the processor does not know, is reported.
//
// Interface: button inputs are the debounced press pulses and the clear
// level. All outputs are registered. The document gives this unit's name
// and job (read switches and buttons, produce operation codes and control
// pulses for the indicators and the processor) and the names of the I/O
// bits; the handshake order, the use of s_ctrl0/s_ctrl1, the error
// encoding and the timeout are this design's choices.
module alu_control_unit
  import calc_pkg::*;
#(
  parameter int unsigned TIMEOUT_CYCLES = 50_000_000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DATA_W-1:0]   sw,          // switches
  input  logic                save_press,  // save-operand button pulse
  input  logic                calc_press,  // calculate button pulse
  input  logic                clear,       // clear button level
  output to_cpu_t             to_cpu,      // requests to the processor
  input  from_cpu_t           from_cpu,    // answers from the processor
  output logic [RESULT_W-1:0] disp_value,  // value for the indicators
  output logic                disp_dash,   // show "----"
  output logic                busy,        // a handshake is in progress
  output logic                ev_saved,    // pulse: operand stored
  output logic                ev_result,   // pulse: result displayed
  output logic                ev_error,    // pulse: processor reported error
  output logic                ev_timeout   // pulse: no answer in time
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_SAVE_REQ,
    S_SAVE_REL,
    S_CALC_REQ,
    S_CALC_REL
  } state_e;

  localparam int unsigned TMR_W = $clog2(TIMEOUT_CYCLES + 1);

  state_e            state;
  logic [DATA_W-1:0] data_reg;
  logic              op_index;    // 0: first operand next, 1: second
  logic              cur_index;   // operand of the save in progress
  logic              clear_q;
  logic [TMR_W-1:0]  timer;
  logic              expired;

  assign expired = (timer == TMR_W'(TIMEOUT_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      data_reg   <= '0;
      op_index   <= 1'b0;
      cur_index  <= 1'b0;
      clear_q    <= 1'b0;
      timer      <= '0;
      disp_value <= '0;
      disp_dash  <= 1'b0;
      ev_saved   <= 1'b0;
      ev_result  <= 1'b0;
      ev_error   <= 1'b0;
      ev_timeout <= 1'b0;
    end else begin
      clear_q    <= clear;
      ev_saved   <= 1'b0;
      ev_result  <= 1'b0;
      ev_error   <= 1'b0;
      ev_timeout <= 1'b0;
      timer      <= (state == S_IDLE) ? '0 : timer + 1'b1;

      if (clear) begin
        state      <= S_IDLE;
        op_index   <= 1'b0;
        disp_value <= '0;
        disp_dash  <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: begin
            if (save_press) begin
              data_reg  <= sw;
              cur_index <= op_index;
              state     <= S_SAVE_REQ;
            end else if (calc_press) begin
              data_reg <= sw;
              state    <= S_CALC_REQ;
            end
          end

          S_SAVE_REQ: begin
            if (from_cpu.s_operand_saved) begin
              disp_value <= RESULT_W'(data_reg);
              disp_dash  <= 1'b0;
              op_index   <= ~cur_index;
              ev_saved   <= 1'b1;
              timer      <= '0;
              state      <= S_SAVE_REL;
            end else if (expired) begin
              disp_dash  <= 1'b1;
              ev_timeout <= 1'b1;
              state      <= S_IDLE;
            end
          end

          S_CALC_REQ: begin
            if (from_cpu.s_done) begin
              if (from_cpu.s_operand_saved) begin
                disp_dash <= 1'b1;
                ev_error  <= 1'b1;
              end else begin
                disp_value <= from_cpu.result;
                disp_dash  <= 1'b0;
                ev_result  <= 1'b1;
              end
              timer <= '0;
              state <= S_CALC_REL;
            end else if (expired) begin
              disp_dash  <= 1'b1;
              ev_timeout <= 1'b1;
              state      <= S_IDLE;
            end
          end

          S_SAVE_REL, S_CALC_REL: begin
            if (!from_cpu.s_operand_saved && !from_cpu.s_done) begin
              state <= S_IDLE;
            end else if (expired) begin
              disp_dash  <= 1'b1;
              ev_timeout <= 1'b1;
              state      <= S_IDLE;
            end
          end

          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign to_cpu.s_save_operand = (state == S_SAVE_REQ);
  assign to_cpu.s_ctrl0        = (state == S_CALC_REQ);
  assign to_cpu.s_ctrl1        = cur_index;
  assign to_cpu.s_reset        = clear_q;
  assign to_cpu.data_in        = data_reg;
  assign busy                  = (state != S_IDLE);

  // Handshake rules: at most one request at a time, and Data_in/s_ctrl1
  // do not change while a request is raised.
  a_one_request : assert property (@(posedge clk) disable iff (!rst_n)
    !(to_cpu.s_save_operand && to_cpu.s_ctrl0));
  a_data_stable : assert property (@(posedge clk) disable iff (!rst_n)
    (to_cpu.s_save_operand || to_cpu.s_ctrl0) && $past(to_cpu.s_save_operand || to_cpu.s_ctrl0)
      |-> $stable(to_cpu.data_in) && $stable(to_cpu.s_ctrl1));

endmodule
