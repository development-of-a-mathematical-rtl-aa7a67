// nios_calc_model: behavioural model of the soft processor and its
// calculator program, seen from the 32-bit parallel I/O word. Not
// synthesizable logic: it stands in for the processor in testbenches.
//
// Every POLL_CYCLES clocks the "program" reads the word once, like a
// polling loop, and acts on it:
//   s_reset         -> forget both operands, drop all flags;
//   s_save_operand  -> store Data_in as operand s_ctrl1, raise
//                      s_operand_saved; drop it once the request drops;
//   s_ctrl0         -> if Data_in is a known operation code, compute,
//                      put the value on Result and raise s_done (with
//                      s_operand_saved too when the result is negative,
//                      over 16 bits, or a division by zero); an unknown
//                      code is ignored. s_done drops once s_ctrl0 drops.
// CALC_CYCLES extra clocks before the next poll model the time the
// arithmetic takes.
module nios_calc_model
  import calc_pkg::*;
#(
  parameter int POLL_CYCLES = 5,
  parameter int CALC_CYCLES = 20
) (
  input  logic      clk,
  input  logic      rst_n,
  input  to_cpu_t   to_cpu,
  output from_cpu_t from_cpu
);

  int unsigned operand[2];
  int          wait_cnt;
  int          calls;       // number of calculations performed

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      from_cpu   <= '0;
      operand[0] <= 0;
      operand[1] <= 0;
      wait_cnt   <= POLL_CYCLES;
      calls      <= 0;
    end else if (wait_cnt > 0) begin
      wait_cnt <= wait_cnt - 1;
    end else begin
      wait_cnt <= POLL_CYCLES;
      if (to_cpu.s_reset) begin
        from_cpu   <= '0;
        operand[0] <= 0;
        operand[1] <= 0;
      end else if (to_cpu.s_save_operand && !from_cpu.s_operand_saved) begin
        operand[to_cpu.s_ctrl1] <= 32'(to_cpu.data_in);
        from_cpu.s_operand_saved <= 1'b1;
      end else if (to_cpu.s_ctrl0 && !from_cpu.s_done) begin
        if (to_cpu.data_in[DATA_W-1:2] == '0) begin
          longint a, b, r;
          logic bad;
          a   = longint'(operand[0]);
          b   = longint'(operand[1]);
          bad = 1'b0;
          r   = 0;
          case (op_e'(to_cpu.data_in[1:0]))
            OP_ADD: r = a + b;
            OP_SUB: r = a - b;
            OP_MUL: r = a * b;
            OP_DIV: if (b == 0) bad = 1'b1; else r = a / b;
          endcase
          if (r < 0 || r > 65535) bad = 1'b1;
          from_cpu.result          <= bad ? '0 : RESULT_W'(r);
          from_cpu.s_done          <= 1'b1;
          from_cpu.s_operand_saved <= bad;
          calls                    <= calls + 1;
          wait_cnt                 <= POLL_CYCLES + CALC_CYCLES;
        end
      end else if (!to_cpu.s_save_operand && !to_cpu.s_ctrl0) begin
        from_cpu.s_operand_saved <= 1'b0;
        from_cpu.s_done          <= 1'b0;
      end
    end
  end

endmodule
