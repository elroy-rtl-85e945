// pc_unit: program counter and branch unit.
//
// The PC holds a byte address; instructions are 32 bits, so it advances by 4
// on every fetch (inc_i). In the execute step (exec_i) the opcode decides:
//   JMP  PC <= data value             JSR  push PC, PC <= data value
//   JE   PC <= data value if F_ZERO   RTS  PC <= top of stack, pop
//   JA   PC <= data value if F_POS
// The return address pushed by JSR is the already-incremented PC, i.e. the
// instruction after the JSR. Branch targets are byte addresses (instruction
// index times four). The branch set and conditions follow the instruction set;
// byte addressing of instructions follows the design's memory organisation.
// Reset sets PC to 0.
module pc_unit
  import elroy_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_i,
  input  logic              inc_i,
  input  logic              exec_i,
  input  opcode_e           op_i,
  input  logic [DATA_W-1:0] target_i,
  input  logic              f_zero_i,
  input  logic              f_pos_i,
  input  logic [DATA_W-1:0] ret_i,
  output logic [DATA_W-1:0] pc_o,
  output logic              push_ret_o,
  output logic              pop_ret_o,
  output logic              taken_o
);

  always_comb begin
    taken_o = 1'b0;
    if (exec_i) begin
      unique case (op_i)
        OP_JMP, OP_JSR: taken_o = 1'b1;
        OP_JE:          taken_o = f_zero_i;
        OP_JA:          taken_o = f_pos_i;
        default:        taken_o = 1'b0;
      endcase
    end
  end

  assign push_ret_o = exec_i && (op_i == OP_JSR);
  assign pop_ret_o  = exec_i && (op_i == OP_RTS);

  always_ff @(posedge clk_i) begin
    if (rst_i)          pc_o <= '0;
    else if (inc_i)     pc_o <= pc_o + 16'd4;
    else if (taken_o)   pc_o <= target_i;
    else if (pop_ret_o) pc_o <= ret_i;
  end

endmodule
