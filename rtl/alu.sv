// alu: the control processor's 16-bit ALU with its flag register.
//
// d_o is combinational: OR, XOR, ADD, SUB, AND, COPY on the two operand buses
// DA (source 1, or the instruction's data value / the data register) and DB
// (source 2). SUB computes DB - DA, matching the instruction set's
// "destination = source 2 - source 1" and giving "register - data" for the
// data-value forms. The two stack codes pass DA through so that popped and
// loaded values reach the register-file write port through the ALU. Opcodes
// map onto the ALU operation by their low three bits (CMP onto SUB, LOAD onto
// COPY).
//
// Flags F_ZERO, F_NZERO, F_POS (result > 0) and F_NEG (result < 0) are
// registered on the clock edge when alu_done_i is high and stack_op_i is low.
// Port names follow the ALU schematic; the flag update rule and the meaning
// of "positive" as strictly greater than zero are this design's choices.
module alu
  import elroy_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_i,
  input  alu_op_e           alu_op_i,
  input  logic [DATA_W-1:0] da_i,
  input  logic [DATA_W-1:0] db_i,
  input  logic              alu_done_i,
  input  logic              stack_op_i,
  output logic [DATA_W-1:0] d_o,
  output logic              f_zero_o,
  output logic              f_nzero_o,
  output logic              f_pos_o,
  output logic              f_neg_o
);

  always_comb begin
    unique case (alu_op_i)
      ALU_OR:   d_o = da_i | db_i;
      ALU_XOR:  d_o = da_i ^ db_i;
      ALU_ADD:  d_o = da_i + db_i;
      ALU_SUB:  d_o = db_i - da_i;
      ALU_AND:  d_o = da_i & db_i;
      default:  d_o = da_i;  // COPY, PUSH, POP
    endcase
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      f_zero_o  <= 1'b0;
      f_nzero_o <= 1'b0;
      f_pos_o   <= 1'b0;
      f_neg_o   <= 1'b0;
    end else if (alu_done_i && !stack_op_i) begin
      f_zero_o  <= (d_o == '0);
      f_nzero_o <= (d_o != '0);
      f_pos_o   <= !d_o[DATA_W-1] && (d_o != '0);
      f_neg_o   <= d_o[DATA_W-1];
    end
  end

endmodule
