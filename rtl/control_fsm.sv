// control_fsm: the control processor's Fetch / Decode / Execute sequencer.
//
// Every instruction takes three clock cycles:
//   FETCH   read the 32-bit word at PC into the instruction and data registers
//           (rd_inst and rd_data both high), PC += 4;
//   DECODE  for LOAD from memory, read the 16-bit value at the address in
//           source 1 into the data register (rd_data only, address from DBA);
//   EXECUTE ALU operation and write-back, memory write, stack or branch, and
//           writes to the cell array's output registers.
// A six-instruction loop therefore takes 18 cycles, the multiply-accumulate
// cost the design states for its convolution inner loop. Cell operations need
// no further states because the array is driven through registered outputs
// (one cycle after EXECUTE), which is this design's choice.
//
// The outputs are decoded from the upper half of the instruction register.
module control_fsm
  import elroy_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_i,
  input  inst_hi_t inst_i,
  output logic     fetch_o,
  output logic     decode_o,
  output logic     exec_o,
  output logic     rd_inst_o,
  output logic     rd_data_o,
  output logic     addr_sel_reg_o,  // memory address from DBA instead of PC
  output logic     alu_done_o,
  output logic     stack_op_o,
  output logic     w_enable_o,      // result written to the destination
  output logic     mem_we_o,
  output logic     push_data_o,
  output logic     pop_data_o,
  output logic     in_sel_o,        // DA taken from IN_VAL, not from DBA
  output logic     in_val_stack_o   // IN_VAL is the stack top, not the data register
);

  typedef enum logic [1:0] {S_FETCH, S_DECODE, S_EXECUTE} state_e;
  state_e state_q;

  always_ff @(posedge clk_i) begin
    if (rst_i) state_q <= S_FETCH;
    else unique case (state_q)
      S_FETCH:   state_q <= S_DECODE;
      S_DECODE:  state_q <= S_EXECUTE;
      default:   state_q <= S_FETCH;
    endcase
  end

  logic is_alu, is_load, load_mem;

  always_comb begin
    is_alu   = (inst_i.op inside {OP_OR, OP_XOR, OP_ADD, OP_SUB, OP_AND, OP_COPY});
    is_load  = (inst_i.op == OP_LOAD);
    load_mem = is_load && (inst_i.src1 != SR_EXTDATA) && (inst_i.dest != SR_CDELINT);

    fetch_o        = (state_q == S_FETCH);
    decode_o       = (state_q == S_DECODE);
    exec_o         = (state_q == S_EXECUTE);
    rd_inst_o      = fetch_o;
    rd_data_o      = fetch_o || (decode_o && load_mem);
    addr_sel_reg_o = decode_o || exec_o;
    alu_done_o     = exec_o && (is_alu || is_load || inst_i.op inside {OP_POP, OP_CMP});
    stack_op_o     = inst_i.op inside {OP_PUSH, OP_POP};
    w_enable_o     = exec_o && (is_alu || is_load || inst_i.op == OP_POP);
    mem_we_o       = exec_o && (inst_i.op == OP_WRITE);
    push_data_o    = exec_o && (inst_i.op == OP_PUSH);
    pop_data_o     = exec_o && (inst_i.op == OP_POP);
    in_sel_o       = is_load || (inst_i.op == OP_POP) || (inst_i.src1 == SR_EXTDATA);
    in_val_stack_o = (inst_i.op == OP_POP);
  end

endmodule
