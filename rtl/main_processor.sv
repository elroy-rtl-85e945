// main_processor: elRoy's multi-cycle control processor.
//
// It fetches 32-bit instructions {opcode, dest, src1, src2, data} from memory,
// executes the register/ALU, memory, branch, stack and cell instructions, and
// is the only master of the systolic array: it writes the cell instruction
// register (CINST, CDELINT), drives the cell data lines (CDATA, each write is
// one array step), sets the accumulate fed into the first cell (ACCOUT) and
// reads the array's result (ACCIN, low 16 bits of cell 0's accumulator).
//
// Parts: control_fsm (3-cycle fetch/decode/execute), arb_in (instruction and
// data registers), regfile (R0-R7), alu (with flags), pc_unit, stack,
// arb_out (output registers, memory write bus) and cdata_select.
//
// Operand rules: source code 4'hD (EXTDATA) selects the data value; 4'h8
// (ACCIN) selects the array result; otherwise R0-R7. DA = source 1 (or the
// data register for LOAD, the stack top for POP); DB = source 2. WRITE stores
// DB at the address in source 1. LOAD writes the data register (memory value,
// or the data value when source 1 is EXTDATA) to the destination. PUSH pushes
// source 1; POP writes the popped value to the destination.
//
// Timing: every instruction takes three cycles (fetch, decode, execute); the
// array-side outputs are registered and change one cycle after execute.
// From the design's description: the instruction format, register set, ALU
// operations, branch set and the special cell registers. This design's
// choices: one stack shared by JSR/RTS and PUSH/POP, the flag-update rule,
// WRITE taking its value from source 2, and no extra states for cell
// operations.
module main_processor
  import elroy_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 16
) (
  input  logic              clk_i,
  input  logic              rst_i,
  // memory
  output logic [15:0]       mem_addr_o,
  output logic              mem_rd_o,
  input  logic [MEM_W-1:0]  mem_rdata_i,
  output logic              mem_we_o,
  output logic [MEM_W-1:0]  mem_wdata_o,
  // cell array
  output logic [15:0]       cinst_o,
  output logic              cinst_we_o,
  output logic [DATA_W-1:0] cdata_o,
  output logic              cdata_we_o,
  output logic [DATA_W-1:0] accout_o,
  input  logic [DATA_W-1:0] accin_i,
  // status
  output logic [15:0]       pc_o
);

  inst_hi_t          ir;
  logic [DATA_W-1:0] ir_raw, dr;
  logic fetch, decode, exec, rd_inst, rd_data, addr_sel_reg, alu_done, stack_op;
  logic w_enable, mem_we_req, push_data, pop_data, in_sel, in_val_stack;

  assign ir = inst_hi_t'(ir_raw);

  control_fsm u_fsm (
    .clk_i          (clk_i),
    .rst_i          (rst_i),
    .inst_i         (ir),
    .fetch_o        (fetch),
    .decode_o       (decode),
    .exec_o         (exec),
    .rd_inst_o      (rd_inst),
    .rd_data_o      (rd_data),
    .addr_sel_reg_o (addr_sel_reg),
    .alu_done_o     (alu_done),
    .stack_op_o     (stack_op),
    .w_enable_o     (w_enable),
    .mem_we_o       (mem_we_req),
    .push_data_o    (push_data),
    .pop_data_o     (pop_data),
    .in_sel_o       (in_sel),
    .in_val_stack_o (in_val_stack)
  );

  arb_in u_arb_in (
    .clk_i     (clk_i),
    .rst_i     (rst_i),
    .rd_inst_i (rd_inst),
    .rd_data_i (rd_data),
    .mem_bus_i (mem_rdata_i),
    .inst_o    (ir_raw),
    .data_o    (dr)
  );

  logic [DATA_W-1:0] dba, dbb, alu_out, in_val, da, db, stack_top;
  logic              rf_we;
  logic              f_zero, f_nzero, f_pos, f_neg;

  regfile u_regfile (
    .clk_i      (clk_i),
    .rst_i      (rst_i),
    .dba_addr_i (ir.src1[2:0]),
    .dbb_addr_i (ir.src2[2:0]),
    .w_addr_i   (ir.dest[2:0]),
    .w_data_i   (alu_out),
    .w_enable_i (rf_we && alu_done),
    .dba_o      (dba),
    .dbb_o      (dbb)
  );

  always_comb begin
    in_val = in_val_stack ? stack_top : dr;
    if (in_sel)                     da = in_val;
    else if (ir.src1 == SR_ACCIN)   da = accin_i;
    else                            da = dba;
    if (ir.src2 == SR_ACCIN)        db = accin_i;
    else if (ir.src2 == SR_EXTDATA) db = dr;
    else                            db = dbb;
  end

  alu u_alu (
    .clk_i      (clk_i),
    .rst_i      (rst_i),
    .alu_op_i   (alu_op_e'(ir.op[2:0])),
    .da_i       (da),
    .db_i       (db),
    .alu_done_i (alu_done),
    .stack_op_i (stack_op),
    .d_o        (alu_out),
    .f_zero_o   (f_zero),
    .f_nzero_o  (f_nzero),
    .f_pos_o    (f_pos),
    .f_neg_o    (f_neg)
  );

  logic push_ret, pop_ret, taken;

  pc_unit u_pc (
    .clk_i      (clk_i),
    .rst_i      (rst_i),
    .inc_i      (fetch),
    .exec_i     (exec),
    .op_i       (ir.op),
    .target_i   (dr),
    .f_zero_i   (f_zero),
    .f_pos_i    (f_pos),
    .ret_i      (stack_top),
    .pc_o       (pc_o),
    .push_ret_o (push_ret),
    .pop_ret_o  (pop_ret),
    .taken_o    (taken)
  );

  logic stack_empty, stack_full;

  stack #(.DEPTH(STACK_DEPTH)) u_stack (
    .clk_i   (clk_i),
    .rst_i   (rst_i),
    .push_i  (push_ret || push_data),
    .pop_i   (pop_ret || pop_data),
    .din_i   (push_ret ? pc_o : da),
    .top_o   (stack_top),
    .empty_o (stack_empty),
    .full_o  (stack_full)
  );

  logic cinst_ext, cinst_del;

  arb_out u_arb_out (
    .clk_i       (clk_i),
    .rst_i       (rst_i),
    .wr_i        (w_enable),
    .dest_i      (ir.dest),
    .result_i    (alu_out),
    .mem_we_i    (mem_we_req),
    .mem_data_i  (db),
    .rf_we_o     (rf_we),
    .cinst_ext_o (cinst_ext),
    .cinst_del_o (cinst_del),
    .accout_o    (accout_o),
    .cdata_o     (cdata_o),
    .cdata_we_o  (cdata_we_o),
    .mem_we_o    (mem_we_o),
    .mem_wdata_o (mem_wdata_o)
  );

  cdata_select u_cdata_select (
    .clk_i      (clk_i),
    .rst_i      (rst_i),
    .load_ext_i (cinst_ext),
    .load_del_i (cinst_del),
    .value_i    (alu_out),
    .cell_id_i  (dba),
    .delay_i    (dbb),
    .inst_o     (cinst_o),
    .inst_we_o  (cinst_we_o)
  );

  assign mem_addr_o = addr_sel_reg ? dba : pc_o;
  assign mem_rd_o   = rd_inst || rd_data;

endmodule
