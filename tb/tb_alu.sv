// tb_alu: random operands through every ALU operation, compared with the
// instruction set's definitions (SUB = DB - DA; COPY/stack pass DA), and the
// registered flags (zero, non-zero, positive, negative) checked after each
// operation; a stack operation must leave the flags unchanged.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_alu;
  import elroy_pkg::*;
  logic clk = 0, rst = 1, done = 0, stk = 0;
  alu_op_e op = ALU_OR;
  logic [15:0] da = '0, db = '0, d;
  logic fz, fnz, fp, fn;
  int checks = 0, failures = 0;

  alu dut (.clk_i(clk), .rst_i(rst), .alu_op_i(op), .da_i(da), .db_i(db), .alu_done_i(done),
           .stack_op_i(stk), .d_o(d), .f_zero_o(fz), .f_nzero_o(fnz), .f_pos_o(fp), .f_neg_o(fn));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] e;
    logic [3:0] flags, exp_flags;
    @(negedge clk); @(negedge clk); rst = 0;
    exp_flags = 4'b0000;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      op = alu_op_e'($urandom_range(0, 7));
      da = (i % 9 == 0) ? db : 16'($urandom);
      if (i % 13 == 0) da = '0;
      stk = (op == ALU_PSH || op == ALU_POP) && ($urandom_range(0, 1) == 1);
      done = 1'b1;
      case (op)
        ALU_OR:  e = da | db;
        ALU_XOR: e = da ^ db;
        ALU_ADD: e = 16'(int'(da) + int'(db));
        ALU_SUB: e = 16'(int'(db) - int'(da));
        ALU_AND: e = da & db;
        default: e = da;
      endcase
      #1;
      checks++;
      if (d !== e) begin failures++; $display("FAIL op %s da=%h db=%h: %h vs %h", op.name(), da, db, d, e); end
      if (!stk) exp_flags = {e == 0, e != 0, $signed(e) > 0, $signed(e) < 0};
      @(posedge clk); #1;
      flags = {fz, fnz, fp, fn};
      checks++;
      if (flags !== exp_flags) begin failures++; $display("FAIL flags %b vs %b", flags, exp_flags); end
      @(negedge clk); done = 0; db = 16'($urandom);
      @(posedge clk); #1;
      checks++;
      if ({fz, fnz, fp, fn} !== exp_flags) begin failures++; $display("FAIL flags changed without alu_done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
