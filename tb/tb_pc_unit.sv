// tb_pc_unit: checks PC reset to 0, +4 per fetch, JMP and JSR always taken,
// JE only with the zero flag, JA only with the positive flag, RTS loading the
// stack top, the push/pop requests for JSR/RTS, and no change for other
// opcodes.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_pc_unit;
  import elroy_pkg::*;
  logic clk = 0, rst = 1, inc = 0, ex = 0, fz = 0, fp = 0;
  opcode_e op = OP_OR;
  logic [15:0] tgt = '0, ret = '0, pc, e_pc;
  logic push_r, pop_r, taken;
  int checks = 0, failures = 0;

  pc_unit dut (.clk_i(clk), .rst_i(rst), .inc_i(inc), .exec_i(ex), .op_i(op), .target_i(tgt),
               .f_zero_i(fz), .f_pos_i(fp), .ret_i(ret), .pc_o(pc), .push_ret_o(push_r),
               .pop_ret_o(pop_r), .taken_o(taken));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e_taken;
    @(negedge clk); @(negedge clk); rst = 0;
    checks++; if (pc !== 16'h0) begin failures++; $display("FAIL reset PC"); end
    e_pc = '0;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      inc = (i % 3 == 0); ex = (i % 3 == 2);
      op = opcode_e'($urandom_range(0, 15)); tgt = 16'($urandom) & 16'hFFFC;
      ret = 16'($urandom) & 16'hFFFC; fz = $urandom_range(0, 1); fp = $urandom_range(0, 1);
      e_taken = ex && (op == OP_JMP || op == OP_JSR || (op == OP_JE && fz) || (op == OP_JA && fp));
      #1;
      checks += 3;
      if (taken !== e_taken) begin failures++; $display("FAIL taken op %s", op.name()); end
      if (push_r !== (ex && op == OP_JSR)) begin failures++; $display("FAIL push request"); end
      if (pop_r !== (ex && op == OP_RTS)) begin failures++; $display("FAIL pop request"); end
      if (inc) e_pc = e_pc + 16'd4;
      else if (e_taken) e_pc = tgt;
      else if (ex && op == OP_RTS) e_pc = ret;
      @(posedge clk); #1;
      checks++;
      if (pc !== e_pc) begin failures++; $display("FAIL pc %h vs %h", pc, e_pc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
