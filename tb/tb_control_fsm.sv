// tb_control_fsm: checks the three-state sequence (fetch, decode, execute,
// repeating, one instruction every 3 cycles) and the control outputs decoded
// for each opcode: memory reads in fetch and for LOAD from memory in decode,
// ALU done / write-back / memory write / stack strobes in execute only.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_control_fsm;
  import elroy_pkg::*;
  logic clk = 0, rst = 1;
  inst_hi_t inst = '0;
  logic fe, de, ex, ri, rd, asel, adone, sop, wen, mwe, pshd, popd, isel, istk;
  int checks = 0, failures = 0;

  control_fsm dut (.clk_i(clk), .rst_i(rst), .inst_i(inst), .fetch_o(fe), .decode_o(de),
                   .exec_o(ex), .rd_inst_o(ri), .rd_data_o(rd), .addr_sel_reg_o(asel),
                   .alu_done_o(adone), .stack_op_o(sop), .w_enable_o(wen), .mem_we_o(mwe),
                   .push_data_o(pshd), .pop_data_o(popd), .in_sel_o(isel), .in_val_stack_o(istk));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit is_alu, is_load, lmem;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      inst.op = opcode_e'($urandom_range(0, 15));
      inst.dest = 4'($urandom); inst.src1 = 4'($urandom); inst.src2 = 4'($urandom);
      if ($urandom_range(0, 2) == 0) inst.src1 = SR_EXTDATA;
      is_alu  = inst.op inside {OP_OR, OP_XOR, OP_ADD, OP_SUB, OP_AND, OP_COPY};
      is_load = inst.op == OP_LOAD;
      lmem    = is_load && inst.src1 != SR_EXTDATA && inst.dest != SR_CDELINT;
      for (int s = 0; s < 3; s++) begin
        #1;
        chk(fe == (s == 0) && de == (s == 1) && ex == (s == 2), $sformatf("state %0d", s));
        chk(ri == (s == 0), "rd_inst in fetch");
        chk(rd == (s == 0 || (s == 1 && lmem)), "rd_data");
        chk(asel == (s != 0), "address select");
        chk(adone == (s == 2 && (is_alu || is_load || inst.op == OP_POP || inst.op == OP_CMP)), "alu_done");
        chk(wen == (s == 2 && (is_alu || is_load || inst.op == OP_POP)), "write-back");
        chk(mwe == (s == 2 && inst.op == OP_WRITE), "memory write");
        chk(pshd == (s == 2 && inst.op == OP_PUSH) && popd == (s == 2 && inst.op == OP_POP), "stack strobes");
        chk(isel == (is_load || inst.op == OP_POP || inst.src1 == SR_EXTDATA), "DA source");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
