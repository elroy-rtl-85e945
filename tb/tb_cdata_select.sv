// tb_cdata_select: checks the cell instruction register loads a full word
// from the data value, builds {0, address, 000000, 1, delay} from the two
// register values for a delay-set, holds otherwise, and pulses its strobe for
// exactly one cycle after each load.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_cdata_select;
  logic clk = 0, rst = 1, lext = 0, ldel = 0;
  logic [15:0] val = '0, id = '0, dl = '0, inst, e_inst;
  logic iwe;
  int checks = 0, failures = 0;

  cdata_select dut (.clk_i(clk), .rst_i(rst), .load_ext_i(lext), .load_del_i(ldel),
                    .value_i(val), .cell_id_i(id), .delay_i(dl), .inst_o(inst), .inst_we_o(iwe));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e_inst = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 2))
        0: begin lext = 1; ldel = 0; end
        1: begin lext = 0; ldel = 1; end
        default: begin lext = 0; ldel = 0; end
      endcase
      val = 16'($urandom); id = 16'($urandom); dl = 16'($urandom);
      if (lext) e_inst = val;
      else if (ldel) e_inst = {1'b0, id[4:0], 6'b000000, 1'b1, dl[2:0]};
      @(posedge clk); #1;
      checks += 2;
      if (inst !== e_inst) begin failures++; $display("FAIL word %h vs %h", inst, e_inst); end
      if (iwe !== (lext || ldel)) begin failures++; $display("FAIL strobe"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
