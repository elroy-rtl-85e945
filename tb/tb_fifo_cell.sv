// tb_fifo_cell: checks the FIFO stage's select (external load versus the
// stage above), its clock enable and its synchronous reset against a
// reference register kept by the testbench, over random stimulus.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_fifo_cell;
  logic clk = 0, rst = 1, en = 0, lext = 0;
  logic [31:0] ld = '0, fi = '0, fo, ref_q;
  int checks = 0, failures = 0;

  fifo_cell #(.W(32)) dut (.clk_i(clk), .rst_i(rst), .enable_i(en), .load_ext_i(lext),
                           .load_i(ld), .fifo_i(fi), .fifo_o(fo));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      rst  = ($urandom_range(0, 30) == 0);
      en   = $urandom_range(0, 1);
      lext = $urandom_range(0, 1);
      ld = $urandom; fi = $urandom;
      if (rst) ref_q = '0;
      else if (en) ref_q = lext ? ld : fi;
      @(posedge clk); #1;
      checks++;
      if (fo !== ref_q) begin failures++; $display("FAIL step %0d: %h vs %h", i, fo, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
