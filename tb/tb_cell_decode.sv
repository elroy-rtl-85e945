// tb_cell_decode: checks that a cell accepts a microcode word when its
// parallel bit is set or its address field matches the cell's address, holds
// the last accepted word otherwise, and resets to the all-zero word.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_cell_decode;
  import elroy_pkg::*;
  logic clk = 0, rst = 1, we = 0;
  logic [4:0] my_addr = 5'd9;
  cell_uword_t w = '0, u, ref_u;
  logic hit;
  int checks = 0, failures = 0;

  cell_decode dut (.clk_i(clk), .rst_i(rst), .my_addr_i(my_addr), .inst_we_i(we),
                   .inst_i(w), .hit_o(hit), .uword_o(u));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_u = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    checks++; if (u !== '0) begin failures++; $display("FAIL reset word"); end
    for (int i = 0; i < 400; i++) begin
      bit exp_hit;
      @(negedge clk);
      we = $urandom_range(0, 1);
      w  = cell_uword_t'(16'($urandom));
      if ($urandom_range(0, 2) == 0) w.addr = my_addr;
      if ($urandom_range(0, 3) != 0) w.par = 1'b0;
      exp_hit = we && (w.par || w.addr == my_addr);
      #1;
      checks++; if (hit !== exp_hit) begin failures++; $display("FAIL hit %0d", i); end
      if (exp_hit) ref_u = w;
      @(posedge clk); #1;
      checks++; if (u !== ref_u) begin failures++; $display("FAIL word %0d: %h vs %h", i, u, ref_u); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
