// tb_regfile: random writes and dual reads of the 8 registers against a
// reference array; checks reset to zero and that nothing is written while
// the write enable is low.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_regfile;
  logic clk = 0, rst = 1, we = 0;
  logic [2:0] ra = '0, rb = '0, wa = '0;
  logic [15:0] wd = '0, da, db;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  regfile dut (.clk_i(clk), .rst_i(rst), .dba_addr_i(ra), .dbb_addr_i(rb), .w_addr_i(wa),
               .w_data_i(wd), .w_enable_i(we), .dba_o(da), .dbb_o(db));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); ra = 3'(i); #1;
      checks++; if (da !== 16'h0) begin failures++; $display("FAIL reset R%0d", i); end
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wa = 3'($urandom); wd = 16'($urandom);
      ra = 3'($urandom); rb = 3'($urandom);
      #1;
      checks += 2;
      if (da !== model[ra]) begin failures++; $display("FAIL DBA R%0d", ra); end
      if (db !== model[rb]) begin failures++; $display("FAIL DBB R%0d", rb); end
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
