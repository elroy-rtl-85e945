// tb_arb_out: random destination codes and results; checks the register-file
// enable (R0-R7 only), the CINST/CDELINT requests, that ACCOUT and the cell
// data lines are registered and a data strobe follows one cycle after a write
// to either cell-data code, and the memory write bus layout.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_arb_out;
  import elroy_pkg::*;
  logic clk = 0, rst = 1, wr = 0, mwe = 0;
  logic [3:0] dest = '0;
  logic [15:0] res = '0, mdata = '0, accout, cdata;
  logic rf_we, ci_ext, ci_del, cd_we, m_we;
  logic [31:0] m_wdata;
  int checks = 0, failures = 0;

  arb_out dut (.clk_i(clk), .rst_i(rst), .wr_i(wr), .dest_i(dest), .result_i(res),
               .mem_we_i(mwe), .mem_data_i(mdata), .rf_we_o(rf_we), .cinst_ext_o(ci_ext),
               .cinst_del_o(ci_del), .accout_o(accout), .cdata_o(cdata), .cdata_we_o(cd_we),
               .mem_we_o(m_we), .mem_wdata_o(m_wdata));
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
    logic [15:0] e_acc, e_cd;
    bit e_strobe;
    e_acc = '0; e_cd = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      wr = $urandom_range(0, 1); dest = 4'($urandom); res = 16'($urandom);
      mwe = $urandom_range(0, 1); mdata = 16'($urandom);
      #1;
      chk(rf_we == (wr && dest < 8), "rf_we");
      chk(ci_ext == (wr && dest == 4'hA), "cinst ext");
      chk(ci_del == (wr && dest == 4'hC), "cinst del");
      chk(m_we == mwe && m_wdata == {mdata, 16'h0}, "memory write bus");
      e_strobe = wr && (dest == 4'hB || dest == 4'hE);
      if (e_strobe) e_cd = res;
      if (wr && dest == 4'h9) e_acc = res;
      @(posedge clk); #1;
      chk(cd_we == e_strobe, "cell data strobe one cycle later");
      chk(cdata == e_cd, "cell data register");
      chk(accout == e_acc, "ACCOUT register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
