// tb_arb_in: checks that a fetch (RD_INST and RD_DATA) puts bits 31:16 in the
// instruction register and bits 15:0 in the data register, that a data read
// (RD_DATA alone) puts bits 31:16 in the data register and leaves the
// instruction register alone, and that nothing changes without a read.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_arb_in;
  logic clk = 0, rst = 1, ri = 0, rd = 0;
  logic [31:0] bus = '0;
  logic [15:0] inst, data, ei, ed;
  int checks = 0, failures = 0;

  arb_in dut (.clk_i(clk), .rst_i(rst), .rd_inst_i(ri), .rd_data_i(rd), .mem_bus_i(bus),
              .inst_o(inst), .data_o(data));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ei = '0; ed = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: begin ri = 1; rd = 1; end
        1: begin ri = 0; rd = 1; end
        2: begin ri = 1; rd = 0; end
        default: begin ri = 0; rd = 0; end
      endcase
      bus = $urandom;
      if (ri) ei = bus[31:16];
      if (rd) ed = (ri && rd) ? bus[15:0] : bus[31:16];
      @(posedge clk); #1;
      checks += 2;
      if (inst !== ei) begin failures++; $display("FAIL inst %h vs %h", inst, ei); end
      if (data !== ed) begin failures++; $display("FAIL data %h vs %h", data, ed); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
