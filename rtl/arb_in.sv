// arb_in: input side of the processor's memory bus.
//
// Two 16-bit registers take words from the 32-bit memory read bus:
//   * the instruction register loads bits 31:16 when rd_inst_i is high;
//   * the data register loads bits 15:0 when rd_inst_i and rd_data_i are both
//     high (an instruction fetch: the instruction's data value), and bits
//     31:16 when only rd_data_i is high (a 16-bit data load, which memory
//     returns in the upper half).
// Both load on the rising clock edge; reset clears them. The structure (two
// REGISTER16s and a 2:1 select driven by RD_INST AND RD_DATA) follows the
// ARB_IN schematic.
module arb_in
  import elroy_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_i,
  input  logic              rd_inst_i,
  input  logic              rd_data_i,
  input  logic [MEM_W-1:0]  mem_bus_i,
  output logic [DATA_W-1:0] inst_o,
  output logic [DATA_W-1:0] data_o
);

  logic [DATA_W-1:0] data_src;

  always_comb data_src = (rd_inst_i && rd_data_i) ? mem_bus_i[15:0] : mem_bus_i[31:16];

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      inst_o <= '0;
      data_o <= '0;
    end else begin
      if (rd_inst_i) inst_o <= mem_bus_i[31:16];
      if (rd_data_i) data_o <= data_src;
    end
  end

endmodule
