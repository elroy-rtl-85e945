// cell_array: the linear, uni-directional systolic array of N_CELLS cells.
//
// Cell 0 is the output end (rightmost) and cell N_CELLS-1 the input end
// (leftmost). Each cell's address (its dip switches) is its index, so the
// first value shifted into the RA pipe ends up in cell 0 once N_CELLS values
// have been shifted. Connections:
//   * RA pipe:  data lines -> cell N-1 -> ... -> cell 0 (serial load)
//   * RB bus:   data lines broadcast to all cells
//   * results:  accout_i (sign-extended) -> cell N-1 -> ... -> cell 0 -> result_o
//   * microcode word and its strobe broadcast to all cells; each cell decodes it.
// result_o is the 32-bit accumulator of cell 0; the processor reads its low
// 16 bits as ACCIN. All cells step together on data_we_i.
//
// Up to 32 cells follow from the 5-bit cell address; the numbering and the
// direction of flow follow the design's moving-results arrangement.
module cell_array
  import elroy_pkg::*;
#(
  parameter int unsigned N_CELLS = 32
) (
  input  logic              clk_i,
  input  logic              rst_i,
  input  logic              inst_we_i,
  input  logic [15:0]       inst_i,
  input  logic              data_we_i,
  input  logic [DATA_W-1:0] data_i,
  input  logic [DATA_W-1:0] accout_i,
  output logic [ACC_W-1:0]  result_o
);

  initial begin
    assert (N_CELLS >= 1 && N_CELLS <= 32)
      else $error("cell_array: N_CELLS must be 1..32 (5-bit cell address)");
  end

  logic [DATA_W-1:0] ra_chain  [N_CELLS+1];
  logic [ACC_W-1:0]  acc_chain [N_CELLS+1];

  assign ra_chain[N_CELLS]  = data_i;
  assign acc_chain[N_CELLS] = ACC_W'($signed(accout_i));

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    pe_cell u_cell (
      .clk_i     (clk_i),
      .rst_i     (rst_i),
      .my_addr_i (5'(i)),
      .inst_we_i (inst_we_i),
      .inst_i    (inst_i),
      .data_we_i (data_we_i),
      .data_i    (data_i),
      .ra_i      (ra_chain[i+1]),
      .ra_o      (ra_chain[i]),
      .acc_i     (acc_chain[i+1]),
      .acc_o     (acc_chain[i])
    );
  end

  assign result_o = acc_chain[0];

endmodule
