// cell_decode: a cell's instruction recogniser and microcode register.
//
// The control processor broadcasts 16-bit cell microcode words with a one-cycle
// strobe (inst_we_i). A cell accepts a word when its parallel-load bit is set
// or when its 5-bit address field equals the cell's own address (my_addr_i,
// the dip-switch setting). An accepted word is stored in the cell's microcode
// register (uword_o) and hit_o pulses in the same cycle so the cell can apply
// the word's immediate actions (delay load, zeroing).
//
// The address/parallel-load scheme and the word format come from the design's
// microcode definition. Keeping a per-cell copy of the word (so addressed
// words change only the addressed cell) is this design's choice. The register
// resets to all zeros: no loads, no sum, accumulator held.
module cell_decode
  import elroy_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_i,
  input  logic [4:0]  my_addr_i,
  input  logic        inst_we_i,
  input  cell_uword_t inst_i,
  output logic        hit_o,
  output cell_uword_t uword_o
);

  always_comb hit_o = inst_we_i && (inst_i.par || (inst_i.addr == my_addr_i));

  always_ff @(posedge clk_i) begin
    if (rst_i)      uword_o <= '0;
    else if (hit_o) uword_o <= inst_i;
  end

endmodule
