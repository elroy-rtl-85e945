// cdata_select: the cell instruction register and its source select.
//
// Two sources can load the 16-bit register that is broadcast to the cells:
//   * load_ext_i: the instruction's value (a complete microcode word);
//   * load_del_i: a delay-set word built from two registers, the cell address
//     from source 1 (low 5 bits) and the delay from source 2 (low 3 bits):
//     {parallel=0, address, 6'b0, delay-load=1, delay}.
// inst_we_o pulses for one cycle after each load, telling the cells a new word
// is on the bus. The two sources follow the CSETDEL/CSETDELI instructions; the
// register-built word's layout follows the microcode format; registering and
// the strobe are this design's choices.
module cdata_select
  import elroy_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_i,
  input  logic              load_ext_i,
  input  logic              load_del_i,
  input  logic [DATA_W-1:0] value_i,
  input  logic [DATA_W-1:0] cell_id_i,
  input  logic [DATA_W-1:0] delay_i,
  output logic [15:0]       inst_o,
  output logic              inst_we_o
);

  cell_uword_t del_word;

  always_comb begin
    del_word          = '0;
    del_word.addr     = cell_id_i[4:0];
    del_word.del_load = 1'b1;
    del_word.del      = delay_i[2:0];
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      inst_o    <= '0;
      inst_we_o <= 1'b0;
    end else begin
      inst_we_o <= load_ext_i || load_del_i;
      if (load_ext_i)      inst_o <= value_i;
      else if (load_del_i) inst_o <= del_word;
    end
  end

endmodule
