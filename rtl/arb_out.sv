// arb_out: output side of the control processor.
//
// Routes the result of an executed instruction to its destination field:
//   R0-R7  -> register-file write enable (rf_we_o)
//   ACCOUT -> 16-bit register feeding the accumulate input of the first cell
//   CDATA  -> cell data-line register and a one-cycle strobe that steps the
//             array (codes 4'hB and 4'hE)
//   CINST / CDELINT -> load requests to the cell instruction register
// and drives the memory write bus for WRITE: the 16-bit value sits in bits
// 31:16 of the 32-bit write path, the half memory stores at the address.
// ACCOUT, the data lines and their strobe are registered, so the array acts
// one cycle after EXECUTE. The set of output registers follows the design's
// special-register list; their registering and reset to zero are this
// design's choices.
module arb_out
  import elroy_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_i,
  input  logic              wr_i,
  input  logic [3:0]        dest_i,
  input  logic [DATA_W-1:0] result_i,
  input  logic              mem_we_i,
  input  logic [DATA_W-1:0] mem_data_i,
  output logic              rf_we_o,
  output logic              cinst_ext_o,
  output logic              cinst_del_o,
  output logic [DATA_W-1:0] accout_o,
  output logic [DATA_W-1:0] cdata_o,
  output logic              cdata_we_o,
  output logic              mem_we_o,
  output logic [MEM_W-1:0]  mem_wdata_o
);

  logic to_cdata;

  always_comb begin
    rf_we_o     = wr_i && !dest_i[3];
    cinst_ext_o = wr_i && (dest_i == SR_CINST);
    cinst_del_o = wr_i && (dest_i == SR_CDELINT);
    to_cdata    = wr_i && (dest_i == SR_CDATA || dest_i == SR_CDATA2);
    mem_we_o    = mem_we_i;
    mem_wdata_o = {mem_data_i, 16'h0000};
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      accout_o   <= '0;
      cdata_o    <= '0;
      cdata_we_o <= 1'b0;
    end else begin
      cdata_we_o <= to_cdata;
      if (to_cdata) cdata_o <= result_i;
      if (wr_i && dest_i == SR_ACCOUT) accout_o <= result_i;
    end
  end

endmodule
