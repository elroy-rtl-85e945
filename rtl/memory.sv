// memory: elRoy's unified program and data memory.
//
// Storage is 2**(ADDR_W-1) words of 16 bits; addresses are byte addresses and
// only even addresses exist (bit 0 is ignored). The processor side has a
// 32-bit read path and a 32-bit write path:
//   * read:  rdata_o = {word[a], word[a+2]}, combinational while rd_i is high
//            (zero otherwise). An instruction at a multiple of four is the
//            32-bit word formed by its two halves; a 16-bit data value is the
//            upper half.
//   * write: on the rising edge with we_i high, word[a] <= wdata_i[31:16].
// A second 16-bit host port (host_*) lets an external controller load
// programs and data and read results; its write wins if both write the same
// cycle.
//
// The two uni-directional 32-bit paths and even-only addressing follow the
// design's memory description. The size, the placement of a 16-bit value in
// the upper half and the host port are this design's choices.
module memory
  import elroy_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk_i,
  input  logic [ADDR_W-1:0] addr_i,
  input  logic              rd_i,
  output logic [MEM_W-1:0]  rdata_o,
  input  logic              we_i,
  input  logic [MEM_W-1:0]  wdata_i,
  input  logic              host_we_i,
  input  logic [ADDR_W-1:0] host_addr_i,
  input  logic [DATA_W-1:0] host_wdata_i,
  output logic [DATA_W-1:0] host_rdata_o
);

  localparam int unsigned WORDS = 2 ** (ADDR_W - 1);

  logic [DATA_W-1:0] mem_q [WORDS];
  logic [ADDR_W-2:0] w0, w1, hw;

  always_comb begin
    w0      = addr_i[ADDR_W-1:1];
    w1      = w0 + 1'b1;
    hw      = host_addr_i[ADDR_W-1:1];
    rdata_o = rd_i ? {mem_q[w0], mem_q[w1]} : '0;
    host_rdata_o = mem_q[hw];
  end

  always_ff @(posedge clk_i) begin
    if (host_we_i)  mem_q[hw] <= host_wdata_i;
    else if (we_i)  mem_q[w0] <= wdata_i[31:16];
  end

endmodule
