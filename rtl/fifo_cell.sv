// fifo_cell: one stage of a cell's FIFO delay queue.
//
// A 2:1 multiplexer picks either the externally loaded word (load_ext = 1,
// value on load_i) or the word of the stage above it (fifo_i); a 32-bit
// register with clock enable takes the choice. This is the stage structure
// of the FIFO cell schematic (MUX_32BIT_2TO1 "MEMORY_SOURCE" feeding a
// REGISTER32 with ENABLE/CLOCK/RESET).
//
// Timing: the register updates on the rising clock edge when enable_i is
// high. rst_i is a synchronous, active-high clear (its polarity and
// synchronous behaviour are this design's choice).
module fifo_cell #(
  parameter int unsigned W = 32
) (
  input  logic         clk_i,
  input  logic         rst_i,
  input  logic         enable_i,
  input  logic         load_ext_i,
  input  logic [W-1:0] load_i,
  input  logic [W-1:0] fifo_i,
  output logic [W-1:0] fifo_o
);

  logic [W-1:0] source;

  always_comb source = load_ext_i ? load_i : fifo_i;

  always_ff @(posedge clk_i) begin
    if (rst_i)         fifo_o <= '0;
    else if (enable_i) fifo_o <= source;
  end

endmodule
