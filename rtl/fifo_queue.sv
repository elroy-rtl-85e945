// fifo_queue: adjustable delay queue between a cell's adder and the next cell.
//
// DEPTH fifo_cell stages are chained from stage DEPTH-1 (whose upstream input
// is tied to zero) down to stage 0, whose register is the queue output. A
// 3-to-8 decoder, enabled by enable_i, turns the delay value into the
// load_ext select of exactly one stage: the new word d_i is written into
// stage `delay_i` while every other stage takes the word of the stage above.
// With delay 0 the queue is a single register (stage 0); with delay d a word
// reaches the output d enable pulses later than with delay 0, i.e. the queue
// inserts d bubbles (up to 7) into the moving-results pipeline.
//
// The structure (8 stages, zero-fed top stage, decoder driven by DELAY(2:0)
// and ENABLE, output taken from the last stage) follows the FIFO queue
// schematic. Reset is synchronous and active high.
module fifo_queue #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk_i,
  input  logic                     rst_i,
  input  logic                     enable_i,
  input  logic [$clog2(DEPTH)-1:0] delay_i,
  input  logic [W-1:0]             d_i,
  output logic [W-1:0]             d_o
);

  logic [W-1:0]     stage_q [DEPTH+1];  // stage_q[DEPTH] is the zero input
  logic [DEPTH-1:0] load_ext;

  assign stage_q[DEPTH] = '0;

  // 3-to-8 decoder with enable
  always_comb begin
    load_ext = '0;
    if (enable_i) load_ext[delay_i] = 1'b1;
  end

  for (genvar k = 0; k < DEPTH; k++) begin : g_stage
    fifo_cell #(.W(W)) u_stage (
      .clk_i      (clk_i),
      .rst_i      (rst_i),
      .enable_i   (enable_i),
      .load_ext_i (load_ext[k]),
      .load_i     (d_i),
      .fifo_i     (stage_q[k+1]),
      .fifo_o     (stage_q[k])
    );
  end

  assign d_o = stage_q[0];

endmodule
