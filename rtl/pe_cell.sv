// pe_cell: one processing element of the elRoy systolic array.
//
// Datapath: RA (16 bits) is the serial pipe register loaded from the left
// neighbour's RA; RB (16 bits) loads from the data lines broadcast to every
// cell; a 16x16 signed multiplier and a 32-bit adder form
//     sum = base + (acc_sum ? RA*RB : 0),
//     base = acc_ext ? acc_i (left neighbour's output) : acc_zero ? 0 : acc_o,
// and the sum enters the FIFO delay queue, whose last stage is the cell's
// accumulator and its output acc_o to the right neighbour. The microcode word
// held by cell_decode selects all of this, so one cell structure serves the
// convolution (accumulate from the left, delay bubbles), the matrix products
// (accumulate internally) and result draining (pass from the left).
//
// Timing: every data strobe (data_we_i) is one step of the array; RA, RB and
// the queue update on that clock edge. The multiplier sees the operand values
// being loaded in the same step, so after a strobe that broadcasts x[k] the
// accumulator already contains the product with x[k]. A microcode word
// accepted by this cell (hit) acts at once on: the delay (delay-load bit),
// RB (RB-zero bit) and the whole queue (accumulate-zero bit clears it).
//
// From the design's description: RA/RB roles, serial versus broadcast load,
// the three accumulate choices, the FIFO queue of up to 7 stalls, 32-bit
// accumulate path, behavioural multiplier and adder. This design's choices:
// which actions happen on word acceptance versus on a strobe, the operand
// timing of the multiplier, signed arithmetic wrapping at 32 bits.
module pe_cell
  import elroy_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_i,
  input  logic [4:0]        my_addr_i,
  // microcode broadcast
  input  logic              inst_we_i,
  input  logic [15:0]       inst_i,
  // data lines and strobe
  input  logic              data_we_i,
  input  logic [DATA_W-1:0] data_i,
  // serial RA pipe
  input  logic [DATA_W-1:0] ra_i,
  output logic [DATA_W-1:0] ra_o,
  // moving accumulate chain
  input  logic [ACC_W-1:0]  acc_i,
  output logic [ACC_W-1:0]  acc_o
);

  cell_uword_t inst_w, u;
  logic        hit;

  assign inst_w = cell_uword_t'(inst_i);

  cell_decode u_decode (
    .clk_i     (clk_i),
    .rst_i     (rst_i),
    .my_addr_i (my_addr_i),
    .inst_we_i (inst_we_i),
    .inst_i    (inst_w),
    .hit_o     (hit),
    .uword_o   (u)
  );

  logic [DATA_W-1:0] ra_q, rb_q, ra_next, rb_next;
  logic [2:0]        delay_q;
  logic [ACC_W-1:0]  base, product, sum;

  always_comb begin
    ra_next = u.ra_load ? ra_i : ra_q;
    rb_next = u.rb_load ? data_i : (u.rb_zero ? '0 : rb_q);
    base    = u.acc_ext ? acc_i : (u.acc_zero ? '0 : acc_o);
    product = ACC_W'($signed(ra_next) * $signed(rb_next));
    sum     = base + (u.acc_sum ? product : '0);
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      ra_q    <= '0;
      rb_q    <= '0;
      delay_q <= '0;
    end else begin
      if (hit && inst_w.del_load) delay_q <= inst_w.del;
      if (hit && inst_w.rb_zero)  rb_q    <= '0;
      else if (data_we_i)         rb_q    <= rb_next;
      if (data_we_i)              ra_q    <= ra_next;
    end
  end

  fifo_queue #(.W(ACC_W), .DEPTH(8)) u_fifo (
    .clk_i    (clk_i),
    .rst_i    (rst_i || (hit && inst_w.acc_zero)),
    .enable_i (data_we_i),
    .delay_i  (delay_q),
    .d_i      (sum),
    .d_o      (acc_o)
  );

  assign ra_o = ra_q;

endmodule
