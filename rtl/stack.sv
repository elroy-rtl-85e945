// stack: hardware LIFO of DEPTH 16-bit entries.
//
// Used for subroutine return addresses (JSR/RTS) and for PUSH/POP of register
// values. top_o shows the most recent entry combinationally; push_i writes
// din_i above it and pop_i removes it, both on the rising clock edge. A push
// when full or a pop when empty is ignored and flagged by an assertion.
// The depth, the sharing of one stack between calls and data, and the
// overflow behaviour are this design's choices.
module stack
  import elroy_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic              clk_i,
  input  logic              rst_i,
  input  logic              push_i,
  input  logic              pop_i,
  input  logic [DATA_W-1:0] din_i,
  output logic [DATA_W-1:0] top_o,
  output logic              empty_o,
  output logic              full_o
);

  logic [DATA_W-1:0]        mem_q [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] count_q;

  assign empty_o = (count_q == '0);
  assign full_o  = (count_q == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign top_o   = empty_o ? '0 : mem_q[count_q[$clog2(DEPTH)-1:0] - 1'b1];

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      count_q <= '0;
    end else if (push_i && !full_o) begin
      mem_q[count_q[$clog2(DEPTH)-1:0]] <= din_i;
      count_q <= count_q + 1'b1;
    end else if (pop_i && !empty_o) begin
      count_q <= count_q - 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk_i) disable iff (rst_i) push_i |-> !full_o);
  a_no_underflow: assert property (@(posedge clk_i) disable iff (rst_i) pop_i  |-> !empty_o);
  a_not_both:     assert property (@(posedge clk_i) disable iff (rst_i) !(push_i && pop_i));

endmodule
