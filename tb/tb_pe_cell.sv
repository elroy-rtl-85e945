// tb_pe_cell: directed test of one systolic cell. Expected values are worked
// out by hand from the microcode definitions:
//   serial RA load, internal multiply-accumulate (signed, incl. extreme
//   operands), accumulate from the left neighbour, pass-out with RB zeroed,
//   addressed versus parallel words (a word for another address is ignored),
//   a delay of 3 (the result appears 3 steps later than with delay 0) and
//   clearing of the accumulator by an accumulate-zero word.
// A second, random phase then sends random microcode words (for this cell,
// for another cell, or parallel) and random steps, and compares RA and the
// accumulator after each with a behavioural model of the cell: RA, RB, the
// delay, the held word and the 8-stage queue.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_pe_cell;
  import elroy_pkg::*;
  logic clk = 0, rst = 1, iwe = 0, dwe = 0;
  logic [15:0] inst = '0, data = '0, ra_in = '0, ra_out;
  logic [31:0] acc_in = '0, acc_out;
  int checks = 0, failures = 0;
  localparam logic [4:0] ME = 5'd6;

  pe_cell dut (.clk_i(clk), .rst_i(rst), .my_addr_i(ME), .inst_we_i(iwe), .inst_i(inst),
               .data_we_i(dwe), .data_i(data), .ra_i(ra_in), .ra_o(ra_out),
               .acc_i(acc_in), .acc_o(acc_out));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic word(input logic [15:0] w);
    @(negedge clk); inst = w; iwe = 1; @(negedge clk); iwe = 0;
  endtask
  task automatic step(input logic [15:0] d, input logic [15:0] ra, input logic [31:0] ai);
    @(negedge clk); data = d; ra_in = ra; acc_in = ai; dwe = 1; @(negedge clk); dwe = 0;
  endtask
  task automatic chk_acc(input logic [31:0] e, input string what);
    checks++;
    if (acc_out !== e) begin failures++; $display("FAIL %s: acc %0d expected %0d", what, $signed(acc_out), $signed(e)); end
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    word(UW_CCLEAR);
    chk_acc(0, "clear");
    // serial RA load
    word(UW_CLRA0);
    step(16'd0, 16'd7, 32'd0);
    checks++; if (ra_out !== 16'd7) begin failures++; $display("FAIL RA serial load"); end
    // internal accumulate: 7*3 then 7*(-2)
    word(UW_CLAAI);
    step(16'd3, 16'd99, 32'd500);       // ra_in / acc_in must be ignored
    chk_acc(21, "MAC 7*3");
    checks++; if (ra_out !== 16'd7) begin failures++; $display("FAIL RA held"); end
    step(-16'sd2, 16'd0, 32'd0);
    chk_acc(7, "MAC +7*(-2)");
    // accumulate from the left: 100 + 7*5
    word(UW_CLAAE);
    step(16'd5, 16'd0, 32'd100);
    chk_acc(135, "acc from left");
    // pass: RB zeroed by the word itself, acc = left
    word(UW_CPASS);
    checks++; if (dut.rb_q !== 16'd0) begin failures++; $display("FAIL RB zero on word"); end
    step(16'd1234, 16'd0, 32'd55);
    chk_acc(55, "pass from left");
    step(16'd1234, 16'd0, -32'sd9);
    chk_acc(-32'sd9, "pass negative");
    // word addressed to another cell is ignored
    word({1'b0, 5'd7, 10'b00_0010_1011});  // would zero acc and set delay 3
    chk_acc(-32'sd9, "other address ignored");
    // addressed delay word: delay 3 for this cell
    word({1'b0, ME, 6'b0, 1'b1, 3'd3});
    checks++; if (dut.delay_q !== 3'd3) begin failures++; $display("FAIL delay set"); end
    word(UW_CLAAE);
    step(16'd1, 16'd0, 32'd0);           // sum = 0 + 7*1 = 7 enters stage 3
    chk_acc(0, "delay: queue advances, stage 1 shown");
    step(16'd0, 16'd0, 32'd0);
    chk_acc(0, "delay bubble 1");
    step(16'd0, 16'd0, 32'd0);
    chk_acc(0, "delay bubble 2");
    step(16'd0, 16'd0, 32'd0);
    chk_acc(7, "delayed result after 3 bubbles");
    // accumulate-zero word clears the queue; delay back to 0 (parallel)
    word(UW_CCLEAR);
    chk_acc(0, "clear by word");
    checks++; if (dut.delay_q !== 3'd0) begin failures++; $display("FAIL delay cleared"); end
    // signed extremes: RA = -32768, RB = -32768 -> 2^30
    word(UW_CLRA0);
    step(16'd0, 16'h8000, 32'd0);
    word(UW_CLAAI);
    step(16'h8000, 16'd0, 32'd0);
    chk_acc(32'h4000_0000, "(-32768)^2");
    step(16'h7FFF, 16'd0, 32'd0);
    chk_acc(32'h4000_0000 - 32'd1073709056, "+(-32768*32767)");
    // random phase against a behavioural model
    begin
      cell_uword_t mu, w;
      logic [15:0] m_ra, m_rb, ra_n, rb_n, d, ri;
      logic [31:0] m_q[8], base, sum, ai;
      logic [2:0]  m_del;
      word(UW_CCLEAR);
      mu = cell_uword_t'(UW_CCLEAR); m_ra = ra_out; m_rb = '0; m_del = '0;
      foreach (m_q[k]) m_q[k] = '0;
      for (int n = 0; n < 3000; n++) begin
        if ($urandom_range(0, 3) == 0) begin
          w = cell_uword_t'(16'($urandom));
          case ($urandom_range(0, 2))
            0: begin w.par = 1'b0; w.addr = ME; end
            1: begin w.par = 1'b0; w.addr = ME ^ 5'(1 + $urandom_range(0, 30)); end
            default: w.par = 1'b1;
          endcase
          // keep the accumulate-zero / load-delay words rarer so sums build up
          if ($urandom_range(0, 3) != 0) w.acc_zero = 1'b0;
          word(w);
          if (w.par || w.addr == ME) begin
            mu = w;
            if (w.del_load) m_del = w.del;
            if (w.rb_zero)  m_rb = '0;
            if (w.acc_zero) foreach (m_q[k]) m_q[k] = '0;
          end
        end else begin
          d = 16'($urandom); ri = 16'($urandom); ai = $urandom;
          step(d, ri, ai);
          ra_n = mu.ra_load ? ri : m_ra;
          rb_n = mu.rb_load ? d : (mu.rb_zero ? '0 : m_rb);
          base = mu.acc_ext ? ai : (mu.acc_zero ? '0 : m_q[0]);
          sum  = base + (mu.acc_sum ? 32'($signed(ra_n) * $signed(rb_n)) : '0);
          for (int k = 0; k < 7; k++) m_q[k] = m_q[k + 1];
          m_q[7] = '0;
          m_q[m_del] = sum;
          m_ra = ra_n; m_rb = rb_n;
        end
        checks += 2;
        if (ra_out !== m_ra) begin failures++; $display("FAIL random RA %h vs %h", ra_out, m_ra); end
        if (acc_out !== m_q[0]) begin failures++; $display("FAIL random acc %h vs %h", acc_out, m_q[0]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
