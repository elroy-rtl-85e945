// tb_cell_array: runs the two array schedules on a 6-cell array, driving the
// microcode and data strobes directly, and compares with reference sums:
//   * convolution: h packed into the cells through the RA pipe (first value
//     ends in cell 0), one addressed delay word for a zero tap, x broadcast on
//     RB, one y per step from cell 0, ACCOUT feeding the left end;
//   * matrix-vector: each column shifted into the RA pipe, vector element
//     broadcast, results drained through cell 0 in row order;
//   * 40 random convolutions: random sparse h (zero runs of 0-9, a run over 7
//     uses a zero-coefficient cell) packed with addressed delay words, random
//     x lengths, every output compared.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_cell_array;
  import elroy_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst = 1, iwe = 0, dwe = 0;
  logic [15:0] inst = '0, data = '0, accout = '0;
  logic [31:0] result;
  int checks = 0, failures = 0;

  cell_array #(.N_CELLS(N)) dut (.clk_i(clk), .rst_i(rst), .inst_we_i(iwe), .inst_i(inst),
                                 .data_we_i(dwe), .data_i(data), .accout_i(accout),
                                 .result_o(result));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic word(input logic [15:0] w);
    @(negedge clk); inst = w; iwe = 1; @(negedge clk); iwe = 0;
  endtask
  task automatic step(input logic [15:0] d);
    @(negedge clk); data = d; dwe = 1; @(negedge clk); dwe = 0;
  endtask

  initial begin
    int h[6] = '{2, 0, -3, 4, 1, 0};  // h[1] = 0 -> bubble in the cell holding h[2]
    int ra[6] = '{2, -3, 4, 1, 0, 0};
    int x[7] = '{5, -1, 3, 7, 0, -6, 2};
    int a[5][3], v[3], y;
    @(negedge clk); @(negedge clk); rst = 0;
    // ---- convolution
    word(UW_CCLEAR);
    word({1'b0, 5'd1, 6'b0, 1'b1, 3'd1});            // cell 1 (holds h[2]) waits one step
    word(UW_CLRA0);
    for (int i = 0; i < N; i++) step(16'(ra[i]));
    accout = 16'd0;
    word(UW_CLAAE);
    for (int n = 0; n < 7 + 6 - 1; n++) begin
      step(n < 7 ? 16'(x[n]) : 16'd0);
      y = 0;
      for (int j = 0; j < 6; j++) if (n - j >= 0 && n - j < 7) y += h[j] * x[n - j];
      checks++;
      if (result !== 32'(y)) begin failures++; $display("FAIL conv y[%0d] = %0d, expected %0d", n, $signed(result), y); end
    end
    // ---- ACCOUT enters at the left end and appears at cell 0 after N steps
    word(UW_CCLEAR);                                 // also resets the delay of cell 1
    word(UW_CPASS);
    accout = 16'hFFF0;  // -16
    for (int i = 0; i < N; i++) step(16'd0);
    checks++; if (result !== -32'sd16) begin failures++; $display("FAIL accout pass-through %0d", $signed(result)); end
    accout = 16'd0;
    // ---- matrix-vector 5x3 with padding of one cell
    foreach (a[i, j]) a[i][j] = int'($urandom_range(0, 20)) - 10;
    foreach (v[j]) v[j] = int'($urandom_range(0, 20)) - 10;
    word(UW_CCLEAR);
    for (int j = 0; j < 3; j++) begin
      word(UW_CLRA);
      for (int i = 0; i < 5; i++) step(16'(a[i][j]));
      step(16'd0);  // pad the sixth cell
      word(UW_CLAAI);
      step(16'(v[j]));
    end
    word(UW_CPASS);
    for (int i = 0; i < 5; i++) begin
      y = 0;
      for (int j = 0; j < 3; j++) y += a[i][j] * v[j];
      checks++;
      if (result !== 32'(y)) begin failures++; $display("FAIL mv row %0d = %0d, expected %0d", i, $signed(result), y); end
      step(16'd0);
    end
    // ---- random packed convolutions
    for (int t = 0; t < 40; t++) begin
      int hh[$], rr[$], dd[$], xx[$], gap, lh, lx, yy;
      // build h from (gap, coefficient) pairs until the cells are used up
      hh.delete(); rr.delete(); dd.delete(); xx.delete();
      while (1) begin
        gap = (t % 5 == 0) ? $urandom_range(0, 9) : $urandom_range(0, 3);
        if (rr.size() + (gap > 7 ? 2 : 1) > N) break;
        if (gap > 7) begin rr.push_back(0); dd.push_back(7); end
        rr.push_back(int'($urandom_range(1, 19)) - 10);
        dd.push_back(gap > 7 ? gap - 8 : gap);
        repeat (gap) hh.push_back(0);
        hh.push_back(rr[$]);
        if ($urandom_range(0, 2) == 0) break;
      end
      while (rr.size() < N) begin rr.push_back(0); dd.push_back(0); end
      lh = hh.size(); lx = $urandom_range(1, 10);
      repeat (lx) xx.push_back(int'($urandom_range(0, 200)) - 100);
      word(UW_CCLEAR);
      for (int i = 0; i < N; i++) if (dd[i] != 0) word({1'b0, 5'(i), 6'b0, 1'b1, 3'(dd[i])});
      word(UW_CLRA0);
      for (int i = 0; i < N; i++) step(16'(rr[i]));
      word(UW_CLAAE);
      for (int n = 0; n < lx + lh - 1; n++) begin
        step(n < lx ? 16'(xx[n]) : 16'd0);
        yy = 0;
        for (int j = 0; j < lh; j++) if (n - j >= 0 && n - j < lx) yy += hh[j] * xx[n - j];
        checks++;
        if (result !== 32'(yy)) begin
          failures++; $display("FAIL random conv %0d y[%0d] = %0d, expected %0d", t, n, $signed(result), yy);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
