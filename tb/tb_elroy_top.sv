// tb_elroy_top: end-to-end test of the elRoy system at its default size
// (32 cells, 64 KiB memory).
//
// The testbench writes programs and data into memory through the host port,
// releases reset, waits for the program to reach its final self-jump and
// compares the results in memory with values it computes itself:
//   1. convolution of a 12-sample x with a 20-tap h that contains zero runs of
//      1, 2 and 9 samples: the non-zero taps are packed into cells with FIFO
//      delays (a run of more than 7 zeros uses a zero-coefficient cell), the
//      x samples are broadcast and one result leaves the array per step;
//   2. matrix-vector product, 32x5 matrix (fills every cell, no padding);
//   3. matrix-matrix product, 4x9 times 9x4, using a JSR subroutine, PUSH/POP
//      and padding of the unused cells; results are stored transposed.
// It also checks that the convolution inner loop (6 instructions) takes 18
// clock cycles per multiply-accumulate step, and counts every mechanism the
// design has (delay bubbles, zero cell, parallel and addressed microcode
// words, the three accumulate modes, stack use, taken/untaken branches),
// failing for any that never occurs.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_elroy_top;
  import elroy_pkg::*;
  import elroy_asm_pkg::*;

  localparam int NC = 32;  // must match the top's default N_CELLS

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        host_we = 1'b0;
  logic [15:0] host_addr = '0;
  logic [15:0] host_wdata = '0;
  logic [15:0] host_rdata;
  logic [15:0] pc;

  elroy_top dut (
    .clk_i        (clk),
    .rst_i        (rst),
    .host_we_i    (host_we),
    .host_addr_i  (host_addr),
    .host_wdata_i (host_wdata),
    .host_rdata_o (host_rdata),
    .pc_o         (pc)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------------- memory
  task automatic poke(input int addr, input logic [15:0] v);
    @(negedge clk);
    host_we = 1'b1; host_addr = 16'(addr); host_wdata = v;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  function automatic logic [15:0] peek(input int addr);
    return dut.u_mem.mem_q[addr >> 1];
  endfunction

  logic [31:0] prog [$];
  function automatic int here();
    return prog.size() * 4;
  endfunction
  function automatic void emit(input logic [31:0] w);
    prog.push_back(w);
  endfunction
  function automatic void patch(input int idx, input int target);
    prog[idx][15:0] = 16'(target);
  endfunction

  task automatic load_prog();
    foreach (prog[i]) begin
      poke(4 * i,     prog[i][31:16]);
      poke(4 * i + 2, prog[i][15:0]);
    end
  endtask

  int strobe_gap_max, strobe_gap_min;
  int stillx_pc = -1;
  longint last_strobe = 0;

  // run the loaded program until it reaches its final jump to itself
  task automatic run(input string name, output longint cycles);
    longint t0;
    @(negedge clk); rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    t0 = cycle;
    // finished when a JMP to its own address executes
    do @(negedge clk);
    while (!(dut.u_cpu.exec && dut.u_cpu.ir.op == OP_JMP && dut.u_cpu.dr == pc - 16'd4));
    cycles = cycle - t0;
    $display("%s finished after %0d cycles", name, cycles);
    @(negedge clk); rst = 1'b1;
  endtask

  // ------------------------------------------------------- mechanism counts
  int n_delay_steps, n_zero_cell, n_par_words, n_addr_words, n_acc_ext,
      n_acc_int, n_pass, n_push, n_pop, n_jsr, n_rts, n_taken, n_untaken,
      n_accout, n_ra_shift;

  always @(posedge clk) if (!rst) begin
    if (dut.u_cpu.cinst_we_o) begin
      if (dut.u_cpu.cinst_o[15]) n_par_words++; else n_addr_words++;
    end
    if (dut.u_cpu.cdata_we_o) begin
      cell_uword_t u0;
      u0 = dut.u_array.g_cell[0].u_cell.u;
      if (u0.ra_load) n_ra_shift++;
      if (u0.acc_ext && u0.acc_sum && u0.rb_load) n_acc_ext++;
      if (!u0.acc_ext && u0.acc_sum && u0.rb_load) n_acc_int++;
      if (u0.acc_ext && u0.rb_zero && !u0.rb_load) n_pass++;
      if (dut.u_array.g_cell[1].u_cell.delay_q != 0 && u0.rb_load) n_delay_steps++;
      if (int'(dut.u_cpu.pc_o) == stillx_pc) begin
        if (last_strobe != 0) begin
          if (int'(cycle - last_strobe) > strobe_gap_max) strobe_gap_max = int'(cycle - last_strobe);
          if (int'(cycle - last_strobe) < strobe_gap_min) strobe_gap_min = int'(cycle - last_strobe);
        end
        last_strobe = cycle;
      end
    end
    if (dut.u_cpu.push_data) n_push++;
    if (dut.u_cpu.pop_data)  n_pop++;
    if (dut.u_cpu.push_ret)  n_jsr++;
    if (dut.u_cpu.pop_ret)   n_rts++;
    if (dut.u_cpu.exec && dut.u_cpu.ir.op inside {OP_JE, OP_JA}) begin
      if (dut.u_cpu.taken) n_taken++; else n_untaken++;
    end
    if (dut.u_cpu.w_enable && dut.u_cpu.ir.dest == SR_ACCOUT) n_accout++;
  end

  // ---------------------------------------------------------- convolution
  localparam int XADR = 16'h2000, HADR = 16'h2100, RAV = 16'h2200, DLV = 16'h2300,
                 YADR = 16'h2400;

  task automatic test_convolution();
    int lx, lh, ncell, k, prev, gap, idx_jx, idx_jh, lbl, y_ref, acc;
    int x[], h[], ra[$], dl[$];
    longint cyc;
    lx = 12; lh = 20;
    x = new[lx]; h = new[lh];
    foreach (x[i]) x[i] = int'($urandom_range(0, 40)) - 20;
    foreach (h[i]) h[i] = 0;
    h[0] = 3; h[2] = -2; h[3] = 5; h[6] = 7; h[7] = 1; h[17] = -4; h[19] = 6;
    // pack the non-zero taps: cell delay = zeros skipped before the tap
    prev = -1;
    for (k = 0; k < lh; k++) if (h[k] != 0) begin
      gap = k - prev - 1;
      while (gap > 7) begin ra.push_back(0); dl.push_back(7); gap -= 8; n_zero_cell++; end
      ra.push_back(h[k]); dl.push_back(gap);
      prev = k;
    end
    ncell = ra.size();
    check(ncell <= NC, "convolution taps fit in the array");
    while (ra.size() < NC) begin ra.push_back(0); dl.push_back(0); end
    for (int i = 0; i < NC; i++) begin
      poke(RAV + 2 * i, 16'(ra[i]));
      poke(DLV + 2 * i, 16'(dl[i]));
    end
    poke(XADR, 16'(lx));
    foreach (x[i]) poke(XADR + 2 + 2 * i, 16'(x[i]));
    poke(HADR, 16'(lh));

    prog.delete();
    emit(cinst(UW_CCLEAR));
    emit(copyd(R2, 0));
    emit(copyd(R5, 16'(DLV)));
    lbl = here();                              // SETLOOP
    emit(load(R3, R5));
    emit(csetdeli(R2, R3));
    emit(alud(OP_ADD, R5, R5, 2));
    emit(alud(OP_ADD, R2, R2, 1));
    emit(cmpd(R2, 16'(NC)));
    idx_jx = prog.size(); emit(jmp(OP_JE, 0));
    emit(jmp(OP_JMP, 16'(lbl)));
    patch(idx_jx, here());                     // DORAS
    emit(cinst(UW_CLRA0));
    emit(copyd(R2, 0));
    emit(copyd(R5, 16'(RAV)));
    lbl = here();                              // RALOOP
    emit(load(SR_CDATA, R5));
    emit(alud(OP_ADD, R5, R5, 2));
    emit(alud(OP_ADD, R2, R2, 1));
    emit(cmpd(R2, 16'(NC)));
    idx_jx = prog.size(); emit(jmp(OP_JE, 0));
    emit(jmp(OP_JMP, 16'(lbl)));
    patch(idx_jx, here());                     // DOCONV
    emit(copyd(R3, 16'(YADR)));
    emit(copyd(R2, 16'(XADR)));
    emit(copyd(R1, 16'(HADR)));
    emit(load(R0, R2));
    emit(alud(OP_ADD, R2, R2, 2));
    emit(load(R1, R1));
    emit(alud(OP_SUB, R1, R1, 1));
    emit(copyd(SR_ACCOUT, 0));
    emit(alur(OP_ADD, R7, R1, R0));
    emit(write(R3, R7));
    emit(alud(OP_ADD, R3, R3, 2));
    emit(cinst(UW_CLAAE));
    lbl = here();                              // STILLX: 6 instructions
    emit(load(SR_CDATA, R2));
    emit(write(R3, SR_ACCIN));
    emit(alud(OP_ADD, R3, R3, 2));
    emit(alud(OP_ADD, R2, R2, 2));
    emit(alud(OP_SUB, R0, R0, 1));
    emit(jmp(OP_JA, 16'(lbl)));
    lbl = here();                              // STILLH
    emit(loadd(SR_CDATA, 0));
    emit(write(R3, SR_ACCIN));
    emit(alud(OP_ADD, R3, R3, 2));
    emit(alud(OP_SUB, R1, R1, 1));
    emit(jmp(OP_JA, 16'(lbl)));
    emit(jmp(OP_JMP, 16'(here())));            // DONE
    load_prog();

    strobe_gap_max = 0; strobe_gap_min = 1 << 30; last_strobe = 0;
    stillx_pc = lbl - 24 + 4;   // PC while the first STILLX instruction executes
    run("convolution", cyc);
    stillx_pc = -1;

    check(peek(YADR) == 16'(lx + lh - 1), "convolution output length");
    for (int n = 0; n < lx + lh - 1; n++) begin
      acc = 0;
      for (int j = 0; j < lh; j++) if (n - j >= 0 && n - j < lx) acc += h[j] * x[n - j];
      y_ref = acc;
      check(peek(YADR + 2 + 2 * n) == 16'(y_ref),
            $sformatf("y[%0d] = %0d, expected %0d", n, $signed(peek(YADR + 2 + 2 * n)), y_ref));
    end
    check(strobe_gap_min == 18 && strobe_gap_max == 18,
          $sformatf("convolution step takes %0d..%0d cycles, expected 18", strobe_gap_min, strobe_gap_max));
  endtask

  // ------------------------------------------------------- matrix products
  localparam int AADR = 16'h3000, BADR = 16'h3800, CADR = 16'h3C00;

  // emit the matrix-vector subroutine for an M x N matrix at AADR:
  // R1 = vector pointer (advanced by N), R3 = output pointer (advanced by M)
  function automatic int emit_mv(input int m, input int n);
    int entry, col, addl, pad, pass;
    entry = here();
    emit(cinst(UW_CCLEAR));
    emit(copyd(R5, 16'(AADR)));
    emit(copyd(R6, 16'(n)));
    emit(copyd(R4, 16'(2 * n)));
    col = here();
    emit(cinst(UW_CLRA));
    emit(copyr(R0, R5));
    emit(copyd(R7, 16'(m)));
    addl = here();
    emit(load(SR_CDATA, R0));
    emit(alur(OP_ADD, R0, R0, R4));
    emit(alud(OP_SUB, R7, R7, 1));
    emit(jmp(OP_JA, 16'(addl)));
    emit(copyd(R7, 16'(NC)));
    emit(copyd(R0, 16'(m)));
    emit(alur(OP_SUB, R7, R0, R7));            // R7 = cells - rows
    pad = here();
    emit(jmp(OP_JE, 16'(here() + 16)));        // perfect fit: skip padding
    emit(loadd(SR_CDATA, 0));
    emit(alud(OP_SUB, R7, R7, 1));
    emit(jmp(OP_JMP, 16'(pad)));
    emit(cinst(UW_CLAAI));
    emit(load(SR_CDATA, R1));
    emit(alud(OP_ADD, R1, R1, 2));
    emit(alud(OP_ADD, R5, R5, 2));
    emit(alud(OP_SUB, R6, R6, 1));
    emit(jmp(OP_JA, 16'(col)));
    emit(cinst(UW_CPASS));
    emit(copyd(R7, 16'(m)));
    pass = here();
    emit(write(R3, SR_ACCIN));
    emit(alud(OP_ADD, R3, R3, 2));
    emit(loadd(SR_CDATA, 0));
    emit(alud(OP_SUB, R7, R7, 1));
    emit(jmp(OP_JA, 16'(pass)));
    emit(rts());
    return entry;
  endfunction

  task automatic test_matrix(input int m, input int n, input int p, input string name);
    int a[][], b[][], idx_call, idx_main, mv, lbl, acc;
    longint cyc;
    a = new[m]; foreach (a[i]) a[i] = new[n];
    b = new[n]; foreach (b[i]) b[i] = new[p];
    foreach (a[i, j]) begin a[i][j] = int'($urandom_range(0, 60)) - 30; poke(AADR + 2 * (i * n + j), 16'(a[i][j])); end
    // B is stored column by column: each column is one vector
    foreach (b[i, j]) begin b[i][j] = int'($urandom_range(0, 60)) - 30; poke(BADR + 2 * (j * n + i), 16'(b[i][j])); end

    prog.delete();
    idx_main = prog.size(); emit(jmp(OP_JMP, 0));
    mv = emit_mv(m, n);
    patch(idx_main, here());
    emit(copyd(R1, 16'(BADR)));
    emit(copyd(R3, 16'(CADR)));
    emit(copyd(R2, 16'(p)));
    lbl = here();
    emit(push(R2));
    emit(jmp(OP_JSR, 16'(mv)));
    emit(pop(R2));
    emit(alud(OP_SUB, R2, R2, 1));
    emit(jmp(OP_JA, 16'(lbl)));
    emit(jmp(OP_JMP, 16'(here())));
    load_prog();
    run(name, cyc);
    for (int j = 0; j < p; j++)
      for (int i = 0; i < m; i++) begin
        acc = 0;
        for (int k = 0; k < n; k++) acc += a[i][k] * b[k][j];
        check(peek(CADR + 2 * (j * m + i)) == 16'(acc),
              $sformatf("%s C[%0d][%0d] = %0d, expected %0d", name, i, j,
                        $signed(peek(CADR + 2 * (j * m + i))), acc));
      end
  endtask

  initial begin
    {n_delay_steps, n_zero_cell, n_par_words, n_addr_words, n_acc_ext, n_acc_int, n_pass,
     n_push, n_pop, n_jsr, n_rts, n_taken, n_untaken, n_accout, n_ra_shift} = '0;
    repeat (3) @(negedge clk);
    test_convolution();
    test_matrix(32, 5, 1, "matrix-vector 32x5");
    test_matrix(4, 9, 4, "matrix-matrix 4x9 x 9x4");

    check(n_delay_steps > 0, "FIFO delay bubbles used");
    check(n_zero_cell   > 0, "zero-coefficient cell for a long zero run");
    check(n_par_words   > 0, "parallel-load microcode words");
    check(n_addr_words  > 0, "addressed microcode words");
    check(n_acc_ext     > 0, "accumulate-from-left steps");
    check(n_acc_int     > 0, "internal accumulate steps");
    check(n_pass        > 0, "result pass-out steps");
    check(n_ra_shift    > 0, "serial RA loads");
    check(n_push > 0 && n_pop > 0, "PUSH and POP");
    check(n_jsr  > 0 && n_rts > 0, "JSR and RTS");
    check(n_taken > 0 && n_untaken > 0, "conditional branches both ways");
    check(n_accout > 0, "ACCOUT written");
    $display("mechanisms: delay-steps=%0d zero-cells=%0d par=%0d addr=%0d acc-ext=%0d acc-int=%0d pass=%0d ra-shift=%0d push=%0d pop=%0d jsr=%0d rts=%0d taken=%0d untaken=%0d accout=%0d",
             n_delay_steps, n_zero_cell, n_par_words, n_addr_words, n_acc_ext, n_acc_int, n_pass,
             n_ra_shift, n_push, n_pop, n_jsr, n_rts, n_taken, n_untaken, n_accout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
