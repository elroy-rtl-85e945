// tb_main_processor: runs a directed program on the control processor with
// the memory block and a constant array-result input (ACCIN). It checks the
// ALU instructions in register and data-value forms (including SUB operand
// order), WRITE and LOAD through memory, PUSH/POP, CMP followed by JE/JA in
// both taken and not-taken directions, JSR/RTS, reading ACCIN as source 1 and
// source 2, the CINST, CDELINT, CDATA and ACCOUT outputs, and that every
// instruction takes exactly three cycles.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_main_processor;
  import elroy_pkg::*;
  import elroy_asm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] mem_addr, ci_word, cdata, accout, pc, host_addr = '0, host_wdata = '0, host_rdata;
  logic        mem_rd, mem_we, ci_we, cdata_we, host_we = 1'b0;
  logic [31:0] mem_rdata, mem_wdata;
  localparam logic [15:0] ACCIN_VAL = 16'h5A5A;
  int checks = 0, failures = 0;

  main_processor dut (.clk_i(clk), .rst_i(rst), .mem_addr_o(mem_addr), .mem_rd_o(mem_rd),
    .mem_rdata_i(mem_rdata), .mem_we_o(mem_we), .mem_wdata_o(mem_wdata), .cinst_o(ci_word),
    .cinst_we_o(ci_we), .cdata_o(cdata), .cdata_we_o(cdata_we), .accout_o(accout),
    .accin_i(ACCIN_VAL), .pc_o(pc));
  memory #(.ADDR_W(12)) u_mem (.clk_i(clk), .addr_i(mem_addr[11:0]), .rd_i(mem_rd),
    .rdata_o(mem_rdata), .we_i(mem_we), .wdata_i(mem_wdata), .host_we_i(host_we),
    .host_addr_i(host_addr[11:0]), .host_wdata_i(host_wdata), .host_rdata_o(host_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(input int a, input logic [31:0] w);
    @(negedge clk); host_we = 1'b1; host_addr = 16'(a); host_wdata = w[31:16];
    @(negedge clk); host_addr = 16'(a + 2); host_wdata = w[15:0];
    @(negedge clk); host_we = 1'b0;
  endtask

  function automatic logic [15:0] peek(input int a);
    return u_mem.mem_q[a / 2];
  endfunction

  // event recorders for the array-side outputs
  logic [15:0] cinst_log[$], cdata_log[$];
  int exec_count = 0, last_exec = -1, cyc = 0, bad_spacing = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (ci_we) cinst_log.push_back(ci_word);
      if (cdata_we) cdata_log.push_back(cdata);
      if (dut.exec) begin
        exec_count <= exec_count + 1;
        if (last_exec >= 0 && cyc - last_exec != 3) bad_spacing <= bad_spacing + 1;
        last_exec <= cyc;
      end
    end
  end

  initial begin
    int a;
    logic [31:0] prog[$];
    prog = '{
      copyd(R1, 16'd5),                   //   0
      copyd(R2, 16'd7),                   //   4
      alur(OP_ADD, R3, R1, R2),           //   8 R3 = 12
      alur(OP_SUB, R4, R1, R2),           //  12 R4 = R2 - R1 = 2
      alud(OP_XOR, R5, R3, 16'h00FF),     //  16 R5 = 0xF3
      alud(OP_AND, R6, R5, 16'h000F),     //  20 R6 = 3
      alud(OP_OR,  R7, R6, 16'h0100),     //  24 R7 = 0x103
      copyd(R0, 16'h0200),                //  28
      write(R0, R7),                      //  32 [0x200] = 0x103
      alud(OP_ADD, R0, R0, 16'd2),        //  36
      write(R0, R3),                      //  40 [0x202] = 12
      alud(OP_SUB, R0, R0, 16'd2),        //  44 R0 = 0x200
      load(R1, R0),                       //  48 R1 = 0x103
      push(R1),                           //  52
      copyd(R1, 16'd0),                   //  56
      pop(R2),                            //  60 R2 = 0x103
      cmpd(R2, 16'h0103),                 //  64 zero
      jmp(OP_JE, 16'd76),                 //  68 taken
      copyd(R6, 16'hDEAD),                //  72 skipped
      cmpd(R4, 16'd1),                    //  76 2 - 1 > 0
      jmp(OP_JA, 16'd88),                 //  80 taken
      copyd(R6, 16'hBEEF),                //  84 skipped
      jmp(OP_JSR, 16'd400),               //  88
      copyd(R0, 16'h0204),                //  92
      write(R0, R5),                      //  96 [0x204] = 0x55 (set by subroutine)
      cinst(UW_CLRA),                     // 100
      copyd(R1, 16'd3),                   // 104
      copyd(R2, 16'd5),                   // 108
      csetdeli(R1, R2),                   // 112
      loadd(SR_CDATA, 16'h1234),          // 116
      loadd(SR_ACCOUT, 16'h4321),         // 120
      copyd(R0, 16'h0206),                // 124
      write(R0, SR_ACCIN),                // 128 [0x206] = ACCIN
      alur(OP_ADD, R3, SR_ACCIN, R1),     // 132 R3 = 0x5A5D
      copyd(R0, 16'h0208),                // 136
      write(R0, R3),                      // 140 [0x208] = 0x5A5D
      cmpd(R1, 16'd4),                    // 144 3 - 4 < 0
      jmp(OP_JE, 16'd160),                // 148 not taken
      jmp(OP_JA, 16'd160),                // 152 not taken
      copyd(R7, 16'h0077),                // 156
      copyd(R0, 16'h020A),                // 160
      write(R0, R7),                      // 164 [0x20A] = 0x77
      loadd(SR_CDATA2, 16'h0BCD),         // 168 second cell-data code
      jmp(OP_JMP, 16'd172)                // 172 halt
    };
    a = 0;
    foreach (prog[i]) begin put(a, prog[i]); a += 4; end
    put(400, copyd(R5, 16'h0055));
    put(404, rts());
    @(negedge clk); rst = 1'b0;
    wait (dut.exec && dut.ir.op == OP_JMP && dut.dr == 16'd172);
    repeat (4) @(posedge clk);

    chk(peek(16'h200) == 16'h0103, "WRITE of OR result / LOAD source");
    chk(peek(16'h202) == 16'd12, "ADD result");
    chk(peek(16'h204) == 16'h0055, "JSR/RTS subroutine ran and returned");
    chk(peek(16'h206) == ACCIN_VAL, "WRITE of ACCIN as source 2");
    chk(peek(16'h208) == 16'h5A5D, "ACCIN as source 1");
    chk(peek(16'h20A) == 16'h0077, "JE/JA not taken when negative");
    chk(dut.u_regfile.regs_q[4] == 16'd2, "SUB order (source 2 - source 1)");
    chk(dut.u_regfile.regs_q[5] == 16'h0055, "XOR then subroutine overwrite");
    chk(dut.u_regfile.regs_q[6] == 16'h0003, "AND; JE/JA skipped the poison writes");
    chk(dut.u_regfile.regs_q[2] == 16'd5, "register after POP / later COPY");
    chk(cinst_log.size() == 2, $sformatf("two cell instruction writes, saw %0d", cinst_log.size()));
    if (cinst_log.size() == 2) begin
      chk(cinst_log[0] == UW_CLRA, "CINST word");
      chk(cinst_log[1] == {1'b0, 5'd3, 6'b0, 1'b1, 3'd5}, "CDELINT word");
    end
    chk(cdata_log.size() == 2, "two cell data strobes");
    if (cdata_log.size() == 2) chk(cdata_log[0] == 16'h1234 && cdata_log[1] == 16'h0BCD, "cell data values");
    chk(accout == 16'h4321, "ACCOUT register");
    chk(bad_spacing == 0, "three cycles per instruction");
    chk(exec_count > 40, "instruction count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
