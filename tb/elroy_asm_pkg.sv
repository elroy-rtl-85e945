// elroy_asm_pkg: instruction encoders used by the elRoy testbenches to build
// programs in memory. Each function returns one 32-bit instruction word
// {opcode, dest, src1, src2, data}; branch targets are byte addresses.
//
// The field layout and codes follow the design's instruction format; the
// helper names and argument order are this package's own.
package elroy_asm_pkg;
  import elroy_pkg::*;

  localparam logic [3:0] R0 = 4'd0, R1 = 4'd1, R2 = 4'd2, R3 = 4'd3,
                         R4 = 4'd4, R5 = 4'd5, R6 = 4'd6, R7 = 4'd7;

  function automatic logic [31:0] enc(opcode_e op, logic [3:0] d, logic [3:0] s1,
                                      logic [3:0] s2, logic [15:0] data);
    return {op, d, s1, s2, data};
  endfunction

  // register forms: dest = s1 op s2 (SUB: dest = s2 - s1)
  function automatic logic [31:0] alur(opcode_e op, logic [3:0] d, logic [3:0] s1, logic [3:0] s2);
    return enc(op, d, s1, s2, 16'h0);
  endfunction
  // data forms: dest = reg op data (SUB: dest = reg - data)
  function automatic logic [31:0] alud(opcode_e op, logic [3:0] d, logic [3:0] r, logic [15:0] v);
    return enc(op, d, SR_EXTDATA, r, v);
  endfunction
  function automatic logic [31:0] copyd(logic [3:0] d, logic [15:0] v);
    return enc(OP_COPY, d, SR_EXTDATA, 4'h0, v);
  endfunction
  function automatic logic [31:0] copyr(logic [3:0] d, logic [3:0] s);
    return enc(OP_COPY, d, s, 4'h0, 16'h0);
  endfunction
  function automatic logic [31:0] cmpd(logic [3:0] r, logic [15:0] v);
    return enc(OP_CMP, 4'h0, SR_EXTDATA, r, v);
  endfunction
  function automatic logic [31:0] cmpr(logic [3:0] a, logic [3:0] b);
    return enc(OP_CMP, 4'h0, a, b, 16'h0);
  endfunction
  // LOAD d,[a] : d = mem[a]
  function automatic logic [31:0] load(logic [3:0] d, logic [3:0] a);
    return enc(OP_LOAD, d, a, 4'h0, 16'h0);
  endfunction
  // LOADD d,v : d = v (through the load path)
  function automatic logic [31:0] loadd(logic [3:0] d, logic [15:0] v);
    return enc(OP_LOAD, d, SR_EXTDATA, 4'h0, v);
  endfunction
  // WRITE [a],s : mem[a] = s (s may be SR_ACCIN)
  function automatic logic [31:0] write(logic [3:0] a, logic [3:0] s);
    return enc(OP_WRITE, 4'h0, a, s, 16'h0);
  endfunction
  function automatic logic [31:0] cinst(logic [15:0] w);
    return loadd(SR_CINST, w);
  endfunction
  // CSETDELI: delay of cell (reg c) = reg d
  function automatic logic [31:0] csetdeli(logic [3:0] c, logic [3:0] d);
    return enc(OP_LOAD, SR_CDELINT, c, d, 16'h0);
  endfunction
  function automatic logic [31:0] jmp(opcode_e op, logic [15:0] t);
    return enc(op, 4'h0, 4'h0, 4'h0, t);
  endfunction
  function automatic logic [31:0] push(logic [3:0] r);
    return enc(OP_PUSH, 4'h0, r, 4'h0, 16'h0);
  endfunction
  function automatic logic [31:0] pop(logic [3:0] r);
    return enc(OP_POP, r, 4'h0, 4'h0, 16'h0);
  endfunction
  function automatic logic [31:0] rts();
    return enc(OP_RTS, 4'h0, 4'h0, 4'h0, 16'h0);
  endfunction

endpackage
