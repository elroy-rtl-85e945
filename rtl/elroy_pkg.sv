// elroy_pkg: widths, instruction and microcode formats shared by the elRoy
// control processor and the systolic cell array.
//
// Instruction word (32 bits): opcode[31:28], destination[27:24],
// source 1[23:20], source 2[19:16], data value[15:0]. Register fields 0-7 name
// R0-R7; 8-13 name the special registers listed below. The opcode values, the
// register codes and both field layouts are the ones the design defines; the
// second cell-data code (4'hE) is accepted as an alias of 4'hB.
//
// Cell microcode word (16 bits), high to low: parallel load, 5-bit cell
// address, RA load-external, RB load-external, RB zero, accumulate
// load-external, accumulate zero, sum-with-multiply, delay load, 3-bit delay.
//
// From the design's description: both word layouts, the opcode and register
// codes, the 16-bit data and 32-bit memory paths. This design's choices: the
// 32-bit accumulate width, the 4'hE alias, and the named microcode words
// (CCLEAR's full word in particular, and both CLRA variants).
package elroy_pkg;

  localparam int unsigned DATA_W = 16;  // all data values are 16-bit two's complement
  localparam int unsigned ACC_W  = 32;  // accumulate / FIFO path is 32 bits wide
  localparam int unsigned MEM_W  = 32;  // memory read and write pathways

  typedef enum logic [3:0] {
    OP_OR    = 4'h0,
    OP_XOR   = 4'h1,
    OP_ADD   = 4'h2,
    OP_SUB   = 4'h3,
    OP_AND   = 4'h4,
    OP_COPY  = 4'h5,
    OP_PUSH  = 4'h6,
    OP_POP   = 4'h7,
    OP_JMP   = 4'h8,
    OP_JA    = 4'h9,
    OP_JE    = 4'hA,
    OP_CMP   = 4'hB,
    OP_RTS   = 4'hC,
    OP_LOAD  = 4'hD,
    OP_JSR   = 4'hE,
    OP_WRITE = 4'hF
  } opcode_e;

  // ALU operation = low three bits of the opcode (CMP -> SUB, LOAD -> COPY,
  // PUSH/POP -> pass source A through).
  typedef enum logic [2:0] {
    ALU_OR   = 3'd0,
    ALU_XOR  = 3'd1,
    ALU_ADD  = 3'd2,
    ALU_SUB  = 3'd3,
    ALU_AND  = 3'd4,
    ALU_COPY = 3'd5,
    ALU_PSH  = 3'd6,
    ALU_POP  = 3'd7
  } alu_op_e;

  // Special register codes in the destination / source fields.
  localparam logic [3:0] SR_ACCIN   = 4'h8;  // read: result leaving the array
  localparam logic [3:0] SR_ACCOUT  = 4'h9;  // write: accumulate fed into the first cell
  localparam logic [3:0] SR_CINST   = 4'hA;  // write: cell instruction register
  localparam logic [3:0] SR_CDATA   = 4'hB;  // write: cell data lines (RA pipe / RB bus)
  localparam logic [3:0] SR_CDELINT = 4'hC;  // write: delay word built from two registers
  localparam logic [3:0] SR_EXTDATA = 4'hD;  // read: the instruction's 16-bit data value
  localparam logic [3:0] SR_CDATA2  = 4'hE;  // alias of SR_CDATA

  typedef struct packed {
    opcode_e     op;
    logic [3:0]  dest;
    logic [3:0]  src1;
    logic [3:0]  src2;
  } inst_hi_t;  // the upper 16 bits of an instruction

  typedef struct packed {
    logic        par;       // all cells accept the word
    logic [4:0]  addr;      // cell address (dip switches)
    logic        ra_load;   // RA <= left neighbour's RA (serial pipe)
    logic        rb_load;   // RB <= broadcast data lines
    logic        rb_zero;   // RB <= 0
    logic        acc_ext;   // accumulate base = left neighbour's output
    logic        acc_zero;  // accumulate base = 0 (and queue cleared on load)
    logic        acc_sum;   // add RA*RB to the base
    logic        del_load;  // take the delay value below
    logic [2:0]  del;       // extra stalls in the FIFO queue, 0..7
  } cell_uword_t;

  // Cell words used by the test programs and named in the documentation.
  localparam logic [15:0] UW_CLRA   = 16'h8290;  // shift RA pipe, RB zero, hold accumulates
  localparam logic [15:0] UW_CLRA0  = 16'h8220;  // shift RA pipe, clear accumulates
  localparam logic [15:0] UW_CLAAE  = 16'h8150;  // load RB, acc = left + RA*RB (convolution)
  localparam logic [15:0] UW_CLAAI  = 16'h8110;  // load RB, acc = acc + RA*RB (matrix)
  localparam logic [15:0] UW_CPASS  = 16'h80D0;  // RB zero, acc = left (shift results out)
  localparam logic [15:0] UW_CCLEAR = 16'h80A8;  // all cells: RB, acc and delay to zero

endpackage
