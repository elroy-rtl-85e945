// elroy_top: the elRoy system - control processor, systolic cell array and
// memory.
//
// The control processor runs a program from memory and drives the array of
// N_CELLS cells through the cell instruction bus, the cell data lines and
// ACCOUT, reading results back through ACCIN. An external host loads programs
// and data through the 16-bit host port while rst_i holds the processor, and
// reads the results afterwards; pc_o shows the processor's program counter
// (a program ends in a jump to itself).
//
// Defaults: 32 cells (the largest the 5-bit cell address allows), 64 KiB of
// byte address space (32 K halfwords).
//
// From the design's description: a control processor, a linear array of up to
// 32 cells and a memory with two 32-bit paths. This design's choices: the host
// port, the memory size, ACCIN as the low 16 bits of the 32-bit result and
// ACCOUT sign-extended into the accumulate chain.
// Interface timing: synchronous to clk_i; host writes take effect on the next
// rising edge, host reads are combinational.
module elroy_top
  import elroy_pkg::*;
#(
  parameter int unsigned N_CELLS    = 32,
  parameter int unsigned MEM_ADDR_W = 16
) (
  input  logic                  clk_i,
  input  logic                  rst_i,
  input  logic                  host_we_i,
  input  logic [MEM_ADDR_W-1:0] host_addr_i,
  input  logic [DATA_W-1:0]     host_wdata_i,
  output logic [DATA_W-1:0]     host_rdata_o,
  output logic [15:0]           pc_o
);

  logic [15:0]       mem_addr;
  logic              mem_rd, mem_we;
  logic [MEM_W-1:0]  mem_rdata, mem_wdata;
  logic [15:0]       cinst;
  logic              cinst_we, cdata_we;
  logic [DATA_W-1:0] cdata, accout;
  logic [ACC_W-1:0]  result;

  main_processor u_cpu (
    .clk_i       (clk_i),
    .rst_i       (rst_i),
    .mem_addr_o  (mem_addr),
    .mem_rd_o    (mem_rd),
    .mem_rdata_i (mem_rdata),
    .mem_we_o    (mem_we),
    .mem_wdata_o (mem_wdata),
    .cinst_o     (cinst),
    .cinst_we_o  (cinst_we),
    .cdata_o     (cdata),
    .cdata_we_o  (cdata_we),
    .accout_o    (accout),
    .accin_i     (result[DATA_W-1:0]),
    .pc_o        (pc_o)
  );

  cell_array #(.N_CELLS(N_CELLS)) u_array (
    .clk_i     (clk_i),
    .rst_i     (rst_i),
    .inst_we_i (cinst_we),
    .inst_i    (cinst),
    .data_we_i (cdata_we),
    .data_i    (cdata),
    .accout_i  (accout),
    .result_o  (result)
  );

  memory #(.ADDR_W(MEM_ADDR_W)) u_mem (
    .clk_i        (clk_i),
    .addr_i       (mem_addr[MEM_ADDR_W-1:0]),
    .rd_i         (mem_rd),
    .rdata_o      (mem_rdata),
    .we_i         (mem_we),
    .wdata_i      (mem_wdata),
    .host_we_i    (host_we_i),
    .host_addr_i  (host_addr_i),
    .host_wdata_i (host_wdata_i),
    .host_rdata_o (host_rdata_o)
  );

endmodule
