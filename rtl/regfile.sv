// regfile: eight 16-bit general-purpose registers R0-R7.
//
// Two combinational read ports (DBA, DBB) addressed by the source fields and
// one write port that writes W_DATA into W_ADDR on the rising edge when
// w_enable_i is high. Synchronous active-high reset clears all registers.
// Size and port set follow the register-file schematic; reset to zero is this
// design's choice.
module regfile
  import elroy_pkg::*;
#(
  parameter int unsigned N_REGS = 8
) (
  input  logic                      clk_i,
  input  logic                      rst_i,
  input  logic [$clog2(N_REGS)-1:0] dba_addr_i,
  input  logic [$clog2(N_REGS)-1:0] dbb_addr_i,
  input  logic [$clog2(N_REGS)-1:0] w_addr_i,
  input  logic [DATA_W-1:0]         w_data_i,
  input  logic                      w_enable_i,
  output logic [DATA_W-1:0]         dba_o,
  output logic [DATA_W-1:0]         dbb_o
);

  logic [DATA_W-1:0] regs_q [N_REGS];

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      for (int i = 0; i < N_REGS; i++) regs_q[i] <= '0;
    end else if (w_enable_i) begin
      regs_q[w_addr_i] <= w_data_i;
    end
  end

  assign dba_o = regs_q[dba_addr_i];
  assign dbb_o = regs_q[dbb_addr_i];

endmodule
