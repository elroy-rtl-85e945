// tb_memory: writes random halfwords through the host port and the 32-bit
// processor write path, then checks reads: the 32-bit read path returns
// {word[a], word[a+2]}, the upper half of the write bus is what is stored,
// bit 0 of the address is ignored and the read bus is zero when not reading.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_memory;
  localparam int AW = 10;
  logic clk = 0, rd = 0, we = 0, hwe = 0;
  logic [AW-1:0] addr = '0, haddr = '0;
  logic [31:0] rdata, wdata = '0;
  logic [15:0] hwdata = '0, hrdata;
  logic [15:0] model [2**(AW-1)];
  int checks = 0, failures = 0;

  memory #(.ADDR_W(AW)) dut (.clk_i(clk), .addr_i(addr), .rd_i(rd), .rdata_o(rdata), .we_i(we),
                             .wdata_i(wdata), .host_we_i(hwe), .host_addr_i(haddr),
                             .host_wdata_i(hwdata), .host_rdata_o(hrdata));
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**(AW-1); i++) begin
      @(negedge clk); hwe = 1; haddr = AW'(2 * i); hwdata = 16'($urandom); model[i] = hwdata;
    end
    @(negedge clk); hwe = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); rd = $urandom_range(0, 1);
      addr = AW'($urandom); wdata = $urandom;
      #1;
      checks++;
      if (rd && rdata !== {model[addr[AW-1:1]], model[AW'(addr[AW-1:1] + 1'b1)]}) begin
        failures++; $display("FAIL read at %h", addr);
      end
      if (!rd && rdata !== 32'h0) begin failures++; $display("FAIL read bus not idle"); end
      @(posedge clk);
      if (we) model[addr[AW-1:1]] = wdata[31:16];
      #1;
      haddr = AW'($urandom);
      #1;
      checks++;
      if (hrdata !== model[haddr[AW-1:1]]) begin failures++; $display("FAIL host read %h", haddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
