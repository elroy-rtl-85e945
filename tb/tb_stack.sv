// tb_stack: random push/pop sequences against a queue model, checking the
// top entry, empty and full, across the whole depth.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_stack;
  logic clk = 0, rst = 1, push = 0, pop = 0;
  logic [15:0] din = '0, top;
  logic empty, full;
  logic [15:0] model [$];
  int checks = 0, failures = 0;

  stack #(.DEPTH(16)) dut (.clk_i(clk), .rst_i(rst), .push_i(push), .pop_i(pop), .din_i(din),
                           .top_o(top), .empty_o(empty), .full_o(full));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 1500; i++) begin
      int bias;
      @(negedge clk);
      // sweep the fill level up and down so both ends are reached
      bias = ((i / 60) % 2 == 0) ? 3 : 1;
      push = 0; pop = 0;
      if ($urandom_range(0, 3) < bias) push = (model.size() < 16);
      else pop = (model.size() > 0);
      din = 16'($urandom);
      @(posedge clk);
      if (push) model.push_back(din);
      if (pop)  void'(model.pop_back());
      #1;
      checks += 3;
      if (empty !== (model.size() == 0)) begin failures++; $display("FAIL empty"); end
      if (full  !== (model.size() == 16)) begin failures++; $display("FAIL full"); end
      if (model.size() > 0 && top !== model[$]) begin failures++; $display("FAIL top %h vs %h", top, model[$]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
