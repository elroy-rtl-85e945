// tb_fifo_queue: drives the 8-stage delay queue with a random word on every
// enable and checks that, for each delay 0..7, the word reaches the output
// exactly delay+1 enable pulses after it was written (a delay of d inserts d
// bubbles), that idle cycles do not advance the queue and that reset clears
// it. The reference is an 8-entry shift model kept by the testbench.
//
// Expected values follow the instruction-set and microcode definitions of the
// design; the stimulus and sizes are this testbench's own.
module tb_fifo_queue;
  logic clk = 0, rst = 1, en = 0;
  logic [2:0] delay = '0;
  logic [31:0] din = '0, dout;
  logic [31:0] model [9];
  int checks = 0, failures = 0;

  fifo_queue #(.W(32), .DEPTH(8)) dut (.clk_i(clk), .rst_i(rst), .enable_i(en),
                                       .delay_i(delay), .d_i(din), .d_o(dout));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] exp, input string what);
    checks++;
    if (dout !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, dout, exp); end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int d = 0; d < 8; d++) begin
      logic [31:0] first;
      delay = 3'(d);
      // write one marked word and follow it through the queue
      @(negedge clk); en = 1; first = $urandom | 32'h1; din = first;
      for (int k = 0; k <= d; k++) begin
        @(posedge clk); #1;
        if (k < d) chk(32'h0, $sformatf("delay %0d step %0d (bubble)", d, k));
        else       chk(first, $sformatf("delay %0d arrival", d));
        @(negedge clk); din = '0;
        if (k < d && ($urandom_range(0, 1) == 1)) begin
          // idle cycle: queue must hold
          en = 0; @(posedge clk); #1; chk(32'h0, "idle hold"); @(negedge clk); en = 1;
        end
      end
      en = 0;
      // flush
      @(negedge clk); rst = 1; @(negedge clk); rst = 0; #1; chk(32'h0, "reset clears");
    end
    // random stream against the model with a fixed delay
    delay = 3'd5;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en = $urandom_range(0, 1); din = $urandom;
      if (en) begin
        for (int k = 0; k < 8; k++) model[k] = (k == int'(delay)) ? din : model[k+1];
      end
      @(posedge clk); #1;
      chk(model[0], $sformatf("stream %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
