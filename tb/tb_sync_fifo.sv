// tb_sync_fifo: random push/pop traffic on a 4-deep FIFO of 16-bit words,
// compared with a queue model: first-word-fall-through data, the empty
// flag, pops of an empty FIFO ignored, and the sticky overflow flag on a
// push into a full FIFO (checked at the end with a burst of pushes).
module tb_sync_fifo;
  localparam int W = 16, DEPTH = 4;
  logic clk = 0, rst_n, push, pop, empty, overflow;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [W-1:0] q [$];
  initial begin
    rst_n = 0; push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      chk(empty == (q.size() == 0), "empty flag");
      if (q.size() != 0) chk(dout == q[0], "head word");
      pop  = ($urandom % 2) && !empty;
      push = ($urandom % 2) && (q.size() < DEPTH);   // a full FIFO drops a push even with a pop
      din  = W'($urandom);
      @(posedge clk); #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
      chk(!overflow, "no overflow while the model has room");
    end
    pop = 0; push = 1;
    repeat (DEPTH + 1) begin @(posedge clk); #1; end
    push = 0;
    chk(overflow, "overflow after pushing into a full FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
