// tb_line_delay: a 9-word line delay driven with random words and random
// gaps in en; every output must equal the input taken DEPTH+1 enabled
// cycles earlier (DEPTH words in the memory plus the output register), and
// the output must hold while en is low.
module tb_line_delay;
  localparam int W = 8, DEPTH = 9;
  logic clk = 0, rst_n, en;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;

  line_delay #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [W-1:0] hist [$];
  initial begin
    logic [W-1:0] held;
    rst_n = 0; en = 0; din = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      en  = ($urandom % 4) != 0;
      din = W'($urandom);
      held = dout;
      @(posedge clk); #1;
      if (en) begin
        hist.push_back(din);
        if (hist.size() > DEPTH + 1)
          chk(dout == hist[hist.size() - 1 - DEPTH], $sformatf("delayed word %0d", i));
      end else chk(dout == held, "output holds while en is low");
    end
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
