// tb_conv2d_stream: two small instances of the streaming convolution, one
// with the default edge kernel on 12-pixel rows and one with a 4-bit
// kernel of other values on 7-pixel rows, fed with random pixels and random
// gaps in in_valid. Every output from the third row on (the first rows
// depend on old line-memory contents) is compared with the direct
// convolution sum over the pixels taken so far; out_valid must follow
// in_valid by one cycle.
module tb_conv2d_stream;
  localparam int W1 = 12, W2 = 7;
  localparam logic [35:0] K2 = {4'(-3), 4'(2), 4'(7), 4'(0), 4'(-8), 4'(1), 4'(5), 4'(-1), 4'(4)};
  logic clk = 0, rst_n, in_valid;
  logic [7:0] pixel_in;
  logic ov1, ov2;
  logic signed [14:0] po1;
  logic signed [16:0] po2;
  int checks = 0, failures = 0;

  conv2d_stream #(.WIDTH(W1)) dut1 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pixel_in(pixel_in), .out_valid(ov1), .pixel_out(po1));
  conv2d_stream #(.WIDTH(W2), .CW(4), .KERNEL(K2)) dut2 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pixel_in(pixel_in), .out_valid(ov2), .pixel_out(po2));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int x [$];
  logic [17:0] K1 = 18'b11_11_00_11_00_01_00_01_01;

  function automatic int ref1(input int n);
    int g = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        g += int'(signed'(K1[((2 - r)*3 + (2 - c))*2 +: 2])) * x[n - r*W1 - c];
    return g;
  endfunction
  function automatic int ref2(input int n);
    int g = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        g += int'(signed'(K2[((2 - r)*3 + (2 - c))*4 +: 4])) * x[n - r*W2 - c];
    return g;
  endfunction

  bit was_valid = 0;
  always @(posedge clk) if (rst_n) begin
    chk(ov1 == was_valid && ov2 == was_valid, "out_valid one cycle after in_valid");
    if (ov1) begin
      automatic int n = x.size() - 1;
      if (n >= 2*W1 + 2) chk(int'(po1) == ref1(n), $sformatf("kernel 1 pixel %0d: %0d exp %0d", n, po1, ref1(n)));
      if (n >= 2*W2 + 2) chk(int'(po2) == ref2(n), $sformatf("kernel 2 pixel %0d: %0d exp %0d", n, po2, ref2(n)));
    end
    was_valid = in_valid;
    if (in_valid) x.push_back(int'(pixel_in));
  end

  initial begin
    rst_n = 0; in_valid = 0; pixel_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      in_valid = ($urandom % 5) != 0;
      pixel_in = (i % 97 < 10) ? 8'hff : 8'($urandom);   // some saturated runs
      @(posedge clk); #1;
    end
    in_valid = 0;
    @(posedge clk); @(posedge clk); #1;
    chk(x.size() > 2000, "enough pixels");
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
