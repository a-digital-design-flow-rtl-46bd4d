// tb_fir_filter: feeds random 6-bit samples through the 9-tap filter with
// random signed 4-bit coefficients (changed now and then) and compares
// every output with an integer model: exact sum of products, floor
// division by 2^4, saturation to 6 bits. The enable is toggled at random;
// the output must hold while it is low. Also checks the one-cycle latency
// with an impulse.
module tb_fir_filter;
  localparam int NTAP = 9, DW = 6, CW = 4;
  logic clk = 0, rst_n, en;
  logic signed [DW-1:0] din, dout;
  logic [NTAP*CW-1:0] coef;
  int checks = 0, failures = 0;
  int hist [NTAP];

  fir_filter #(.NTAP(NTAP), .DW(DW), .CW(CW), .CFRAC(4), .CSIGNED(1'b1), .OUT_W(DW)) dut (.*);
  always #5 clk = ~clk;

  function automatic int model();
    int acc, q;
    acc = 0;
    for (int k = 0; k < NTAP; k++) acc += hist[k] * int'(signed'(coef[k*CW +: CW]));
    q = (acc >= 0) ? acc / 16 : -((-acc + 15) / 16);   // floor(acc / 16)
    if (q > 31) q = 31;
    if (q < -32) q = -32;
    return q;
  endfunction

  initial begin
    int exp_v, prev;
    rst_n = 0; en = 0; din = 0; coef = '0;
    for (int k = 0; k < NTAP; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // impulse response with known coefficients
    for (int k = 0; k < NTAP; k++) coef[k*CW +: CW] = CW'(k - 4);
    en = 1;
    for (int n = 0; n < NTAP + 2; n++) begin
      din = (n == 0) ? 6'sd31 : 6'sd0;
      for (int k = NTAP-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = din;
      exp_v = model();
      @(posedge clk); #1;
      checks++;
      if (dout != 6'(exp_v)) begin failures++; $display("FAIL impulse n=%0d got %0d exp %0d", n, dout, exp_v); end
    end
    // random
    prev = dout;
    for (int n = 0; n < 4000; n++) begin
      if (n % 500 == 0) coef = {$urandom, $urandom};
      en  = ($urandom_range(0, 3) != 0);
      din = DW'($urandom);
      if (en) begin
        for (int k = NTAP-1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = din;
        exp_v = model();
      end else exp_v = prev;
      @(posedge clk); #1;
      checks++;
      if (dout != 6'(exp_v)) begin failures++; $display("FAIL n=%0d got %0d exp %0d", n, dout, exp_v); end
      prev = exp_v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
