// tb_splitter: compares the 1-to-8 complex splitter with an integer model:
// products in units of 2^-12, floored to units of 2^-3, saturated to 6
// bits. Also checks that the output holds while en is low.
module tb_splitter;
  localparam int ANT = 8, XW = 6, WW = 8, OW = 6;
  logic clk = 0, rst_n, en;
  logic [2*XW-1:0] din;
  logic [2*ANT*WW-1:0] w;
  logic [2*ANT*OW-1:0] dout, held;
  int checks = 0, failures = 0;

  splitter dut (.*);
  always #5 clk = ~clk;

  function automatic int fl(input int v, input int sh);
    return (v >= 0) ? v / (1 << sh) : -((-v + (1 << sh) - 1) / (1 << sh));
  endfunction
  function automatic int sat6(input int v);
    return v > 31 ? 31 : (v < -32 ? -32 : v);
  endfunction

  initial begin
    rst_n = 0; en = 1; din = '0; w = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int xr, xi;
      din = 12'($urandom);
      if (n % 100 == 0) for (int i = 0; i < 4; i++) w[i*32 +: 32] = $urandom;
      if (n == 0) for (int a = 0; a < ANT; a++) w[(2*a)*WW +: 2*WW] = {8'd0, 8'd128};  // w = 1
      @(posedge clk); #1;
      xr = int'(signed'(din[XW-1:0]));
      xi = int'(signed'(din[2*XW-1:XW]));
      for (int a = 0; a < ANT; a++) begin
        int wr, wi, er, ei;
        wr = int'(w[(2*a)*WW +: WW]);
        wi = int'(w[(2*a+1)*WW +: WW]);
        er = sat6(fl(xr*wr - xi*wi, 9));
        ei = sat6(fl(xr*wi + xi*wr, 9));
        checks++;
        if (dout[(2*a)*OW +: OW] != 6'(er) || dout[(2*a+1)*OW +: OW] != 6'(ei)) begin
          failures++;
          $display("FAIL n=%0d ant %0d", n, a);
        end
      end
    end
    held = dout; en = 0; din = ~din;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (dout != held) begin failures++; $display("FAIL hold"); end
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
