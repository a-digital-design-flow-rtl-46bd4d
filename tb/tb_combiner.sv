// tb_combiner: compares the 8-antenna x 4-stream complex combiner with an
// integer model. Model: each complex product in units of 2^-12, floored to
// units of 2^-6 (10-bit products), summed, floored to units of 2^-3 and
// saturated to 8 bits. Covers the weight sets of the combining example
// (1, 1/2 .. 1/8; single antennas; half the antennas) and random weights.
module tb_combiner;
  localparam int ANT = 8, ST = 4, XW = 6, WW = 8, OW = 8;
  logic clk = 0, rst_n, en;
  logic [2*ANT*XW-1:0] din;
  logic [2*ANT*ST*WW-1:0] w;
  logic [2*ST*OW-1:0] dout;
  int checks = 0, failures = 0;

  combiner dut (.*);
  always #5 clk = ~clk;

  function automatic int fl(input int v, input int sh);   // floor(v / 2^sh)
    return (v >= 0) ? v / (1 << sh) : -((-v + (1 << sh) - 1) / (1 << sh));
  endfunction

  function automatic int sat8(input int v);
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction

  task automatic check_now();
    @(posedge clk); #1;
    for (int s = 0; s < ST; s++) begin
      int sr, si;
      sr = 0; si = 0;
      for (int a = 0; a < ANT; a++) begin
        int xr, xi, wr, wi, pr, pi;
        xr = int'(signed'(din[(2*a)*XW +: XW]));
        xi = int'(signed'(din[(2*a+1)*XW +: XW]));
        wr = int'(w[(2*(s*ANT+a))*WW +: WW]);
        wi = int'(w[(2*(s*ANT+a)+1)*WW +: WW]);
        pr = xr*wr - xi*wi;
        pi = xr*wi + xi*wr;
        sr += fl(pr, 6);
        si += fl(pi, 6);
      end
      checks += 2;
      if (dout[(2*s)*OW +: OW] != 8'(sat8(fl(sr, 3))) || dout[(2*s+1)*OW +: OW] != 8'(sat8(fl(si, 3)))) begin
        failures++;
        $display("FAIL stream %0d got %0d,%0d exp %0d,%0d", s, signed'(dout[(2*s)*OW +: OW]),
                 signed'(dout[(2*s+1)*OW +: OW]), sat8(fl(sr, 3)), sat8(fl(si, 3)));
      end
    end
  endtask

  initial begin
    rst_n = 0; en = 1; din = '0; w = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // weights 1, 1/2, ... 1/8 (real) on stream 0; single antenna on stream 1
    for (int a = 0; a < ANT; a++) begin
      w[(2*a)*WW +: WW]           = 8'(128 / (a + 1));
      w[(2*(ANT+a))*WW +: WW]     = (a == 0 || a == 7) ? 8'd128 : 8'd0;
      w[(2*(2*ANT+a))*WW +: WW]   = (a >= 4) ? 8'd128 : 8'd0;
      w[(2*(3*ANT+a)+1)*WW +: WW] = 8'd64;     // j/2 on every antenna
    end
    for (int n = 0; n < 200; n++) begin din = {$urandom, $urandom, $urandom}; check_now(); end
    for (int n = 0; n < 800; n++) begin
      din = {$urandom, $urandom, $urandom};
      if (n % 50 == 0) for (int i = 0; i < 16; i++) w[i*32 +: 32] = $urandom;
      check_now();
    end
    // extreme values: saturation
    din = {16{6'h20}}; w = '1; check_now();
    din = {16{6'h1f}}; check_now();
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
