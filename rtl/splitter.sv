// splitter: the uplink vector product that spreads one complex transmit
// stream onto the eight antennas.
//
//   y[a] = w[a] * x,  a = 0..ANT-1   (complex)
//
// All ANT complex products are computed in parallel, one per clock cycle.
// x is signed X_W-bit I and Q with 5 fraction bits (Q1.5); w is unsigned
// W_W-bit I and Q with 7 fraction bits, packed in the splitter bank rows
// with the real part of w[a] at bits [2a*W_W +: W_W] and the imaginary part
// at [(2a+1)*W_W +: W_W]. Each product is truncated to OUT_W bits with 3
// fraction bits and saturated. Output: antenna a I at y[2a], Q at y[2a+1].
//
// Timing: registered, one cycle from din to dout while en is high.
//
// Eight complex 8-bit weights with 7 fraction bits and 6-bit transmit
// samples follow the DIG-IF constants; the output scaling (3 fraction bits,
// matching the combiner) is this design's choice.
module splitter
  import digif_pkg::*;
#(
  parameter int unsigned ANT   = ANT_NUM,
  parameter int unsigned X_W   = TX_W,
  parameter int unsigned W_W   = SPL_WL,
  parameter int unsigned OUT_W = TX_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [2*X_W-1:0]     din,      // I at [X_W-1:0], Q above
  input  logic [2*ANT*W_W-1:0] w,
  output logic [2*ANT*OUT_W-1:0] dout
);
  localparam int unsigned PW = X_W + W_W + 2;
  localparam int unsigned SH = (X_W - 1) + (W_W - 1) - 3;

  function automatic logic signed [OUT_W-1:0] sat(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] hi, lo;
    hi = PW'(2**(OUT_W-1) - 1);
    lo = -PW'(2**(OUT_W-1));
    if (v > hi)      return OUT_W'(hi);
    else if (v < lo) return OUT_W'(lo);
    else             return OUT_W'(v);
  endfunction

  logic [2*ANT*OUT_W-1:0] res;

  always_comb begin
    logic signed [X_W-1:0] xr, xi;
    xr = din[X_W-1:0];
    xi = din[2*X_W-1:X_W];
    for (int a = 0; a < ANT; a++) begin
      logic signed [W_W:0]  wr, wi;
      logic signed [PW-1:0] pr, pi;
      wr = {1'b0, w[(2*a)*W_W +: W_W]};
      wi = {1'b0, w[(2*a+1)*W_W +: W_W]};
      pr = PW'(xr) * PW'(wr) - PW'(xi) * PW'(wi);
      pi = PW'(xr) * PW'(wi) + PW'(xi) * PW'(wr);
      res[(2*a)*OUT_W   +: OUT_W] = sat(pr >>> SH);
      res[(2*a+1)*OUT_W +: OUT_W] = sat(pi >>> SH);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  dout <= '0;
    else if (en) dout <= res;
  end
endmodule
