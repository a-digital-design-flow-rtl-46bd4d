// combiner: the downlink vector-matrix product that combines the eight
// antenna streams into four output streams (beamforming).
//
//   y[s] = sum_a w[s][a] * x[a],  s = 0..STREAMS-1, a = 0..ANT-1
//
// with complex x and w. All STREAMS*ANT complex products are computed in
// parallel, one result vector per clock cycle (32 multiplier cores for the
// default 8x4 case, as in the original model).
//
// Number formats: x is signed SAMPLE_W-bit I and Q with 5 fraction bits
// (Q1.5, the ADC range -1 .. 0.96875). w is unsigned W_W-bit I and Q with 7
// fraction bits (0 .. 1.99), packed in the combiner bank rows: weight
// (s,a) has index k = s*ANT + a, its real part at bits [2k*W_W +: W_W] and
// its imaginary part at [(2k+1)*W_W +: W_W]. Each complex product (real and
// imaginary part) is truncated to PRE_W = 10 bits with 6 fraction bits, the
// products are summed exactly and the sum is truncated to POST_W = 8 bits
// with 3 fraction bits and saturated. Output word: stream s real part at
// y[2s], imaginary part at y[2s+1].
//
// Timing: the result is registered; dout shows the product of the din and
// w present on the previous clock edge with en high.
//
// The matrix product, the 10-bit products and the 8-bit outputs, and the
// drop from 5 to 3 fraction bits follow the original design; the exact
// position of the binary point inside the 10-bit products, truncation and
// saturation are this design's choice.
module combiner
  import digif_pkg::*;
#(
  parameter int unsigned ANT     = ANT_NUM,
  parameter int unsigned STREAMS = STREAM_NUM,
  parameter int unsigned X_W     = SAMPLE_W,
  parameter int unsigned W_W     = CMB_WL,
  parameter int unsigned PRE_W   = PRE_SUM_W,
  parameter int unsigned POST_W  = POST_SUM_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic [2*ANT*X_W-1:0]          din,   // antenna a: I at [2a], Q at [2a+1]
  input  logic [2*ANT*STREAMS*W_W-1:0]  w,
  output logic [2*STREAMS*POST_W-1:0]   dout
);
  localparam int unsigned PW   = X_W + W_W + 2;      // full complex product
  localparam int unsigned SH1  = (X_W - 1) + (W_W - 1) - 6;  // to 6 fraction bits
  localparam int unsigned SW   = PRE_W + $clog2(ANT) + 1;
  localparam int unsigned SH2  = 6 - 3;                      // to 3 fraction bits

  function automatic logic signed [POST_W-1:0] sat(input logic signed [SW-1:0] v);
    logic signed [SW-1:0] hi, lo;
    hi = SW'(2**(POST_W-1) - 1);
    lo = -SW'(2**(POST_W-1));
    if (v > hi)      return POST_W'(hi);
    else if (v < lo) return POST_W'(lo);
    else             return POST_W'(v);
  endfunction

  logic [2*STREAMS*POST_W-1:0] res;

  always_comb begin
    for (int s = 0; s < STREAMS; s++) begin
      logic signed [SW-1:0] acc_r, acc_i;
      acc_r = '0;
      acc_i = '0;
      for (int a = 0; a < ANT; a++) begin
        logic signed [X_W-1:0]   xr, xi;
        logic signed [W_W:0]     wr, wi;
        logic signed [PW-1:0]    pr, pi;
        logic signed [PRE_W-1:0] tr, ti_;
        xr = din[(2*a)*X_W +: X_W];
        xi = din[(2*a+1)*X_W +: X_W];
        wr = {1'b0, w[(2*(s*ANT+a))*W_W +: W_W]};
        wi = {1'b0, w[(2*(s*ANT+a)+1)*W_W +: W_W]};
        pr = PW'(xr) * PW'(wr) - PW'(xi) * PW'(wi);
        pi = PW'(xr) * PW'(wi) + PW'(xi) * PW'(wr);
        tr  = PRE_W'(pr >>> SH1);
        ti_ = PRE_W'(pi >>> SH1);
        acc_r = acc_r + SW'(tr);
        acc_i = acc_i + SW'(ti_);
      end
      res[(2*s)*POST_W   +: POST_W] = sat(acc_r >>> SH2);
      res[(2*s+1)*POST_W +: POST_W] = sat(acc_i >>> SH2);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  dout <= '0;
    else if (en) dout <= res;
  end
endmodule
