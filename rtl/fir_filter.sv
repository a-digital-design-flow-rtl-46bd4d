// fir_filter: direct-form FIR filter with run-time coefficients, used for
// the downlink filter (one per antenna and I/Q rail) and the uplink filter.
//
// y[n] = sat( (sum_k c[k] * x[n-k]) >>> CFRAC ), k = 0..NTAP-1.
// Samples x are signed DW-bit fixed point with the same number of fraction
// bits as y (Q1.5 for the 6-bit ADC and transmit samples). Coefficients are
// CW-bit fixed point with CFRAC fraction bits, signed when CSIGNED is 1,
// packed with c[k] at bits [k*CW +: CW]. The accumulator is exact; the
// result is truncated (rounded toward minus infinity) to the output
// precision and saturated to OUT_W bits.
//
// Timing: on each clock edge with en high the sample din is taken and
// dout becomes y for that sample (one cycle latency). With en low the
// filter holds. Synchronous active-low reset clears the delay line.
//
// Tap count, coefficient format (4-bit, 4 fraction bits) and the 6-bit data
// width follow the DIG-IF constants. Truncation and saturation are this
// design's choice for the rescaling the fixed-point tool performs in the
// original model.
module fir_filter #(
  parameter int unsigned NTAP    = digif_pkg::DLF_NUM,
  parameter int unsigned DW      = digif_pkg::SAMPLE_W,
  parameter int unsigned CW      = digif_pkg::DLF_WL,
  parameter int unsigned CFRAC   = 4,
  parameter bit          CSIGNED = 1'b1,
  parameter int unsigned OUT_W   = digif_pkg::SAMPLE_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [DW-1:0]   din,
  input  logic [NTAP*CW-1:0]     coef,
  output logic signed [OUT_W-1:0] dout
);
  localparam int unsigned AW = DW + CW + 1 + $clog2(NTAP);

  logic signed [DW-1:0] taps [NTAP];   // taps[k] = x[n-k] for the new sample
  logic signed [AW-1:0] acc, shifted;
  logic signed [OUT_W-1:0] sat;

  always_comb begin
    taps[0] = din;
    acc = '0;
    for (int k = 0; k < NTAP; k++) begin
      logic signed [CW:0] c;
      c   = CSIGNED ? {coef[k*CW+CW-1], coef[k*CW +: CW]} : {1'b0, coef[k*CW +: CW]};
      acc = acc + AW'(taps[k]) * AW'(c);
    end
    shifted = acc >>> CFRAC;
    if (shifted > AW'(signed'({1'b0, {(OUT_W-1){1'b1}}})))
      sat = {1'b0, {(OUT_W-1){1'b1}}};
    else if (shifted < -AW'(signed'({1'b0, {(OUT_W-1){1'b1}}})) - 1)
      sat = {1'b1, {(OUT_W-1){1'b0}}};
    else
      sat = OUT_W'(shifted);
  end

  logic signed [DW-1:0] dly [1:NTAP-1];
  always_comb for (int k = 1; k < NTAP; k++) taps[k] = dly[k];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k < NTAP; k++) dly[k] <= '0;
      dout <= '0;
    end else if (en) begin
      dly[1] <= din;
      for (int k = 2; k < NTAP; k++) dly[k] <= dly[k-1];
      dout <= sat;
    end
  end
endmodule
