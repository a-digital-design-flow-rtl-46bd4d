// flow_top: the two designs side by side on one clock and reset.
//
//  - dig_if: the digital interface of a 5G digital-beamforming radio chip
//    (request-driven receive and transmit data paths between eight antenna
//    ADCs/DACs and the baseband);
//  - conv2d_stream: a streaming 3x3 2D-convolution edge detector for a
//    640-pixel-wide, 8-bit image.
//
// The two share nothing but clk and rst_n; each brings its own ports out
// unchanged (the edge detector's with the prefix img_). The ADCs, DACs and
// the baseband processor are outside this design and connect to the
// dig_if ports. See the two blocks for their interfaces and timing.
//
// The two designs are the original ones; putting them under one top level
// is only a packaging choice of this design.
module flow_top
  import digif_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  // DIG-IF
  input  logic [2*ANT_NUM*SAMPLE_W-1:0] adc_in,
  input  logic                        bb_in_valid,
  input  logic [BB_W-1:0]             bb_in_data,
  output logic                        bb_in_ready,
  output logic                        bb_out_valid,
  output logic [BB_W-1:0]             bb_out_data,
  output logic                        dac_valid,
  output logic [2*ANT_NUM*TX_W-1:0]   dac_data,
  output logic [TS_W-1:0]             ti,
  output logic                        busy,
  output logic                        overflow,
  // edge detector
  input  logic                        img_valid,
  input  logic [7:0]                  img_pixel,
  output logic                        img_out_valid,
  output logic signed [14:0]          img_out
);
  dig_if u_dig_if (
    .clk, .rst_n, .adc_in, .bb_in_valid, .bb_in_data, .bb_in_ready,
    .bb_out_valid, .bb_out_data, .dac_valid, .dac_data, .ti, .busy, .overflow
  );

  conv2d_stream u_edge (
    .clk, .rst_n, .in_valid(img_valid), .pixel_in(img_pixel),
    .out_valid(img_out_valid), .pixel_out(img_out)
  );
endmodule
