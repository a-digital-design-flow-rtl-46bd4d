// conv2d_stream: streaming 2D convolution (edge detector) for a raster
// image that arrives one pixel per clock cycle.
//
//   g[n] = sum_{r,c} K[KH-1-r][KW-1-c] * x[n - r*WIDTH - c]
//
// i.e. the true convolution of the image with the KH x KW kernel K, where
// the window of output n ends at pixel n. The previous KH-1 image rows are
// kept in line delays (RAM circular buffers); each row tap feeds a short
// shift register of KW-1 pixels, which gives the whole window in parallel.
// The products with the kernel (entries -1, 0 or 1 in the default) are
// summed in one cycle. The window is not stopped at the image edges: at the
// start of a row it wraps to the end of the previous row, and the first
// rows of an image use whatever the line delays hold from before (the line
// memories are not cleared between images), as in the original design.
//
// Parameters: WIDTH pixels per row, PIX_W-bit unsigned pixels, KH x KW
// kernel of CW-bit signed entries packed as KERNEL[(r*KW+c)*CW +: CW] for
// row r, column c. The default kernel is [1 1 0; 1 0 -1; 0 -1 -1] on a
// 640-pixel-wide, 8-bit image. OUT_W is the signed result width, enough
// for 9 taps of magnitude 255 (the output is not clamped; clamping to
// 0..255 is only for display).
//
// Timing: pixel_in is taken on each clock edge with in_valid high;
// pixel_out/out_valid show g for that pixel one clock edge later. With
// in_valid low everything holds. Synchronous active-low reset clears the
// registers but not the line memories.
//
// The algorithm, kernel, image width, 8-bit pixels and line-memory
// structure follow the original design; the packing and OUT_W are this
// design's own choices.
module conv2d_stream #(
  parameter int unsigned WIDTH = 640,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned KH    = 3,
  parameter int unsigned KW    = 3,
  parameter int unsigned CW    = 2,
  parameter logic [KH*KW*CW-1:0] KERNEL = 18'b11_11_00_11_00_01_00_01_01,
  parameter int unsigned OUT_W = PIX_W + CW + $clog2(KH*KW) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [PIX_W-1:0]        pixel_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] pixel_out
);
  // tap[r][c] = x[n - r*WIDTH - c] for the pixel being taken (n)
  logic [PIX_W-1:0] tap  [KH][KW];
  logic [PIX_W-1:0] row0 [KH];          // x[n - r*WIDTH]
  logic [PIX_W-1:0] sr   [KH][1:KW-1];  // shift registers

  assign row0[0] = pixel_in;

  // Each line delay holds WIDTH-1 pixels; with its registered output that
  // makes exactly one image row between row0[r-1] and row0[r].
  for (genvar r = 1; r < KH; r++) begin : g_line
    line_delay #(.W(PIX_W), .DEPTH(WIDTH - 1)) u_line (
      .clk(clk), .rst_n(rst_n), .en(in_valid),
      .din(row0[r-1]), .dout(row0[r])
    );
  end

  always_comb begin
    for (int r = 0; r < KH; r++) begin
      tap[r][0] = row0[r];
      for (int c = 1; c < KW; c++) tap[r][c] = sr[r][c];
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int r = 0; r < KH; r++) begin
        sr[r][1] <= tap[r][0];
        for (int c = 2; c < KW; c++) sr[r][c] <= sr[r][c-1];
      end
    end
  end

  logic signed [OUT_W-1:0] sum;
  always_comb begin
    sum = '0;
    for (int r = 0; r < KH; r++)
      for (int c = 0; c < KW; c++) begin
        logic signed [CW-1:0] k;
        k   = KERNEL[((KH-1-r)*KW + (KW-1-c))*CW +: CW];
        sum = sum + OUT_W'(k) * OUT_W'(signed'({1'b0, tap[r][c]}));
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pixel_out <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) pixel_out <= sum;
    end
  end
endmodule
