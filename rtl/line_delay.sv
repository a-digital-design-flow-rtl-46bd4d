// line_delay: delays a pixel stream by DEPTH valid samples using a
// circular buffer in a simple dual-port RAM (the line buffer of the 2D
// convolution).
//
// On every clock edge with en high, din is written at the pointer and the
// word written DEPTH enables earlier is read from the same address, so dout
// (registered) then holds din of DEPTH enables ago. The pointer wraps at
// DEPTH-1, so DEPTH need not be a power of two. The RAM is not reset, like
// the line memories of the original design: the first DEPTH outputs after
// start-up are whatever the RAM held.
module line_delay #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 640,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [AW-1:0] ptr;

  always_ff @(posedge clk) begin
    if (!rst_n)  ptr <= '0;
    else if (en) ptr <= (ptr == AW'(DEPTH-1)) ? '0 : ptr + 1'b1;
  end

  sdp_ram #(.ADDR_W(AW), .DATA_W(W)) u_ram (
    .clk(clk), .en(en), .wr_en(1'b1), .wr_addr(ptr), .din(din),
    .rd_addr(ptr), .rd_dout(dout)
  );
endmodule
