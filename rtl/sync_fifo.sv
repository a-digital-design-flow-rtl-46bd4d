// sync_fifo: small synchronous first-in first-out buffer, used by the
// packer to queue one-word responses until the output port is free.
//
// push/din write a word when not full (a push into a full FIFO is dropped
// and sets the sticky overflow flag); pop removes the word shown on dout,
// which is valid whenever empty is low. Depth is a power of two.
// Synchronous active-low reset empties it.
//
// Timing: dout shows the head word combinationally (first-word fall
// through); a pushed word is visible one clock edge later.
//
// The original packager does not describe its internal buffering; this
// FIFO is this design's own helper.
module sync_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         overflow
);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign empty = (wp == rp);
  assign dout  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      overflow <= 1'b0;
    end else begin
      if (pop && !empty) rp <= rp + 1'b1;
      if (push) begin
        if ((wp - rp) == (AW+1)'(DEPTH)) overflow <= 1'b1;
        else begin
          mem[wp[AW-1:0]] <= din;
          wp <= wp + 1'b1;
        end
      end
    end
  end
endmodule
