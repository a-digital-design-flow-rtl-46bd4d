// binary_index_search: finds, in one clock cycle, the lowest free slot of an
// occupancy register (1 = occupied, 0 = free) and whether any slot is free.
//
// It is a log2(N)-stage tree, as in the 8-bit example of the design: each
// stage looks at the current window of the occupancy vector, checks whether
// the lower half is all ones (that half completely occupied), records the result
// as the next address bit (MSB first) and passes the half that still holds a
// zero on to the next stage. The final window of one bit gives not_full.
// Purely combinational. N must be a power of two; the default of 64 is the
// size of the request memory.
//
// The halving tree and the one-cycle result follow the original design;
// preferring the lower half (so the lowest free slot wins) is this
// design's choice.
module binary_index_search #(
  parameter int unsigned N = 64,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic [N-1:0]  occupied,
  output logic [AW-1:0] index,
  output logic          not_full
);
  always_comb begin
    logic [N-1:0] win;
    int unsigned  width;
    win   = occupied;
    width = N;
    index = '0;
    for (int s = AW-1; s >= 0; s--) begin
      logic [N-1:0] mask;
      width = width / 2;
      mask  = (N'(1) << width) - N'(1);
      // Lower half all ones: the free slot (if any) is in the upper half.
      if ((win & mask) == mask) begin
        index[s] = 1'b1;
        win      = win >> width;
      end
    end
    not_full = ~win[0];
  end
endmodule
