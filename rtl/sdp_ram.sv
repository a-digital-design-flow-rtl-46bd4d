// sdp_ram: simple dual-port RAM, one write port and one read port on one
// clock, the generic RAM the coefficient banks, the request memory of the
// original model and the line buffers are built from.
//
// Ports follow the RAM block of the modelling flow: din, wr_addr, wr_en and
// rd_addr in, rd_dout out, plus a clock enable en (the generated RAM has
// the same enb). The read is synchronous with one cycle of latency and only
// updates rd_dout while en is high; a read of the address written in the same cycle returns the old
// word (read-before-write). There is no reset: like the original RAM it
// keeps its contents, so whatever reads it must first have written it.
module sdp_ram #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 64
) (
  input  logic              clk,
  input  logic              en,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] din,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_dout
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (en) begin
      if (wr_en) mem[wr_addr] <= din;
      rd_dout <= mem[rd_addr];
    end
  end
endmodule
