// coeff_bank: a bank memory of filter coefficients or combining/splitting
// weights, addressed by an 8-bit bank address.
//
// Each bank holds ROWS 64-bit rows. The bank is built from ROWS parallel
// simple dual-port RAMs of 2^BANK_AW x 64 bits, one per row: a SET_* request
// writes one row per cycle (wr_en, wr_bank, wr_row, wr_data), and a read of
// bank rd_bank returns all ROWS rows side by side on rd_data one clock cycle
// later, row r at bits [r*64 +: 64]. The coefficient fields inside the
// concatenated rows are laid out by the block that uses them.
//
// Bank address width, row width and the number of rows per bank type
// (ceil(coeff_num * word_length * (1+complex) / 64)) follow the DIG-IF
// constants; writing one row per cycle is this design's choice. Like the
// original generic RAMs, the banks are not reset.
module coeff_bank #(
  parameter int unsigned ROWS    = digif_pkg::CMB_ROWS,
  parameter int unsigned BANK_AW = digif_pkg::BANK_AW,
  parameter int unsigned RAM_W   = digif_pkg::RAM_W,
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                  clk,
  input  logic                  wr_en,
  input  logic [BANK_AW-1:0]    wr_bank,
  input  logic [RW-1:0]         wr_row,
  input  logic [RAM_W-1:0]      wr_data,
  input  logic [BANK_AW-1:0]    rd_bank,
  output logic [ROWS*RAM_W-1:0] rd_data
);
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    sdp_ram #(.ADDR_W(BANK_AW), .DATA_W(RAM_W)) u_ram (
      .clk     (clk),
      .en      (1'b1),
      .wr_en   (wr_en && wr_row == RW'(r)),
      .wr_addr (wr_bank),
      .din     (wr_data),
      .rd_addr (rd_bank),
      .rd_dout (rd_data[r*RAM_W +: RAM_W])
    );
  end
endmodule
