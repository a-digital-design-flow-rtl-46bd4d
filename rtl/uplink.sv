// uplink: the transmit data path of the DIG-IF, from the baseband to the
// eight antenna DACs, with its transmit control.
//
// When a REQ_SEND request becomes active (start with act.kind = REQ_SEND)
// the transmit control answers FETCH(id, fn, ls) on ev_valid/ev, latches
// the uplink filter bank address ufb and the splitter bank address sb and
// raises tx_active. While tx_active is high every transmit word from the
// baseband (tx_valid/tx_data: I in bits [5:0], Q in [11:6], signed Q1.5)
// is filtered and split; after ls words tx_active falls again. A REQ_SEND
// with ls = 0 only sends the FETCH.
//
// Stages per accepted transmit word: the UL filter (one FIR for I, one for
// Q, coefficients from bank ufb), then the splitter (complex weights from
// bank sb) that produces the eight antenna samples on dac_data (antenna a:
// I at lane 2a, Q at lane 2a+1, 6 bits each), two cycles after the word was
// accepted, with dac_valid.
//
// Only the low 40 bits (10 x 4) of the filter bank row carry coefficients,
// and the start time of act is not needed here (the frame controller has
// already applied it); those bits are unused.
//
// The filter-then-split order follows the design sketch of the DIG-IF; the
// FETCH/transmit handshake follows the REQ_SEND description. That the FIR
// advances only on accepted words, and the word layout, are this design's
// own choices.
module uplink
  import digif_pkg::*;
#(
  parameter int unsigned ANT = ANT_NUM
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   act_valid,
  input  req_t                   act,
  input  logic                   start,
  input  logic                   tx_valid,
  input  logic [2*TX_W-1:0]      tx_data,
  output logic                   tx_active,
  output logic                   ev_valid,
  output event_t                 ev,
  // coefficient bank writes
  input  logic                   ulf_wr_en,
  input  logic [BANK_AW-1:0]     ulf_wr_bank,
  input  logic [RAM_W-1:0]       ulf_wr_data,
  input  logic                   spl_wr_en,
  input  logic [BANK_AW-1:0]     spl_wr_bank,
  input  logic [$clog2(SPL_ROWS)-1:0] spl_wr_row,
  input  logic [RAM_W-1:0]       spl_wr_data,
  // to the DACs
  output logic                   dac_valid,
  output logic [2*ANT*TX_W-1:0]  dac_data
);
  logic [LS_W-1:0]    remaining;
  logic [BANK_AW-1:0] ufb, sb;
  logic               acc, acc_d;

  // ------------------------------------------------------ transmit control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_active <= 1'b0;
      remaining <= '0;
      ufb       <= '0;
      sb        <= '0;
      ev_valid  <= 1'b0;
      ev        <= '0;
    end else begin
      ev_valid <= 1'b0;
      if (acc) begin
        remaining <= remaining - 1'b1;
        if (remaining == LS_W'(1)) tx_active <= 1'b0;
      end
      if (start && act_valid && act.kind == PK_REQ_SEND) begin
        ev_valid  <= 1'b1;
        ev        <= '{kind: PK_FETCH, id: act.id, fn: act.fn, err: ERR_NONE, ls: act.ls};
        ufb       <= act.faddr;
        sb        <= act.daddr;
        remaining <= act.ls;
        tx_active <= (act.ls != '0);
      end
    end
  end

  assign acc = tx_active && tx_valid;

  // ------------------------------------------------------ banks
  logic [ULF_ROWS*RAM_W-1:0] ulf_coef;
  logic [SPL_ROWS*RAM_W-1:0] spl_w;

  coeff_bank #(.ROWS(ULF_ROWS)) u_ulf_bank (
    .clk(clk), .wr_en(ulf_wr_en), .wr_bank(ulf_wr_bank), .wr_row('0),
    .wr_data(ulf_wr_data), .rd_bank(ufb), .rd_data(ulf_coef)
  );
  coeff_bank #(.ROWS(SPL_ROWS)) u_spl_bank (
    .clk(clk), .wr_en(spl_wr_en), .wr_bank(spl_wr_bank), .wr_row(spl_wr_row),
    .wr_data(spl_wr_data), .rd_bank(sb), .rd_data(spl_w)
  );

  // ------------------------------------------------------ filter and split
  logic [2*TX_W-1:0] filt;
  for (genvar c = 0; c < 2; c++) begin : g_fir
    fir_filter #(
      .NTAP(ULF_NUM), .DW(TX_W), .CW(ULF_WL), .CFRAC(4), .CSIGNED(1'b1), .OUT_W(TX_W)
    ) u_fir (
      .clk(clk), .rst_n(rst_n), .en(acc),
      .din(tx_data[c*TX_W +: TX_W]),
      .coef(ulf_coef[ULF_NUM*ULF_WL-1:0]),
      .dout(filt[c*TX_W +: TX_W])
    );
  end

  splitter #(.ANT(ANT)) u_split (
    .clk(clk), .rst_n(rst_n), .en(acc_d), .din(filt),
    .w(spl_w[2*ANT*SPL_WL-1:0]), .dout(dac_data)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_d     <= 1'b0;
      dac_valid <= 1'b0;
    end else begin
      acc_d     <= acc;
      dac_valid <= acc_d;
    end
  end
endmodule
