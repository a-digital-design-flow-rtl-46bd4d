// downlink: the receive data path of the DIG-IF, from the eight antenna ADCs
// to response words for the baseband.
//
// Stages:
//  - DL sample control: the ADC samples (I and Q per antenna, signed Q1.5)
//    are registered every clock cycle;
//  - DL filter: one FIR per antenna and rail (16 in all) runs at the ADC
//    rate with the coefficients of downlink filter bank act.faddr; its
//    output is decimated by DECIM, one sample per sample period of the
//    time counter;
//  - blocker: only samples that fall inside an active receive request
//    (REQ, REQ_UC or REQ_UT) go on; all others are dropped;
//  - combining: for REQ and REQ_UT the combiner (weights from combiner bank
//    act.daddr) turns the eight antennas into four 8-bit streams, one
//    64-bit word per sample. For REQ_UC the uncombined control sends the
//    eight filtered antennas in two words (antennas 0-3, then 4-7, each
//    6-bit value sign-extended into an 8-bit lane), which needs DECIM >= 2;
//  - the first sample of a request is preceded by the RES header word
//    (id, fn and the word count nb = ls, or ls*ANT/STREAMS for REQ_UC).
//
// Interface: frame_tick is the cycle in which the frame controller updates
// act (act/act_valid/start are that controller's registered outputs). The
// header leaves on st_hdr_valid/st_hdr and data words on st_valid/st_data;
// both can be valid in the same cycle, the header then comes first.
// Coefficient writes arrive on the two bank write ports.
//
// Timing: the sample of a sample period is the filter output three cycles
// after its frame tick (so that the filter already uses the bank of the
// request, which the bank RAM returns one cycle after act changes); the
// first data word leaves six cycles after the frame tick.
//
// Only the low 36 bits (9 x 4) of the filter bank row carry coefficients;
// the rest of the 64-bit row is unused.
//
// The order filter - combiner, the filter and combiner banks, the blocker
// and the uncombined path follow the original design; the decimate-after-
// filter structure, the word layout and the pipeline timing are this
// design's own choices.
module downlink
  import digif_pkg::*;
#(
  parameter int unsigned ANT     = ANT_NUM,
  parameter int unsigned STREAMS = STREAM_NUM,
  parameter int unsigned X_W     = SAMPLE_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [2*ANT*X_W-1:0]   adc_in,      // antenna a: I at [2a], Q at [2a+1]
  input  logic                   frame_tick,
  input  logic                   act_valid,
  input  req_t                   act,
  input  logic                   start,
  // coefficient bank writes
  input  logic                   dlf_wr_en,
  input  logic [BANK_AW-1:0]     dlf_wr_bank,
  input  logic [RAM_W-1:0]       dlf_wr_data,
  input  logic                   cmb_wr_en,
  input  logic [BANK_AW-1:0]     cmb_wr_bank,
  input  logic [$clog2(CMB_ROWS)-1:0] cmb_wr_row,
  input  logic [RAM_W-1:0]       cmb_wr_data,
  // response words
  output logic                   st_hdr_valid,
  output logic [BB_W-1:0]        st_hdr,
  output logic                   st_valid,
  output logic [BB_W-1:0]        st_data
);
  localparam int unsigned NCH  = 2*ANT;
  localparam int unsigned LANE = BB_W / (2*STREAMS);   // 8-bit lanes

  // ------------------------------------------------------ sample control
  logic [2*ANT*X_W-1:0] adc_q;
  always_ff @(posedge clk) adc_q <= adc_in;

  // ------------------------------------------------------ coefficient banks
  logic [DLF_ROWS*RAM_W-1:0] dlf_coef;
  logic [CMB_ROWS*RAM_W-1:0] cmb_w;

  coeff_bank #(.ROWS(DLF_ROWS)) u_dlf_bank (
    .clk(clk), .wr_en(dlf_wr_en), .wr_bank(dlf_wr_bank), .wr_row('0),
    .wr_data(dlf_wr_data), .rd_bank(act.faddr), .rd_data(dlf_coef)
  );

  // ------------------------------------------------------ filters
  logic [NCH*X_W-1:0] fir_out;
  for (genvar c = 0; c < NCH; c++) begin : g_fir
    fir_filter #(
      .NTAP(DLF_NUM), .DW(X_W), .CW(DLF_WL), .CFRAC(4), .CSIGNED(1'b1), .OUT_W(X_W)
    ) u_fir (
      .clk(clk), .rst_n(rst_n), .en(1'b1),
      .din(adc_q[c*X_W +: X_W]),
      .coef(dlf_coef[DLF_NUM*DLF_WL-1:0]),
      .dout(fir_out[c*X_W +: X_W])
    );
  end

  // ------------------------------------------------------ control pipeline
  typedef struct packed {
    logic valid;   // a sample of an active receive request
    logic first;   // first sample of the request
    req_t req;
  } ctl_t;

  logic [2:0] ft_d;                 // frame tick delayed 1..3
  ctl_t       a_d1, a_d2;           // act delayed 1..2
  ctl_t       c1, c2, c3;
  logic [NCH*X_W-1:0] dec1, dec2, dec3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ft_d <= '0;
      a_d1 <= '0;
      a_d2 <= '0;
      c1   <= '0;
      c2   <= '0;
      c3   <= '0;
    end else begin
      ft_d <= {ft_d[1:0], frame_tick};
      a_d1 <= '{valid: act_valid && act.kind != PK_REQ_SEND, first: start, req: act};
      a_d2 <= a_d1;
      // blocker: keep the sample only inside a receive request
      c1 <= ft_d[2] ? a_d2 : '0;
      c2 <= c1;
      c3 <= c2;
    end
  end

  always_ff @(posedge clk) begin
    if (ft_d[2]) dec1 <= fir_out;
    dec2 <= dec1;
    dec3 <= dec2;
  end

  // ------------------------------------------------------ combining
  coeff_bank #(.ROWS(CMB_ROWS)) u_cmb_bank (
    .clk(clk), .wr_en(cmb_wr_en), .wr_bank(cmb_wr_bank), .wr_row(cmb_wr_row),
    .wr_data(cmb_wr_data), .rd_bank(c1.req.daddr), .rd_data(cmb_w)
  );

  logic [2*STREAMS*POST_SUM_W-1:0] comb;
  combiner #(.ANT(ANT), .STREAMS(STREAMS)) u_comb (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .din(dec2),
    .w(cmb_w[2*ANT*STREAMS*CMB_WL-1:0]), .dout(comb)
  );

  // ------------------------------------------------------ uncombined control
  function automatic logic [BB_W-1:0] uc_word(input logic [NCH*X_W-1:0] d, input int base);
    uc_word = '0;
    for (int k = 0; k < 2*STREAMS; k++)
      uc_word[k*LANE +: LANE] = LANE'(signed'(d[(2*base+k)*X_W +: X_W]));
  endfunction

  logic            uc_second;
  logic [BB_W-1:0] uc_hi;
  always_ff @(posedge clk) begin
    if (!rst_n) uc_second <= 1'b0;
    else        uc_second <= c3.valid && c3.req.kind == PK_REQ_UC;
    uc_hi <= uc_word(dec3, STREAMS);
  end

  // ------------------------------------------------------ output words
  always_comb begin
    event_t h;
    h = '{kind: PK_RES, id: c3.req.id, fn: c3.req.fn, err: ERR_NONE,
          ls: (c3.req.kind == PK_REQ_UC) ? c3.req.ls * LS_W'(ANT/STREAMS) : c3.req.ls};
    st_hdr_valid = c3.valid && c3.first;
    st_hdr       = event_word(h);
    st_valid     = c3.valid || uc_second;
    if (uc_second)
      st_data = uc_hi;
    else if (c3.req.kind == PK_REQ_UC)
      st_data = uc_word(dec3, 0);
    else
      st_data = BB_W'(comb);
  end
endmodule
