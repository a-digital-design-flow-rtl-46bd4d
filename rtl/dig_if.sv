// dig_if: the DIG-IF, the digital part of a digital-beamforming 5G radio
// chip between eight antenna ADC/DAC channels and the baseband processor.
//
// The baseband controls it with requests on a 64-bit word interface:
// timed data requests (REQ, REQ_UC), untimed ones (REQ_UT), transmit
// requests (REQ_SEND), cancellations, a time shift and the loading of
// filter and combining/splitting coefficient banks. Requests can arrive
// out of order and ahead of time; the DIG-IF keeps them until the sample
// time counter reaches their start time and then
//  - receive: filters the eight antenna streams, combines them into four
//    beams (or passes them uncombined) and sends RES(id, fn, nb, data);
//  - transmit: sends FETCH(id, fn, ls), takes ls samples from the
//    baseband, filters them and splits them onto the eight antennas.
// Each request is answered with ACK or NACK(error); errors found later
// are reported with FAIL(error).
//
// Blocks: unpacker and packer (the packager), time_ctrl, request_buffer
// and frame_ctrl (requesting), downlink (DL filter, combining, blocker)
// and uplink (transmit control, UL filter, splitting), with their
// coefficient banks. A divider makes one sample period (tick) every DECIM
// clock cycles: the ADCs deliver one sample per antenna per clock, the
// downlink filter decimates by DECIM, and ti counts sample periods.
//
// Interface: adc_in carries the eight antennas' I and Q (signed Q1.5,
// antenna a: I at lane 2a, Q at lane 2a+1, 6 bits per lane). bb_in_* and
// bb_out_* are the baseband word ports (bb_out has no back-pressure).
// dac_valid/dac_data carry the eight antenna transmit samples. ti is the
// current sample time. Synchronous active-low reset rst_n.
//
// The partition into blocks and the request/response scheme follow the
// DIG-IF specification; packet encodings, the word interface and the
// timing are this design's own (see the individual blocks).
module dig_if
  import digif_pkg::*;
#(
  parameter int unsigned DEC = DECIM
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [2*ANT_NUM*SAMPLE_W-1:0] adc_in,
  input  logic                      bb_in_valid,
  input  logic [BB_W-1:0]           bb_in_data,
  output logic                      bb_in_ready,
  output logic                      bb_out_valid,
  output logic [BB_W-1:0]           bb_out_data,
  output logic                      dac_valid,
  output logic [2*ANT_NUM*TX_W-1:0] dac_data,
  output logic [TS_W-1:0]           ti,
  output logic                      busy,
  output logic                      overflow
);
  // ------------------------------------------------------ sample clock
  logic [$clog2(DEC+1)-1:0] phase;
  logic tick, frame_tick;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase      <= '0;
      frame_tick <= 1'b0;
    end else begin
      phase      <= (phase == ($clog2(DEC+1))'(DEC-1)) ? '0 : phase + 1'b1;
      frame_tick <= tick;
    end
  end
  assign tick = (phase == '0);

  // ------------------------------------------------------ packager in
  logic              req_valid, cancel_valid, cancel_ready, set_ti_valid;
  req_t              req;
  logic [ID_W-1:0]   cancel_id;
  logic [TS_W-1:0]   tis;
  logic              cw_en;
  pkt_t              cw_sel;
  logic [BANK_AW-1:0] cw_bank;
  logic [2:0]        cw_row;
  logic [RAM_W-1:0]  cw_data;
  logic              tx_valid, tx_active, up_busy;
  logic [2*TX_W-1:0] tx_data;

  unpacker u_unpacker (
    .clk, .rst_n, .bb_in_valid, .bb_in_data, .bb_in_ready, .busy(up_busy),
    .tx_active, .req_valid, .req, .cancel_valid, .cancel_id, .cancel_ready,
    .set_ti_valid, .tis, .cw_en, .cw_sel, .cw_bank, .cw_row, .cw_data,
    .tx_valid, .tx_data
  );

  // ------------------------------------------------------ requesting
  logic   take, stg_valid, act_valid, start;
  req_t   stg, act;
  logic   ins_ev_valid, cxl_ev_valid, fc_ev_valid, ul_ev_valid;
  event_t ins_ev, cxl_ev, fc_ev, ul_ev;

  time_ctrl u_time (
    .clk, .rst_n, .tick, .set_valid(set_ti_valid), .tis, .ti
  );

  request_buffer u_reqbuf (
    .clk, .rst_n, .ti,
    .ins_valid(req_valid), .ins(req), .ins_ev_valid, .ins_ev,
    .cancel_valid, .cancel_id, .cancel_ready, .cxl_ev_valid, .cxl_ev,
    .take, .stg_valid, .stg, .occupied()
  );

  frame_ctrl u_frame (
    .clk, .rst_n, .tick(frame_tick), .ti, .stg_valid, .stg, .take,
    .act_valid, .act, .start, .ev_valid(fc_ev_valid), .ev(fc_ev)
  );

  // ------------------------------------------------------ data paths
  logic            st_hdr_valid, st_valid;
  logic [BB_W-1:0] st_hdr, st_data;

  downlink u_dl (
    .clk, .rst_n, .adc_in, .frame_tick, .act_valid, .act, .start,
    .dlf_wr_en(cw_en && cw_sel == PK_SET_DL_FILTER), .dlf_wr_bank(cw_bank),
    .dlf_wr_data(cw_data),
    .cmb_wr_en(cw_en && cw_sel == PK_SET_COMBINER), .cmb_wr_bank(cw_bank),
    .cmb_wr_row(cw_row[$clog2(CMB_ROWS)-1:0]), .cmb_wr_data(cw_data),
    .st_hdr_valid, .st_hdr, .st_valid, .st_data
  );

  uplink u_ul (
    .clk, .rst_n, .act_valid, .act, .start, .tx_valid, .tx_data, .tx_active,
    .ev_valid(ul_ev_valid), .ev(ul_ev),
    .ulf_wr_en(cw_en && cw_sel == PK_SET_UL_FILTER), .ulf_wr_bank(cw_bank),
    .ulf_wr_data(cw_data),
    .spl_wr_en(cw_en && cw_sel == PK_SET_SPLITTER), .spl_wr_bank(cw_bank),
    .spl_wr_row(cw_row[$clog2(SPL_ROWS)-1:0]), .spl_wr_data(cw_data),
    .dac_valid, .dac_data
  );

  // ------------------------------------------------------ packager out
  event_t evs [4];
  logic   pk_busy;
  assign evs = '{ins_ev, cxl_ev, fc_ev, ul_ev};

  packer #(.NEV(4)) u_packer (
    .clk, .rst_n, .st_hdr_valid, .st_hdr, .st_valid, .st_data,
    .ev_valid({ul_ev_valid, fc_ev_valid, cxl_ev_valid, ins_ev_valid}), .ev(evs),
    .bb_out_valid, .bb_out_data, .busy(pk_busy), .overflow
  );

  assign busy = up_busy || pk_busy;
endmodule
