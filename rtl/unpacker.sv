// unpacker: the receiving half of the packager. It turns the 64-bit words
// from the baseband into requests, cancellations, time shifts, coefficient
// writes and transmit samples.
//
// The first word of a packet carries its type identifier in bits [63:60];
// the type decides what follows:
//   REQ, REQ_UC, REQ_UT, REQ_SEND: word 0 = {type, id [55:40], fn [39:24],
//        filter bank [15:8], combiner/splitter bank [7:0]};
//        word 1 = {ts [63:32], ls [31:0]}. Both words are collected in a
//        shift register and then handed on as one request (req_valid, req).
//   CANCEL_REQ: word 0 with id [55:40]. cancel_valid is held until the
//        request buffer accepts it (cancel_ready).
//   SET_TI: word 0 with tis [31:0]; set_ti_valid pulses.
//   SET_DL_FILTER, SET_UL_FILTER, SET_COMBINER, SET_SPLITTER: word 0 with
//        the bank address [7:0], then one 64-bit word per bank row (1, 1, 8
//        and 2 rows); each is written on cw_* as it arrives.
// While the uplink transmits (tx_active) every word is a transmit sample
// and goes to tx_valid/tx_data instead.
//
// busy is high while a packet is only partly received, while a
// cancellation waits and while a transmission runs; bb_in_ready is low
// only while a cancellation waits. Words of an unknown type are dropped.
// All outputs are registered pulses one cycle after the word that
// completed them. Synchronous active-low reset.
//
// Header bits outside the fields listed above are ignored.
//
// Type identifiers and the state per type follow the original packager;
// the packet formats and codes are this design's own, as the original
// interface format is not given.
module unpacker
  import digif_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bb_in_valid,
  input  logic [BB_W-1:0]     bb_in_data,
  output logic                bb_in_ready,
  output logic                busy,
  input  logic                tx_active,
  // decoded outputs
  output logic                req_valid,
  output req_t                req,
  output logic                cancel_valid,
  output logic [ID_W-1:0]     cancel_id,
  input  logic                cancel_ready,
  output logic                set_ti_valid,
  output logic [TS_W-1:0]     tis,
  output logic                cw_en,
  output pkt_t                cw_sel,
  output logic [BANK_AW-1:0]  cw_bank,
  output logic [2:0]          cw_row,
  output logic [RAM_W-1:0]    cw_data,
  output logic                tx_valid,
  output logic [2*TX_W-1:0]   tx_data
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_COEF} state_t;
  state_t          state;
  logic [BB_W-1:0] hdr;        // shift register stage holding word 0
  logic [3:0]      rows_left;
  logic            take;

  function automatic logic [3:0] rows_of(input pkt_t t);
    case (t)
      PK_SET_DL_FILTER: rows_of = 4'(DLF_ROWS);
      PK_SET_UL_FILTER: rows_of = 4'(ULF_ROWS);
      PK_SET_COMBINER:  rows_of = 4'(CMB_ROWS);
      default:          rows_of = 4'(SPL_ROWS);
    endcase
  endfunction

  assign bb_in_ready = !cancel_valid;
  assign take        = bb_in_valid && bb_in_ready;
  assign busy        = (state != S_IDLE) || cancel_valid || tx_active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      hdr          <= '0;
      rows_left    <= '0;
      req_valid    <= 1'b0;
      req          <= '0;
      cancel_valid <= 1'b0;
      cancel_id    <= '0;
      set_ti_valid <= 1'b0;
      tis          <= '0;
      cw_en        <= 1'b0;
      cw_sel       <= PK_NONE;
      cw_bank      <= '0;
      cw_row       <= '0;
      cw_data      <= '0;
      tx_valid     <= 1'b0;
      tx_data      <= '0;
    end else begin
      req_valid    <= 1'b0;
      set_ti_valid <= 1'b0;
      cw_en        <= 1'b0;
      tx_valid     <= 1'b0;
      if (cancel_valid && cancel_ready) cancel_valid <= 1'b0;

      if (take) begin
        if (tx_active && state == S_IDLE) begin
          tx_valid <= 1'b1;
          tx_data  <= bb_in_data[2*TX_W-1:0];
        end else begin
          unique case (state)
            S_IDLE: begin
              hdr <= bb_in_data;
              case (pkt_t'(bb_in_data[63:60]))
                PK_REQ, PK_REQ_UC, PK_REQ_UT, PK_REQ_SEND: state <= S_REQ;
                PK_CANCEL_REQ: begin
                  cancel_valid <= 1'b1;
                  cancel_id    <= bb_in_data[55:40];
                end
                PK_SET_TI: begin
                  set_ti_valid <= 1'b1;
                  tis          <= bb_in_data[31:0];
                end
                PK_SET_DL_FILTER, PK_SET_UL_FILTER, PK_SET_COMBINER, PK_SET_SPLITTER: begin
                  state     <= S_COEF;
                  rows_left <= rows_of(pkt_t'(bb_in_data[63:60]));
                  cw_row    <= '1;   // advanced to 0 by the first row
                end
                default: ;
              endcase
            end
            S_REQ: begin
              req_valid <= 1'b1;
              req       <= '{kind: pkt_t'(hdr[63:60]), id: hdr[55:40], fn: hdr[39:24],
                             faddr: hdr[15:8], daddr: hdr[7:0],
                             ts: bb_in_data[63:32], ls: bb_in_data[31:0]};
              state     <= S_IDLE;
            end
            S_COEF: begin
              cw_en     <= 1'b1;
              cw_sel    <= pkt_t'(hdr[63:60]);
              cw_bank   <= hdr[7:0];
              cw_row    <= cw_row + 1'b1;
              cw_data   <= bb_in_data;
              rows_left <= rows_left - 1'b1;
              if (rows_left == 4'd1) state <= S_IDLE;
            end
            default: state <= S_IDLE;
          endcase
        end
      end
    end
  end
endmodule
