// digif_pkg: constants, packet codes and record types shared by the DIG-IF
// blocks (the digital interface between eight antenna ADC/DAC channels and a
// 5G baseband).
//
// The numeric defaults follow the design constants of the DIG-IF specification:
// 8 antennas, 4 output streams, 6-bit samples, 10-bit products and 8-bit
// output streams in the combiner, 6-bit transmit samples, 16-bit id and frame
// number, 32-bit start time and length, a 64-entry request memory, 8-bit bank
// addresses and 64-bit coefficient RAM rows. The packet type codes, error
// codes and the 64-bit word layout of the baseband interface are this
// design's own choice; the specification names the packets but gives no
// encoding.
package digif_pkg;

  localparam int unsigned ANT_NUM     = 8;   // antenna_num
  localparam int unsigned STREAM_NUM  = 4;   // stream_num
  localparam int unsigned SAMPLE_W    = 6;   // sample_bitwidth (ADC, Q1.5)
  localparam int unsigned PRE_SUM_W   = 10;  // pre_sum_combiner_bitwidth
  localparam int unsigned POST_SUM_W  = 8;   // post_sum_combiner_bitwidth
  localparam int unsigned TX_W        = 6;   // transmit_bitwidth
  localparam int unsigned ID_W        = 16;  // id_bitwidth
  localparam int unsigned FN_W        = 16;  // fn_bitwidth
  localparam int unsigned TS_W        = 32;  // ts_bitwidth
  localparam int unsigned LS_W        = 32;  // ls_bitwidth
  localparam int unsigned REQ_MEM     = 64;  // req_mem_size
  localparam int unsigned BANK_AW     = 8;   // bank address bits
  localparam int unsigned RAM_W       = 64;  // coeff_ram_bitwidth
  localparam int unsigned BB_W        = 64;  // baseband interface word
  localparam int unsigned DECIM       = 2;   // downsample

  // Coefficient bank geometry: coeff_num * word_length * (1+complex) bits
  // per bank, stored in ceil(bits/64) RAM rows.
  localparam int unsigned DLF_NUM = 9,  DLF_WL = 4;                 // real
  localparam int unsigned ULF_NUM = 10, ULF_WL = 4;                 // real
  localparam int unsigned CMB_NUM = ANT_NUM*STREAM_NUM, CMB_WL = 8;  // complex
  localparam int unsigned SPL_NUM = ANT_NUM, SPL_WL = 8;            // complex
  localparam int unsigned DLF_ROWS = (DLF_NUM*DLF_WL + RAM_W-1)/RAM_W;
  localparam int unsigned ULF_ROWS = (ULF_NUM*ULF_WL + RAM_W-1)/RAM_W;
  localparam int unsigned CMB_ROWS = (CMB_NUM*CMB_WL*2 + RAM_W-1)/RAM_W;
  localparam int unsigned SPL_ROWS = (SPL_NUM*SPL_WL*2 + RAM_W-1)/RAM_W;

  // Packet type identifier, bits [63:60] of the first word of a packet.
  typedef enum logic [3:0] {
    PK_NONE          = 4'h0,
    PK_REQ           = 4'h1,
    PK_REQ_UC        = 4'h2,
    PK_REQ_UT        = 4'h3,
    PK_REQ_SEND      = 4'h4,
    PK_CANCEL_REQ    = 4'h5,
    PK_SET_TI        = 4'h6,
    PK_SET_DL_FILTER = 4'h7,
    PK_SET_UL_FILTER = 4'h8,
    PK_SET_COMBINER  = 4'h9,
    PK_SET_SPLITTER  = 4'hA,
    PK_RES           = 4'hB,
    PK_ACK           = 4'hC,
    PK_NACK          = 4'hD,
    PK_FAIL          = 4'hE,
    PK_FETCH         = 4'hF
  } pkt_t;

  typedef enum logic [2:0] {
    ERR_NONE              = 3'd0,
    ERR_OVERLAP           = 3'd1,
    ERR_TIMING_OUT_OF_BOUND = 3'd2,
    ERR_REQ_MEM_FULL      = 3'd3,
    ERR_ID_NOT_FOUND      = 3'd4
  } err_t;

  // A data request as held in the request memory.
  typedef struct packed {
    pkt_t              kind;   // PK_REQ, PK_REQ_UC, PK_REQ_UT or PK_REQ_SEND
    logic [ID_W-1:0]   id;
    logic [FN_W-1:0]   fn;
    logic [BANK_AW-1:0] faddr; // dfb (receive) or ufb (send)
    logic [BANK_AW-1:0] daddr; // cb (receive) or sb (send); unused for REQ_UC
    logic [TS_W-1:0]   ts;
    logic [LS_W-1:0]   ls;
  } req_t;

  // A single-word response: ACK, NACK, FAIL or FETCH.
  typedef struct packed {
    pkt_t            kind;
    logic [ID_W-1:0] id;
    logic [FN_W-1:0] fn;
    err_t            err;
    logic [LS_W-1:0] ls;    // FETCH only
  } event_t;

  // Baseband interface word of a one-word response and of the RES header:
  // [63:60] type, [58:56] error, [55:40] id, [39:24] fn, [23:0] ls or nb.
  function automatic logic [BB_W-1:0] event_word(input event_t e);
    event_word = '0;
    event_word[63:60] = e.kind;
    event_word[58:56] = e.err;
    event_word[55:40] = e.id;
    event_word[39:24] = e.fn;
    event_word[23:0]  = e.ls[23:0];
  endfunction

endpackage
