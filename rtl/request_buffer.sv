// request_buffer: stores up to N data requests, which may arrive in any
// order, and hands them to the frame controller in time order.
//
// Parts (each one always_ff/always_comb section below):
//  - request memory: per entry, the start time ts, the id and the frame
//    number sit in registers, because both searches read them every cycle;
//    the rest of the request (type, bank addresses, ls) sits in a simple
//    dual-port RAM, with one occupied bit per entry. The RAM is read one
//    entry ahead of the sample time search, so the whole request of the
//    entry being searched is at hand; an entry written into the RAM in the
//    cycle it was read ahead is skipped for that pass;
//  - occupy control: a binary_index_search finds the lowest free entry in
//    one cycle; a new request is written there and answered with ACK, or
//    with NACK(REQ_MEM_FULL) when no entry is free, or with
//    NACK(TIMING_OUT_OF_BOUND) when its start time ts already lies before ti;
//  - untimed control: an untimed request (REQ_UT) gets a start time after
//    every request already queued: ts = max(end of the latest queued
//    request, ti + WINDOW);
//  - sample time control: a linear search reads one entry per clock cycle.
//    An entry whose ts is less than WINDOW sample periods away is moved to
//    the output register stg, where it waits for the frame controller to
//    take it. If stg is already full and the entry read starts earlier than
//    the one in stg, the two are swapped, so that after one pass of N cycles
//    stg holds the earliest request in reach;
//  - id control: a cancel request starts a second linear search, one entry
//    per cycle, for the id; the staged request is checked on every cycle of
//    the search. A hit frees the entry and answers ACK; after N cycles
//    without a hit the answer is FAIL(ID_NOT_FOUND). cancel_ready is low
//    while a search runs. The id search starts half the memory away from
//    the sample time search and moves at the same speed, so neither ever
//    blocks the other. A request that the sample time search moves into
//    stg is found there, and one it moves out of stg lands behind the
//    sample time search, where the id search reaches it first.
//
// Timing: a request offered with ins_valid is stored, and its answer given
// on ins_ev, at the next clock edge. Requests whose start times are at least
// N clock cycles apart always reach stg before they are due. Answers are
// registered one-cycle pulses. Synchronous active-low reset empties the
// buffer. The ls field of ins_ev and cxl_ev (used by FETCH answers only)
// and a few bits of their kind and err codes never change here; the shared
// event_t type keeps them so the packer takes every answer the same way.
//
// The search scheme (one entry per cycle for both searches, 64 entries, a
// 64-cycle reach, a 64-cycle cancel timeout) follows the original design.
// Keeping the start times in registers and the requests in a RAM follows
// the original design too. The swap that keeps the earliest request staged
// (which, like an insert, writes the RAM; an insert wins and the swap waits
// for the next pass), the read-ahead, and the ACK/NACK choice for each
// outcome are this design's own.
module request_buffer
  import digif_pkg::*;
#(
  parameter int unsigned N      = REQ_MEM,
  parameter int unsigned WINDOW = REQ_MEM,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TS_W-1:0] ti,
  // insertion
  input  logic            ins_valid,
  input  req_t            ins,
  output logic            ins_ev_valid,
  output event_t          ins_ev,
  // cancellation
  input  logic            cancel_valid,
  input  logic [ID_W-1:0] cancel_id,
  output logic            cancel_ready,
  output logic            cxl_ev_valid,
  output event_t          cxl_ev,
  // output to the frame controller
  input  logic            take,
  output logic            stg_valid,
  output req_t            stg,
  output logic [N-1:0]    occupied
);
  // request body kept in the RAM
  typedef struct packed {
    pkt_t               kind;
    logic [BANK_AW-1:0] faddr;
    logic [BANK_AW-1:0] daddr;
    logic [LS_W-1:0]    ls;
  } body_t;
  localparam int unsigned BW = $bits(body_t);

  logic [TS_W-1:0] ts_r [N];
  logic [ID_W-1:0] id_r [N];
  logic [FN_W-1:0] fn_r [N];
  logic            ram_we, ins_wr, ahead_stale;
  logic [AW-1:0]   ram_waddr;
  body_t           ram_din, body_q;

  function automatic body_t body_of(input req_t r);
    return '{kind: r.kind, faddr: r.faddr, daddr: r.daddr, ls: r.ls};
  endfunction
  logic [AW-1:0]   free_idx;
  logic            not_full;
  logic [TS_W-1:0] last_end;    // end (ts+ls) of the latest queued request

  binary_index_search #(.N(N)) u_free (
    .occupied(occupied), .index(free_idx), .not_full(not_full)
  );

  // ---------------------------------------------------------------- insert
  req_t ins_r;
  logic ins_late;
  always_comb begin
    ins_r = ins;
    if (ins.kind == PK_REQ_UT) begin
      ins_r.ts = (signed'(last_end - (ti + TS_W'(WINDOW))) > 0) ? last_end
                                                                 : ti + TS_W'(WINDOW);
    end
    ins_late = (ins.kind != PK_REQ_UT) && (signed'(ins.ts - ti) < 0);
  end

  // ---------------------------------------------------------------- searches
  logic [AW-1:0] sidx, cidx;
  logic          cbusy;
  logic [ID_W-1:0] cid;
  logic [AW:0]   ccount;
  req_t          se;
  logic          s_occ, c_hit_mem, c_hit_stg, s_stage, s_swap;

  always_comb begin
    se        = '{kind: body_q.kind, id: id_r[sidx], fn: fn_r[sidx], faddr: body_q.faddr,
                  daddr: body_q.daddr, ts: ts_r[sidx], ls: body_q.ls};
    c_hit_stg = cbusy && stg_valid && !take && (stg.id == cid);
    c_hit_mem = cbusy && !c_hit_stg && occupied[cidx] && (id_r[cidx] == cid);
    s_occ     = occupied[sidx] && !(cbusy && cidx == sidx) && !ahead_stale;
    s_stage   = s_occ && (!stg_valid || take) &&
                (signed'(se.ts - ti) < signed'(TS_W'(WINDOW)));
    s_swap    = s_occ && stg_valid && !take && !c_hit_stg && !ins_wr &&
                (signed'(se.ts - stg.ts) < 0);
    cancel_ready = !cbusy;
  end

  // RAM write port: an insert, or the staged request swapped back
  always_comb begin
    ins_wr    = ins_valid && !ins_late && not_full;
    ram_we    = ins_wr || s_swap;
    ram_waddr = ins_wr ? free_idx : sidx;
    ram_din   = ins_wr ? body_of(ins_r) : body_of(stg);
  end

  sdp_ram #(.ADDR_W(AW), .DATA_W(BW)) u_mem (
    .clk(clk), .en(1'b1), .wr_en(ram_we), .wr_addr(ram_waddr), .din(ram_din),
    .rd_addr(sidx + 1'b1), .rd_dout(body_q)
  );

  // the entry read ahead was overwritten in the same cycle: its data is old
  always_ff @(posedge clk) begin
    if (!rst_n) ahead_stale <= 1'b0;
    else        ahead_stale <= ram_we && (ram_waddr == sidx + 1'b1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      occupied     <= '0;
      stg_valid    <= 1'b0;
      stg          <= '0;
      sidx         <= '0;
      cidx         <= '0;
      cbusy        <= 1'b0;
      cid          <= '0;
      ccount       <= '0;
      last_end     <= '0;
      ins_ev_valid <= 1'b0;
      ins_ev       <= '0;
      cxl_ev_valid <= 1'b0;
      cxl_ev       <= '0;
    end else begin
      ins_ev_valid <= 1'b0;
      cxl_ev_valid <= 1'b0;

      // insertion
      if (ins_valid) begin
        ins_ev_valid <= 1'b1;
        ins_ev       <= '{kind: PK_ACK, id: ins.id, fn: ins.fn, err: ERR_NONE, ls: '0};
        if (ins_late) begin
          ins_ev.kind <= PK_NACK;
          ins_ev.err  <= ERR_TIMING_OUT_OF_BOUND;
        end else if (!not_full) begin
          ins_ev.kind <= PK_NACK;
          ins_ev.err  <= ERR_REQ_MEM_FULL;
        end else begin
          ts_r[free_idx]     <= ins_r.ts;
          id_r[free_idx]     <= ins_r.id;
          fn_r[free_idx]     <= ins_r.fn;
          occupied[free_idx] <= 1'b1;
          if (signed'(ins_r.ts + ins_r.ls - last_end) > 0)
            last_end <= ins_r.ts + ins_r.ls;
        end
      end

      // sample time search
      sidx <= sidx + 1'b1;
      if (take) stg_valid <= 1'b0;
      if (s_stage) begin
        stg            <= se;
        stg_valid      <= 1'b1;
        occupied[sidx] <= 1'b0;
      end else if (s_swap) begin
        stg        <= se;
        ts_r[sidx] <= stg.ts;
        id_r[sidx] <= stg.id;
        fn_r[sidx] <= stg.fn;
      end

      // id search
      if (cbusy) begin
        cidx   <= cidx + 1'b1;
        ccount <= ccount + 1'b1;
        if (c_hit_stg || c_hit_mem) begin
          cbusy        <= 1'b0;
          cxl_ev_valid <= 1'b1;
          cxl_ev       <= '{kind: PK_ACK, id: cid,
                            fn: c_hit_stg ? stg.fn : fn_r[cidx], err: ERR_NONE, ls: '0};
          if (c_hit_stg) stg_valid <= 1'b0;
          else           occupied[cidx] <= 1'b0;
        end else if (ccount == (AW+1)'(N-1)) begin
          cbusy        <= 1'b0;
          cxl_ev_valid <= 1'b1;
          cxl_ev       <= '{kind: PK_FAIL, id: cid, fn: '0, err: ERR_ID_NOT_FOUND, ls: '0};
        end
      end else if (cancel_valid) begin
        // start half the memory away from the sample time search, so the
        // two searches never read the same entry in one cycle
        cbusy  <= 1'b1;
        cidx   <= sidx + AW'(N/2) + 1'b1;
        cid    <= cancel_id;
        ccount <= '0;
      end
    end
  end
endmodule
