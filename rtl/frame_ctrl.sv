// frame_ctrl: holds the data request that is active in the current sample
// period.
//
// The request buffer offers its next request (stg_valid/stg, start time
// already within reach). On every tick the frame controller compares the
// sample time ti with the active request and with the offered one:
//  - the active request stays active while ti - ts < ls, i.e. for the ls
//    sample periods ts .. ts+ls-1, and is dropped after that;
//  - an offered request whose ts equals ti is taken (take pulses) and becomes
//    the active one, with a one-cycle start pulse; if another request is
//    still active at that moment the new one is taken but rejected with
//    FAIL(OVERLAP), since only one request may be active at a time;
//  - an offered request whose ts already lies before ti is taken and
//    rejected with FAIL(TIMING_OUT_OF_BOUND).
// The outputs act_valid/act are registers, so the active request shows on
// the cycle after the tick that selected it. The DIG-IF drives tick one
// cycle after the time counter's tick, so that ti already holds the new
// sample period. Synchronous active-low reset clears the active request.
//
// The rule that an overlap fails, and the error codes, follow the DIG-IF
// specification; taking the late request out of the buffer with a FAIL
// response instead of leaving it is this design's choice.
module frame_ctrl
  import digif_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick,
  input  logic [TS_W-1:0] ti,
  input  logic            stg_valid,
  input  req_t            stg,
  output logic            take,
  output logic            act_valid,
  output req_t            act,
  output logic            start,
  output logic            ev_valid,
  output event_t          ev
);
  logic cont, due, late;
  logic [TS_W-1:0] since;

  always_comb begin
    since = ti - act.ts;
    cont  = act_valid && (since < act.ls);
    due   = tick && stg_valid && (stg.ts == ti);
    late  = tick && stg_valid && signed'(stg.ts - ti) < 0;
    take  = due || late;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      act_valid <= 1'b0;
      act       <= '0;
      start     <= 1'b0;
      ev_valid  <= 1'b0;
      ev        <= '0;
    end else begin
      start    <= 1'b0;
      ev_valid <= 1'b0;
      if (tick) begin
        if (due && !cont) begin
          act_valid <= 1'b1;
          act       <= stg;
          start     <= 1'b1;
        end else if (!cont) begin
          act_valid <= 1'b0;
        end
        if (due && cont) begin
          ev_valid <= 1'b1;
          ev       <= '{kind: PK_FAIL, id: stg.id, fn: stg.fn, err: ERR_OVERLAP, ls: '0};
        end else if (late) begin
          ev_valid <= 1'b1;
          ev       <= '{kind: PK_FAIL, id: stg.id, fn: stg.fn, err: ERR_TIMING_OUT_OF_BOUND, ls: '0};
        end
      end
    end
  end
endmodule
