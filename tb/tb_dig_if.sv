// tb_dig_if: end-to-end test of the DIG-IF alone, driven through its
// baseband word ports with constant ADC inputs.
//
// Scenario (sample periods; the request table starts at OFF):
//  1. load 7 downlink filter, 7 combiner, 3 uplink filter and 3 splitter
//     banks with random coefficients;
//  2. send the 13 requests of the example request table (ids 1-5, 7-14;
//     receive, uncombined and send requests, not in start-time order),
//     cancel id 3, cancel an unknown id, send a request that is already
//     late;
//  3. answer every FETCH with ls random transmit words;
//  4. afterwards: an untimed request, two overlapping requests, a time
//     shift (SET_TI) followed by a request in the new time base, and a
//     memory-full test (64 far-future requests, a 65th, then 64 cancels).
// Every response is checked (type, id, fn, error, nb, every data word
// against the filter/combiner model, start time), every DAC word against
// the filter/splitter model, and each mechanism is counted.
module tb_dig_if;
  import digif_pkg::*;
  localparam int OFF = 200, NCH = 16, XW = 6;
  logic clk = 0, rst_n;
  logic [2*ANT_NUM*SAMPLE_W-1:0] adc_in;
  logic bb_in_valid, bb_in_ready, bb_out_valid, dac_valid, busy, overflow;
  logic [63:0] bb_in_data, bb_out_data;
  logic [2*ANT_NUM*TX_W-1:0] dac_data;
  logic [31:0] ti;
  int checks = 0, failures = 0;

  dig_if dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- models
  function automatic int fl(input int v, input int sh);
    return (v >= 0) ? v / (1 << sh) : -((-v + (1 << sh) - 1) / (1 << sh));
  endfunction
  function automatic int sat(input int v, input int bits);
    int hi;
    hi = (1 << (bits - 1)) - 1;
    return v > hi ? hi : (v < -hi - 1 ? -hi - 1 : v);
  endfunction

  logic [63:0]  dlf [256];
  logic [511:0] cmb [256];
  logic [63:0]  ulf [256];
  logic [127:0] spl [256];

  // steady-state filter output of all rails for a constant input
  function automatic logic [NCH*XW-1:0] filt(input logic [63:0] c);
    logic [NCH*XW-1:0] r;
    for (int ch = 0; ch < NCH; ch++) begin
      int s;
      s = 0;
      for (int k = 0; k < DLF_NUM; k++) s += int'(signed'(c[k*4 +: 4]));
      r[ch*XW +: XW] = XW'(sat(fl(int'(signed'(adc_in[ch*XW +: XW])) * s, 4), XW));
    end
    return r;
  endfunction
  function automatic logic [63:0] comb(input logic [NCH*XW-1:0] d, input logic [511:0] w);
    logic [63:0] r;
    for (int s = 0; s < 4; s++) begin
      int sr, si;
      sr = 0; si = 0;
      for (int a = 0; a < 8; a++) begin
        int xr, xi, wr, wi;
        xr = int'(signed'(d[(2*a)*XW +: XW]));
        xi = int'(signed'(d[(2*a+1)*XW +: XW]));
        wr = int'(w[(2*(s*8+a))*8 +: 8]);
        wi = int'(w[(2*(s*8+a)+1)*8 +: 8]);
        sr += fl(xr*wr - xi*wi, 6);
        si += fl(xr*wi + xi*wr, 6);
      end
      r[(2*s)*8 +: 8]   = 8'(sat(fl(sr, 3), 8));
      r[(2*s+1)*8 +: 8] = 8'(sat(fl(si, 3), 8));
    end
    return r;
  endfunction
  function automatic logic [63:0] ucw(input logic [NCH*XW-1:0] d, input int half);
    logic [63:0] r;
    for (int k = 0; k < 8; k++) r[k*8 +: 8] = 8'(signed'(d[(8*half+k)*XW +: XW]));
    return r;
  endfunction

  logic [11:0] txhist [$];
  function automatic logic [95:0] dac_model(input logic [63:0] c, input logic [127:0] w);
    int y [2];
    logic [95:0] r;
    for (int rail = 0; rail < 2; rail++) begin
      int acc;
      acc = 0;
      for (int k = 0; k < ULF_NUM && k < txhist.size(); k++)
        acc += int'(signed'(txhist[k][rail*XW +: XW])) * int'(signed'(c[k*4 +: 4]));
      y[rail] = sat(fl(acc, 4), 6);
    end
    for (int a = 0; a < 8; a++) begin
      int wr, wi;
      wr = int'(w[(2*a)*8 +: 8]); wi = int'(w[(2*a+1)*8 +: 8]);
      r[(2*a)*XW +: XW]   = XW'(sat(fl(y[0]*wr - y[1]*wi, 9), 6));
      r[(2*a+1)*XW +: XW] = XW'(sat(fl(y[0]*wi + y[1]*wr, 9), 6));
    end
    return r;
  endfunction

  // ---------------------------------------------------------------- requests
  typedef struct { int id; int fn; pkt_t kind; int fb; int db; int ts; int ls; } rq_t;
  rq_t reqs [int];           // by id: what was requested
  int  expect_res [int];     // id -> 1 if a RES is expected
  function automatic logic [63:0] w0(input pkt_t k, input int id, input int fn, input int fb, input int db);
    return {4'(k), 4'h0, 16'(id), 16'(fn), 8'h00, 8'(fb), 8'(db)};
  endfunction

  // ---------------------------------------------------------------- baseband port
  semaphore bb = new(1);
  task automatic put_word(input logic [63:0] w);
    bit r;
    bb_in_valid = 1; bb_in_data = w;
    do begin
      r = bb_in_ready;
      @(posedge clk); #1;
    end while (!r);
    bb_in_valid = 0;
  endtask
  task automatic send_req(input pkt_t k, input int id, input int fn, input int fb, input int db, input int ts, input int ls);
    reqs[id] = '{id: id, fn: fn, kind: k, fb: fb, db: db, ts: ts, ls: ls};
    bb.get(1);
    put_word(w0(k, id, fn, fb, db));
    put_word({32'(ts), 32'(ls)});
    bb.put(1);
  endtask
  task automatic send_cancel(input int id);
    bb.get(1); put_word({4'(PK_CANCEL_REQ), 4'h0, 16'(id), 40'h0}); bb.put(1);
  endtask
  task automatic load_bank(input pkt_t k, input int bank, input int rows, input logic [511:0] v);
    bb.get(1);
    put_word({4'(k), 52'h0, 8'(bank)});
    for (int r = 0; r < rows; r++) put_word(v[r*64 +: 64]);
    bb.put(1);
  endtask

  // ---------------------------------------------------------------- response monitor
  typedef struct { pkt_t kind; int id; int fn; int err; int ls; int ti; } resp_t;
  resp_t resps [$];
  int fetchq [$];
  int cur_id = -1, remaining = 0, word_i = 0;
  int res_words [int];
  int m_res = 0, m_res_uc = 0, m_res_ut = 0, m_data_ok = 0, m_ack = 0, m_fetch = 0,
      m_nack_late = 0, m_nack_full = 0, m_fail_overlap = 0, m_fail_notfound = 0,
      m_cancel_ack = 0, m_dac = 0, m_ti_shift = 0, m_coef = 0, m_fail_late = 0;
  logic [95:0] dacq [$];

  always @(posedge clk) if (rst_n) begin
    if (bb_out_valid) begin
      if (remaining > 0) begin
        rq_t q;
        logic [NCH*XW-1:0] d;
        logic [63:0] e;
        q = reqs[cur_id];
        d = filt(dlf[q.fb]);
        if (q.kind == PK_REQ_UC) e = ucw(d, word_i % 2);
        else                     e = comb(d, cmb[q.db]);
        chk(bb_out_data == e, $sformatf("id %0d data word %0d: %h exp %h", cur_id, word_i, bb_out_data, e));
        if (bb_out_data == e) m_data_ok++;
        word_i++;
        remaining--;
        res_words[cur_id] = word_i;
      end else begin
        resp_t r;
        r = '{kind: pkt_t'(bb_out_data[63:60]), id: int'(bb_out_data[55:40]), fn: int'(bb_out_data[39:24]),
              err: int'(bb_out_data[58:56]), ls: int'(bb_out_data[23:0]), ti: int'(ti)};
        resps.push_back(r);
        if (r.kind == PK_RES) begin
          cur_id = r.id; remaining = r.ls; word_i = 0;
          m_res++;
          chk(reqs.exists(r.id), $sformatf("RES for known id %0d", r.id));
          if (reqs.exists(r.id)) begin
            rq_t q;
            q = reqs[r.id];
            chk(r.fn == q.fn, "RES fn");
            chk(r.ls == (q.kind == PK_REQ_UC ? 2 * q.ls : q.ls), $sformatf("RES nb %0d for id %0d", r.ls, r.id));
            if (q.kind == PK_REQ_UC) m_res_uc++;
            if (q.kind == PK_REQ_UT) m_res_ut++;
            else chk(r.ti >= q.ts && r.ti <= q.ts + 6, $sformatf("RES of id %0d at ti %0d, ts %0d", r.id, r.ti, q.ts));
          end
        end
        if (r.kind == PK_FETCH) begin
          m_fetch++;
          chk(reqs.exists(r.id) && reqs[r.id].ls == r.ls && reqs[r.id].fn == r.fn, "FETCH fields");
          chk(reqs.exists(r.id) && r.ti >= reqs[r.id].ts && r.ti <= reqs[r.id].ts + 4, "FETCH time");
          fetchq.push_back(r.id);
        end
        if (r.kind == PK_ACK) m_ack++;
        if (r.kind == PK_NACK && r.err == ERR_TIMING_OUT_OF_BOUND) m_nack_late++;
        if (r.kind == PK_NACK && r.err == ERR_REQ_MEM_FULL) m_nack_full++;
        if (r.kind == PK_FAIL && r.err == ERR_OVERLAP) m_fail_overlap++;
        if (r.kind == PK_FAIL && r.err == ERR_ID_NOT_FOUND) m_fail_notfound++;
        if (r.kind == PK_FAIL && r.err == ERR_TIMING_OUT_OF_BOUND) m_fail_late++;
      end
    end
    if (dac_valid) begin
      m_dac++;
      chk(dacq.size() != 0 && dac_data == dacq[0], $sformatf("DAC word %h exp %h", dac_data, dacq.size() ? dacq[0] : 0));
      if (dacq.size()) void'(dacq.pop_front());
    end
  end

  function automatic int count(input pkt_t k, input int id, input int err);
    int n;
    n = 0;
    foreach (resps[i]) if (resps[i].kind == k && resps[i].id == id && resps[i].err == err) n++;
    return n;
  endfunction

  // time shifts seen on ti
  logic [31:0] ti_prev = 0;
  always @(posedge clk) if (rst_n) begin
    if (ti < ti_prev) m_ti_shift++;
    ti_prev <= ti;
  end

  // ---------------------------------------------------------------- FETCH server
  initial begin
    forever begin
      @(posedge clk); #1;
      if (fetchq.size() != 0) begin
        rq_t q;
        q = reqs[fetchq.pop_front()];
        bb.get(1);
        for (int i = 0; i < q.ls; i++) begin
          logic [11:0] w;
          w = 12'($urandom);
          txhist.push_front(w);
          dacq.push_back(dac_model(ulf[q.fb], spl[q.db]));
          put_word({52'h0, w});
        end
        bb.put(1);
      end
    end
  end

  // ---------------------------------------------------------------- scenario
  task automatic wait_ti(input int t);
    while (int'(ti) < t) @(posedge clk);
    #1;
  endtask

  initial begin
    int dlb [7] = '{0, 29, 61, 55, 32, 62, 21};
    int cbb [7] = '{0, 17, 3, 46, 11, 37, 28};
    int ulb [3] = '{6, 5, 7};
    int spb [3] = '{2, 3, 1};
    rst_n = 0; bb_in_valid = 0; bb_in_data = 0;
    adc_in = {$urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // 1. coefficient banks
    foreach (dlb[i]) begin
      dlf[dlb[i]] = {28'h0, $urandom, 4'($urandom)};
      load_bank(PK_SET_DL_FILTER, dlb[i], 1, 512'(dlf[dlb[i]]));
    end
    foreach (cbb[i]) begin
      for (int r = 0; r < 16; r++) cmb[cbb[i]][r*32 +: 32] = $urandom;
      load_bank(PK_SET_COMBINER, cbb[i], 8, cmb[cbb[i]]);
    end
    foreach (ulb[i]) begin
      ulf[ulb[i]] = {24'h0, $urandom, 8'($urandom)};
      load_bank(PK_SET_UL_FILTER, ulb[i], 1, 512'(ulf[ulb[i]]));
    end
    foreach (spb[i]) begin
      spl[spb[i]] = {$urandom, $urandom, $urandom, $urandom};
      load_bank(PK_SET_SPLITTER, spb[i], 2, 512'(spl[spb[i]]));
    end
    m_coef = 1;
    $display("banks loaded at ti %0d", ti);
    // 2. the request table
    send_req(PK_REQ,      1, 1,  0,  0, OFF + 28,   74);
    send_req(PK_REQ_UC,   2, 1, 29, 17, OFF + 103,  196);
    send_req(PK_REQ_UC,   3, 1, 29, 17, OFF + 302,  194);
    send_req(PK_REQ,      4, 1, 61,  3, OFF + 497,  123);
    send_req(PK_REQ,      5, 1, 55, 46, OFF + 621,  171);
    send_req(PK_REQ_SEND, 9, 1,  6,  2, OFF + 1196, 169);
    send_req(PK_REQ_SEND, 7, 2,  5,  3, OFF + 880,  114);
    send_req(PK_REQ_SEND, 8, 2,  5,  3, OFF + 998,  188);
    send_req(PK_REQ_SEND, 10, 2, 7,  1, OFF + 1366, 194);
    send_req(PK_REQ,      11, 2, 32, 11, OFF + 1565, 149);
    send_req(PK_REQ,      12, 2, 32, 11, OFF + 1718, 56);
    send_req(PK_REQ,      13, 2, 62, 37, OFF + 1782, 178);
    send_req(PK_REQ,      14, 2, 21, 28, OFF + 1968, 191);
    $display("requests sent at ti %0d", ti);
    send_cancel(3);
    send_cancel(99);
    send_req(PK_REQ, 20, 3, 0, 0, 5, 10);            // already late
    wait_ti(OFF + 2200);
    chk(count(PK_ACK, 3, 0) == 2, "request 3 and its cancellation acknowledged");
    chk(count(PK_RES, 3, 0) == 0, "no data for the cancelled request");
    chk(count(PK_FAIL, 99, ERR_ID_NOT_FOUND) == 1, "unknown id not found");
    chk(count(PK_NACK, 20, ERR_TIMING_OUT_OF_BOUND) == 1, "late request refused");
    foreach (reqs[id]) if (id <= 14 && id != 3) begin
      chk(count(PK_ACK, id, 0) == 1, $sformatf("ACK for id %0d", id));
      if (reqs[id].kind == PK_REQ_SEND) chk(count(PK_FETCH, id, 0) == 1, $sformatf("FETCH for id %0d", id));
      else begin
        chk(count(PK_RES, id, 0) == 1, $sformatf("RES for id %0d", id));
        chk(res_words.exists(id) && res_words[id] == (reqs[id].kind == PK_REQ_UC ? 2 : 1) * reqs[id].ls,
            $sformatf("data words of id %0d", id));
      end
    end
    // 4a. untimed request: starts at least 64 periods ahead
    send_req(PK_REQ_UT, 30, 4, 21, 28, 0, 12);
    wait_ti(int'(ti) + 80);
    chk(count(PK_RES, 30, 0) == 1 && res_words[30] == 12, "untimed request served");
    // 4b. overlap: the second request starts inside the first
    begin
      int t0;
      t0 = int'(ti);
      send_req(PK_REQ, 31, 4, 0, 0, t0 + 80, 40);
      send_req(PK_REQ, 32, 4, 0, 0, t0 + 100, 10);
      wait_ti(t0 + 130);
      chk(count(PK_FAIL, 32, ERR_OVERLAP) == 1 && count(PK_RES, 32, 0) == 0, "overlapping request failed");
      chk(count(PK_RES, 31, 0) == 1, "first of the overlapping pair served");
    end
    // 4c. time shift: ti wraps to 0 when it reaches tis
    begin
      int t0;
      t0 = int'(ti);
      bb.get(1); put_word({4'(PK_SET_TI), 28'h0, 32'(t0 + 20)}); bb.put(1);
      wait (int'(ti) < t0);
      @(posedge clk); #1;
      chk(m_ti_shift == 1, "ti shifted once");
      send_req(PK_REQ, 33, 5, 29, 17, 100, 8);
      wait_ti(120);
      chk(count(PK_RES, 33, 0) == 1 && res_words[33] == 8, "request in the shifted time base");
    end
    // 4d. memory full
    for (int i = 0; i < REQ_MEM; i++) send_req(PK_REQ, 100 + i, 6, 0, 0, 100000 + 100 * i, 10);
    send_req(PK_REQ, 200, 6, 0, 0, 200000, 10);
    for (int i = 0; i < REQ_MEM; i++) send_cancel(100 + i);
    repeat (200) @(posedge clk);
    #1;
    chk(count(PK_NACK, 200, ERR_REQ_MEM_FULL) == 1, "65th request refused");
    for (int i = 0; i < REQ_MEM; i++) begin
      chk(count(PK_ACK, 100 + i, 0) == 2, $sformatf("request %0d stored and cancelled", 100 + i));
      if (count(PK_ACK, 100 + i, 0) == 2) m_cancel_ack++;
    end
    send_req(PK_REQ, 201, 6, 0, 0, int'(ti) + 70, 5);
    wait_ti(int'(ti) + 90);
    chk(count(PK_RES, 201, 0) == 1, "buffer usable after the cancellations");
    repeat (10) @(posedge clk);
    #1;
    chk(dacq.size() == 0, "every transmit word reached the DACs");
    chk(!overflow, "no output FIFO overflow");
    // mechanisms
    chk(m_coef > 0,            "mechanism: coefficient loading");
    chk(m_ack > 0,             "mechanism: ACK");
    chk(m_res >= 12,           $sformatf("mechanism: RES (%0d)", m_res));
    chk(m_data_ok > 1000,      $sformatf("mechanism: checked data words (%0d)", m_data_ok));
    chk(m_res_uc == 1,         "mechanism: uncombined receive");
    chk(m_res_ut == 1,         "mechanism: untimed receive");
    chk(m_fetch == 4,          "mechanism: FETCH");
    chk(m_dac == 169 + 114 + 188 + 194, $sformatf("mechanism: DAC words (%0d)", m_dac));
    chk(m_nack_late == 1,      "mechanism: NACK timing");
    chk(m_nack_full == 1,      "mechanism: NACK memory full");
    chk(m_fail_overlap == 1,   "mechanism: FAIL overlap");
    chk(m_fail_notfound == 1,  "mechanism: FAIL id not found");
    chk(m_cancel_ack == REQ_MEM, "mechanism: cancellation");
    chk(m_ti_shift == 1,       "mechanism: time shift");
    chk(m_fail_late == 0,      "no request staged too late");
    $display("mechanisms: res=%0d uc=%0d ut=%0d data=%0d fetch=%0d dac=%0d ack=%0d nack_late=%0d nack_full=%0d overlap=%0d notfound=%0d cancel=%0d shift=%0d",
             m_res, m_res_uc, m_res_ut, m_data_ok, m_fetch, m_dac, m_ack, m_nack_late, m_nack_full,
             m_fail_overlap, m_fail_notfound, m_cancel_ack, m_ti_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: ti %0d", ti);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
