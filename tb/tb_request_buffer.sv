// tb_request_buffer: stores the example request set (13 timed requests,
// inserted out of start-time order), cancels one of them and an unknown id,
// adds an untimed request, and plays the frame controller: on every tick
// (every second cycle) it takes the staged request when its start time
// equals ti. Checks: every answer (ACK, NACK, FAIL and its error), that
// each request is handed over exactly at its start time and in time order,
// that the cancelled one never appears, the untimed start time, the
// 64-cycle cancel timeout, a late request and a full memory. A second run
// keeps cancel searches going back to back while requests a little over one
// search pass ahead are inserted, and checks that each still starts on time
// and that a queued id is still found.
module tb_request_buffer;
  import digif_pkg::*;
  logic clk = 0, rst_n;
  logic [TS_W-1:0] ti;
  logic ins_valid, ins_ev_valid, cancel_valid, cancel_ready, cxl_ev_valid, take, stg_valid;
  req_t ins, stg;
  event_t ins_ev, cxl_ev;
  logic [ID_W-1:0] cancel_id;
  logic [63:0] occupied;
  int checks = 0, failures = 0;
  logic tick;

  request_buffer dut (.*);
  always #5 clk = ~clk;

  // example requests: id, fn, uc, send, filter addr, dist addr, ts, ls
  int tab [13][8] = '{
    '{1, 1, 0, 0, 0, 0, 28, 74},     '{2, 1, 1, 0, 29, 17, 103, 196},
    '{3, 1, 1, 0, 29, 17, 302, 194}, '{4, 1, 0, 0, 61, 3, 497, 123},
    '{5, 1, 0, 0, 55, 46, 621, 171}, '{9, 1, 0, 1, 6, 2, 1196, 169},
    '{7, 2, 0, 1, 5, 3, 880, 114},   '{8, 2, 0, 1, 5, 3, 998, 188},
    '{10, 2, 0, 1, 7, 1, 1366, 194}, '{11, 2, 0, 0, 32, 11, 1565, 149},
    '{12, 2, 0, 0, 32, 11, 1718, 56},'{13, 2, 0, 0, 62, 37, 1782, 178},
    '{14, 2, 0, 0, 21, 28, 1968, 191}};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t ti=%0d)", what, $time, ti); end
  endtask

  // time and the consumer (frame controller stand-in)
  logic [1:0] ph;
  bit run = 0;     // time stands still while the requests are loaded
  int taken_id [$];
  int taken_ts [$];
  always_ff @(posedge clk) begin
    if (!rst_n) begin ti <= 0; ph <= 0; end
    else begin
      ph <= ph + 1;
      if (ph[0] && run) ti <= ti + 1;
    end
  end
  assign tick = rst_n && ph[0] == 1'b0;
  assign take = tick && stg_valid && signed'(stg.ts - ti) <= 0;
  int missed = 0;
  always @(posedge clk) if (rst_n) begin
    if (take && stg.ts == ti) begin taken_id.push_back(int'(stg.id)); taken_ts.push_back(int'(stg.ts)); end
    if (tick && stg_valid && signed'(stg.ts - ti) < 0) missed++;
  end

  // answers
  event_t last_ins, last_cxl;
  int n_ins = 0, n_cxl = 0, cxl_time;
  always @(posedge clk) begin
    if (ins_ev_valid) begin last_ins = ins_ev; n_ins++; end
    if (cxl_ev_valid) begin last_cxl = cxl_ev; n_cxl++; cxl_time = $time; end
  end

  task automatic insert(input pkt_t k, input int id, input int fn, input int fa, input int da,
                        input int ts, input int ls);
    ins_valid = 1;
    ins = '{kind: k, id: ID_W'(id), fn: FN_W'(fn), faddr: BANK_AW'(fa), daddr: BANK_AW'(da),
            ts: TS_W'(ts), ls: LS_W'(ls)};
    @(posedge clk); #1;
    ins_valid = 0;
    @(posedge clk); #1;
  endtask

  task automatic cancel(input int id, output int cycles);
    int t0, n0;
    n0 = n_cxl;
    wait (cancel_ready);
    cancel_valid = 1; cancel_id = ID_W'(id);
    @(posedge clk); #1;
    cancel_valid = 0;
    t0 = $time;
    while (n_cxl == n0) @(posedge clk);
    #1 cycles = (cxl_time - t0) / 10;
  endtask

  initial begin
    int cyc, exp_ut, ti_late;
    int exp_ids [$];
    rst_n = 0; ins_valid = 0; cancel_valid = 0; ins = '0; cancel_id = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 13; i++) begin
      pkt_t k;
      k = tab[i][3] ? PK_REQ_SEND : (tab[i][2] ? PK_REQ_UC : PK_REQ);
      insert(k, tab[i][0], tab[i][1], tab[i][4], tab[i][5], tab[i][6], tab[i][7]);
      chk(last_ins.kind == PK_ACK && last_ins.id == ID_W'(tab[i][0]), "ACK of example request");
    end
    // cancel id 3 (stored) and id 42 (unknown)
    cancel(3, cyc);
    chk(last_cxl.kind == PK_ACK && last_cxl.id == 3, "cancel of id 3 acknowledged");
    cancel(42, cyc);
    chk(last_cxl.kind == PK_FAIL && last_cxl.err == ERR_ID_NOT_FOUND && last_cxl.id == 42,
        "unknown id fails with ID_NOT_FOUND");
    chk(cyc >= 63 && cyc <= 66, $sformatf("cancel search gives up after 64 cycles (%0d)", cyc));
    // untimed request: after the last queued request (1968+191)
    exp_ut = 1968 + 191;
    insert(PK_REQ_UT, 20, 3, 1, 1, 0, 10);
    chk(last_ins.kind == PK_ACK, "untimed request acknowledged");
    // late request
    ti_late = int'(ti) - 1;
    insert(PK_REQ, 21, 3, 0, 0, ti_late, 5);
    chk(last_ins.kind == PK_NACK && last_ins.err == ERR_TIMING_OUT_OF_BOUND, "late request refused");
    // run through all of them
    run = 1;
    while (ti < TS_W'(exp_ut + 20)) @(posedge clk);
    #1;
    for (int i = 0; i < 13; i++) if (tab[i][0] != 3) exp_ids.push_back(i);
    exp_ids.sort() with (tab[item][6]);
    chk(taken_id.size() == 13, $sformatf("13 requests handed over (%0d)", taken_id.size()));
    for (int i = 0; i < 12 && i < taken_id.size(); i++)
      chk(taken_id[i] == tab[exp_ids[i]][0] && taken_ts[i] == tab[exp_ids[i]][6],
          $sformatf("hand-over %0d: id %0d at %0d", i, taken_id[i], taken_ts[i]));
    if (taken_id.size() == 13)
      chk(taken_id[12] == 20 && taken_ts[12] == exp_ut, "untimed request placed after the queue");
    chk(missed == 0, "no request missed its start time");
    chk(occupied == '0, "buffer empty at the end");
    // cancel searches back to back while requests come due: staging must
    // keep up, and a queued id must still be found
    taken_id.delete(); taken_ts.delete(); exp_ids.delete();
    begin
      int exp_ts [$];
      fork
        begin
          int c;
          for (int j = 0; j < 12; j++) begin
            cancel(j == 6 ? 400 : 900 + j, c);
            if (j == 6)
              chk(last_cxl.kind == PK_ACK && last_cxl.id == 400, "queued id found during load");
            else
              chk(last_cxl.kind == PK_FAIL && last_cxl.err == ERR_ID_NOT_FOUND,
                  "unknown id fails during load");
          end
        end
        begin
          insert(PK_REQ, 400, 5, 0, 0, int'(ti) + 2000, 1);
          for (int j = 0; j < 8; j++) begin
            int t;
            t = int'(ti) + 40 + int'($urandom % 16);
            insert(PK_REQ, 300 + j, 5, 0, 0, t, 1);
            exp_ids.push_back(300 + j); exp_ts.push_back(t);
            repeat (96 + $urandom % 8) @(posedge clk);
            #1;
          end
        end
      join
      while (ti < TS_W'(exp_ts[7] + 5)) @(posedge clk);
      #1;
      chk(taken_id.size() == 8, $sformatf("8 requests handed over under cancel load (%0d)",
                                           taken_id.size()));
      for (int j = 0; j < 8 && j < taken_id.size(); j++)
        chk(taken_id[j] == exp_ids[j] && taken_ts[j] == exp_ts[j],
            $sformatf("under cancel load %0d: id %0d at %0d", j, taken_id[j], taken_ts[j]));
      chk(missed == 0, "no request missed its start time under cancel load");
      chk(occupied == '0, "buffer empty after the cancel load");
    end
    // fill the memory
    for (int i = 0; i < 64; i++) begin
      insert(PK_REQ, 100 + i, 4, 0, 0, int'(ti) + 100000 + 1000 * i, 10);
      chk(last_ins.kind == PK_ACK, $sformatf("fill %0d", i));
    end
    insert(PK_REQ, 200, 4, 0, 0, int'(ti) + 500000, 10);
    chk(last_ins.kind == PK_NACK && last_ins.err == ERR_REQ_MEM_FULL, "full memory refuses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
