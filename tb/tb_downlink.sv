// tb_downlink: runs the receive path with random ADC samples, random filter
// and combiner banks and a schedule of requests (REQ, REQ_UC, REQ_UT,
// back-to-back requests, a SEND request that must produce nothing, and
// gaps). Every word on the stream outputs is compared in order with an
// integer model: the decimated FIR output of each antenna rail (taken over
// the ADC samples up to one cycle after the frame tick), combined with the
// 8x4 complex weights or sent uncombined in two words, preceded by the RES
// header. The latency from frame tick to the first data word is checked too.
module tb_downlink;
  import digif_pkg::*;
  localparam int ANT = 8, ST = 4, XW = 6, NCH = 16;
  localparam int NCYC = 400;
  logic clk = 0, rst_n;
  logic [2*ANT*XW-1:0] adc_in;
  logic frame_tick, act_valid, start;
  req_t act;
  logic dlf_wr_en, cmb_wr_en;
  logic [7:0] dlf_wr_bank, cmb_wr_bank;
  logic [2:0] cmb_wr_row;
  logic [63:0] dlf_wr_data, cmb_wr_data;
  logic st_hdr_valid, st_valid;
  logic [63:0] st_hdr, st_data;
  int checks = 0, failures = 0;

  downlink dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [63:0] dlf_bank [4];
  logic [511:0] cmb_bank [4];
  logic [2*ANT*XW-1:0] adc_hist [NCYC];
  logic [63:0] expq [$];
  int exp_first_cycle [$];    // cycle of each header's frame tick
  int cyc = 0;

  function automatic int fl(input int v, input int sh);
    return (v >= 0) ? v / (1 << sh) : -((-v + (1 << sh) - 1) / (1 << sh));
  endfunction
  function automatic int sat(input int v, input int bits);
    int hi = (1 << (bits - 1)) - 1;
    return v > hi ? hi : (v < -hi - 1 ? -hi - 1 : v);
  endfunction

  // decimated filter output of all rails for the frame tick in cycle t
  function automatic logic [NCH*XW-1:0] filt(input int t, input logic [63:0] c);
    logic [NCH*XW-1:0] r;
    for (int ch = 0; ch < NCH; ch++) begin
      int acc = 0;
      for (int k = 0; k < DLF_NUM; k++)
        acc += int'(signed'(adc_hist[t + 1 - k][ch*XW +: XW])) * int'(signed'(c[k*4 +: 4]));
      r[ch*XW +: XW] = XW'(sat(fl(acc, 4), XW));
    end
    return r;
  endfunction

  function automatic logic [63:0] comb(input logic [NCH*XW-1:0] d, input logic [511:0] w);
    logic [63:0] r;
    for (int s = 0; s < ST; s++) begin
      int sr = 0, si = 0;
      for (int a = 0; a < ANT; a++) begin
        int xr, xi, wr, wi;
        xr = int'(signed'(d[(2*a)*XW +: XW]));
        xi = int'(signed'(d[(2*a+1)*XW +: XW]));
        wr = int'(w[(2*(s*ANT+a))*8 +: 8]);
        wi = int'(w[(2*(s*ANT+a)+1)*8 +: 8]);
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

  // request schedule: {start period, kind, length, filter bank, comb bank}
  typedef struct { int p0; pkt_t kind; int ls; int fb; int cb; } sched_t;
  sched_t sched [6] = '{
    '{20, PK_REQ,      6, 0, 1},
    '{26, PK_REQ_UT,   4, 1, 2},     // directly after the first
    '{35, PK_REQ_UC,   5, 2, 0},
    '{45, PK_REQ_SEND, 4, 3, 3},     // uplink: no receive data
    '{55, PK_REQ,      3, 3, 3},
    '{62, PK_REQ_UC,   2, 1, 0}
  };

  int nhdr = 0, ndata = 0, lat_seen = 0;
  // output monitor
  always @(posedge clk) if (rst_n) begin
    if (st_hdr_valid) begin
      nhdr++;
      chk(expq.size() != 0 && st_hdr == expq[0], $sformatf("header word %h exp %h", st_hdr, expq.size() ? expq[0] : 0));
      if (expq.size()) void'(expq.pop_front());
      if (exp_first_cycle.size()) begin
        chk(cyc == exp_first_cycle[0] + 6, $sformatf("first word %0d cycles after the frame tick", cyc - exp_first_cycle[0]));
        void'(exp_first_cycle.pop_front());
        lat_seen++;
      end
    end
    if (st_valid) begin
      ndata++;
      chk(expq.size() != 0 && st_data == expq[0], $sformatf("data word %h exp %h at %0t", st_data, expq.size() ? expq[0] : 0, $time));
      if (expq.size()) void'(expq.pop_front());
    end
  end

  initial begin
    int total_exp = 0;
    rst_n = 0; adc_in = '0; frame_tick = 0; act_valid = 0; act = '0; start = 0;
    dlf_wr_en = 0; cmb_wr_en = 0; dlf_wr_bank = 0; cmb_wr_bank = 0; cmb_wr_row = 0;
    dlf_wr_data = 0; cmb_wr_data = 0;
    for (int i = 0; i < NCYC; i++) adc_hist[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // load four filter banks and four combiner banks
    for (int b = 0; b < 4; b++) begin
      dlf_bank[b] = {$urandom, $urandom};
      dlf_wr_en = 1; dlf_wr_bank = 8'(b); dlf_wr_data = dlf_bank[b];
      @(posedge clk); #1;
      dlf_wr_en = 0;
      for (int r = 0; r < 8; r++) begin
        cmb_bank[b][r*64 +: 64] = {$urandom, $urandom};
        if (b == 0) cmb_bank[b][r*64 +: 64] = 64'h8000800080008000 >> (r % 2);  // real weights only
        cmb_wr_en = 1; cmb_wr_bank = 8'(b); cmb_wr_row = 3'(r); cmb_wr_data = cmb_bank[b][r*64 +: 64];
        @(posedge clk); #1;
      end
      cmb_wr_en = 0;
    end
    // run: cyc counts cycles from here; frame ticks in even cycles
    for (cyc = 0; cyc < NCYC - 2; cyc++) begin
      int p;
      adc_in = {$urandom, $urandom, $urandom};
      adc_hist[cyc] = adc_in;
      frame_tick = (cyc % 2 == 0);
      p = cyc / 2;
      if (frame_tick) begin
        act_valid = 0; start = 0; act = '0;
        foreach (sched[i])
          if (p >= sched[i].p0 && p < sched[i].p0 + sched[i].ls) begin
            act_valid = 1;
            start = (p == sched[i].p0);
            act = '{kind: sched[i].kind, id: 16'(100 + i), fn: 16'(7 + i), faddr: 8'(sched[i].fb),
                    daddr: 8'(sched[i].cb), ts: 32'(sched[i].p0), ls: 32'(sched[i].ls)};
          end
      end
      @(posedge clk); #1;
      // the expected words of a frame tick are known once the ADC sample of
      // the following cycle is in the history
      if (cyc % 2 == 1 && act_valid && act.kind != PK_REQ_SEND) begin
        logic [NCH*XW-1:0] d;
        automatic int t = cyc - 1;
        d = filt(t, dlf_bank[act.faddr]);
        if (start) begin
          automatic event_t h = '{kind: PK_RES, id: act.id, fn: act.fn, err: ERR_NONE,
                        ls: act.kind == PK_REQ_UC ? act.ls * 2 : act.ls};
          expq.push_back(event_word(h));
          exp_first_cycle.push_back(t);
          total_exp++;
        end
        if (act.kind == PK_REQ_UC) begin
          expq.push_back(ucw(d, 0)); expq.push_back(ucw(d, 1)); total_exp += 2;
        end else begin
          expq.push_back(comb(d, cmb_bank[act.daddr])); total_exp++;
        end
      end
    end
    frame_tick = 0; act_valid = 0;
    repeat (10) @(posedge clk);
    #1;
    chk(expq.size() == 0, $sformatf("all expected words seen (%0d left)", expq.size()));
    chk(nhdr == 5, "five receive headers");
    chk(ndata == 6 + 4 + 10 + 3 + 4, "receive data word count");
    chk(lat_seen == 5, "latency checked for each request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
