// tb_uplink: loads two uplink filter banks and two splitter banks, then
// starts three SEND requests (lengths 12 and 7 with different banks, and
// length 0). For each it checks the FETCH response (id, fn, ls),
// tx_active, that exactly ls transmit words are taken (words offered with
// random gaps, plus extra words after the end that must be ignored), and
// compares every DAC output with an integer model of the 10-tap filter
// over the accepted words followed by the complex splitter.
module tb_uplink;
  import digif_pkg::*;
  localparam int ANT = 8, XW = 6;
  logic clk = 0, rst_n;
  logic act_valid, start, tx_valid, tx_active, ev_valid;
  req_t act;
  logic [11:0] tx_data;
  event_t ev;
  logic ulf_wr_en, spl_wr_en;
  logic [7:0] ulf_wr_bank, spl_wr_bank;
  logic [0:0] spl_wr_row;
  logic [63:0] ulf_wr_data, spl_wr_data;
  logic dac_valid;
  logic [2*ANT*XW-1:0] dac_data;
  int checks = 0, failures = 0;

  uplink dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [63:0]  ulf_bank [2];
  logic [127:0] spl_bank [2];
  logic [11:0]  hist [$];            // accepted words, newest first
  logic [2*ANT*XW-1:0] expq [$];
  int cur_f, cur_s, nfetch = 0, ndac = 0;
  event_t last_ev;

  function automatic int fl(input int v, input int sh);
    return (v >= 0) ? v / (1 << sh) : -((-v + (1 << sh) - 1) / (1 << sh));
  endfunction
  function automatic int sat6(input int v);
    return v > 31 ? 31 : (v < -32 ? -32 : v);
  endfunction

  // expected DAC word after accepting one more transmit word
  function automatic logic [2*ANT*XW-1:0] model(input logic [63:0] c, input logic [127:0] w);
    int y [2];
    logic [2*ANT*XW-1:0] r;
    for (int rail = 0; rail < 2; rail++) begin
      int acc = 0;
      for (int k = 0; k < ULF_NUM && k < hist.size(); k++)
        acc += int'(signed'(hist[k][rail*XW +: XW])) * int'(signed'(c[k*4 +: 4]));
      y[rail] = sat6(fl(acc, 4));
    end
    for (int a = 0; a < ANT; a++) begin
      int wr = int'(w[(2*a)*8 +: 8]), wi = int'(w[(2*a+1)*8 +: 8]);
      r[(2*a)*XW +: XW]   = XW'(sat6(fl(y[0]*wr - y[1]*wi, 9)));
      r[(2*a+1)*XW +: XW] = XW'(sat6(fl(y[0]*wi + y[1]*wr, 9)));
    end
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ev_valid) begin nfetch++; last_ev = ev; end
    if (tx_valid && tx_active) begin
      hist.push_front(tx_data);
      expq.push_back(model(ulf_bank[cur_f], spl_bank[cur_s]));
    end
    if (dac_valid) begin
      ndac++;
      chk(expq.size() != 0 && dac_data == expq[0], $sformatf("DAC word %h exp %h", dac_data, expq.size() ? expq[0] : 0));
      if (expq.size()) void'(expq.pop_front());
    end
  end

  task automatic run_send(input int id, input int ls, input int fb, input int sb);
    int taken;
    cur_f = fb; cur_s = sb;
    act_valid = 1; start = 1;
    act = '{kind: PK_REQ_SEND, id: 16'(id), fn: 16'(id + 3), faddr: 8'(5 + fb), daddr: 8'(9 + sb), ts: 0, ls: 32'(ls)};
    @(posedge clk); #1;
    start = 0;
    @(posedge clk); #1;
    chk(last_ev.kind == PK_FETCH && last_ev.id == 16'(id) && last_ev.fn == 16'(id + 3) && last_ev.ls == 32'(ls),
        "FETCH response");
    chk(tx_active == (ls != 0), "tx_active after FETCH");
    taken = 0;
    for (int i = 0; i < ls + 4; i++) begin
      tx_valid = ($urandom % 3) != 0;
      tx_data = 12'($urandom);
      if (tx_valid && tx_active) taken++;
      @(posedge clk); #1;
      if (!tx_valid) i--;
    end
    tx_valid = 0;
    act_valid = 0;
    chk(taken == ls, $sformatf("words taken %0d of %0d", taken, ls));
    chk(!tx_active, "tx_active low after the last word");
    repeat (4) @(posedge clk);
    #1;
  endtask

  initial begin
    rst_n = 0; act_valid = 0; start = 0; act = '0; tx_valid = 0; tx_data = 0;
    ulf_wr_en = 0; spl_wr_en = 0; ulf_wr_bank = 0; spl_wr_bank = 0; spl_wr_row = 0;
    ulf_wr_data = 0; spl_wr_data = 0; last_ev = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < 2; b++) begin
      ulf_bank[b] = {$urandom, $urandom};
      spl_bank[b] = {$urandom, $urandom, $urandom, $urandom};
      ulf_wr_en = 1; ulf_wr_bank = 8'(5 + b); ulf_wr_data = ulf_bank[b];
      @(posedge clk); #1;
      ulf_wr_en = 0;
      for (int r = 0; r < 2; r++) begin
        spl_wr_en = 1; spl_wr_bank = 8'(9 + b); spl_wr_row = 1'(r); spl_wr_data = spl_bank[b][r*64 +: 64];
        @(posedge clk); #1;
      end
      spl_wr_en = 0;
    end
    // bank addresses 5/6 and 9/10 map to model index 0/1
    run_send(1, 12, 0, 1);
    run_send(2, 7, 1, 0);
    run_send(3, 0, 0, 0);
    chk(nfetch == 3, "three FETCH responses");
    chk(ndac == 19, $sformatf("DAC words %0d", ndac));
    chk(expq.size() == 0, "no DAC word missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
