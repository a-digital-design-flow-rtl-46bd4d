// tb_unpacker: sends every packet type to the unpacker and checks what
// comes out: request fields from the two request words, a cancellation held
// until accepted (with bb_in_ready low meanwhile), a time shift, the row
// writes of all four coefficient bank types (row numbers, bank, data), the
// busy flag during multi-word packets, and transmit words while a
// transmission runs.
module tb_unpacker;
  import digif_pkg::*;
  logic clk = 0, rst_n, bb_in_valid, bb_in_ready, busy, tx_active;
  logic [63:0] bb_in_data;
  logic req_valid, cancel_valid, cancel_ready, set_ti_valid, cw_en, tx_valid;
  req_t req;
  logic [15:0] cancel_id;
  logic [31:0] tis;
  pkt_t cw_sel;
  logic [7:0] cw_bank;
  logic [2:0] cw_row;
  logic [63:0] cw_data;
  logic [11:0] tx_data;
  int checks = 0, failures = 0;

  unpacker dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // collected outputs
  req_t reqs [$];
  logic [15:0] cancels [$];
  logic [31:0] shifts [$];
  logic [63:0] cw_log [$];
  logic [11:0] txs [$];
  always @(posedge clk) begin
    if (rst_n && req_valid) reqs.push_back(req);
    if (rst_n && cancel_valid && cancel_ready) cancels.push_back(cancel_id);
    if (rst_n && set_ti_valid) shifts.push_back(tis);
    if (rst_n && cw_en) cw_log.push_back({cw_data[39:0], 4'(cw_sel), cw_bank, 1'b0, cw_row, 8'(0)});
    if (rst_n && tx_valid) txs.push_back(tx_data);
  end

  task automatic send(input logic [63:0] w);
    bb_in_valid = 1; bb_in_data = w;
    @(posedge clk);
    while (!bb_in_ready) @(posedge clk);
    #1 bb_in_valid = 0;
  endtask

  function automatic logic [63:0] hdr(input pkt_t t, input int id, input int fn, input int fa, input int da);
    return {4'(t), 4'h0, 16'(id), 16'(fn), 8'h00, 8'(fa), 8'(da)};
  endfunction

  initial begin
    int nrows [4] = '{DLF_ROWS, ULF_ROWS, CMB_ROWS, SPL_ROWS};
    pkt_t styp [4] = '{PK_SET_DL_FILTER, PK_SET_UL_FILTER, PK_SET_COMBINER, PK_SET_SPLITTER};
    logic [63:0] rowdata [4][8];
    rst_n = 0; bb_in_valid = 0; bb_in_data = 0; tx_active = 0; cancel_ready = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // four data requests
    for (int k = 0; k < 4; k++) begin
      send(hdr(pkt_t'(PK_REQ + k), 10 + k, 300 + k, 20 + k, 40 + k));
      #0 chk(busy, "busy between request words");
      send({32'(1000 * k + 7), 32'(50 + k)});
    end
    @(posedge clk); #1;
    chk(reqs.size() == 4, "four requests");
    for (int k = 0; k < 4 && k < reqs.size(); k++)
      chk(reqs[k].kind == pkt_t'(PK_REQ + k) && reqs[k].id == 16'(10 + k) && reqs[k].fn == 16'(300 + k)
          && reqs[k].faddr == 8'(20 + k) && reqs[k].daddr == 8'(40 + k)
          && reqs[k].ts == 32'(1000 * k + 7) && reqs[k].ls == 32'(50 + k), $sformatf("request %0d fields", k));
    chk(!busy, "idle after requests");
    // cancel held until accepted
    cancel_ready = 0;
    bb_in_valid = 1; bb_in_data = hdr(PK_CANCEL_REQ, 77, 0, 0, 0);
    @(posedge clk); #1 bb_in_data = hdr(PK_SET_TI, 0, 0, 0, 0) | 64'd1234;
    repeat (3) begin
      chk(!bb_in_ready && cancel_valid && busy, "cancel waits, input held off");
      @(posedge clk); #1;
    end
    cancel_ready = 1;
    @(posedge clk); #1;           // cancellation accepted here
    chk(bb_in_ready && !cancel_valid, "input free after the cancel");
    @(posedge clk); #1;           // SET_TI word taken here
    bb_in_valid = 0;
    @(posedge clk); #1;
    chk(cancels.size() == 1 && cancels[0] == 16'd77, $sformatf("cancel id (%0d seen)", cancels.size()));
    chk(shifts.size() == 1 && shifts[0] == 32'd1234, $sformatf("time shift after the cancel (%0d seen)", shifts.size()));
    // coefficient banks
    for (int t = 0; t < 4; t++) begin
      send(hdr(styp[t], 0, 0, 0, 100 + t));
      for (int r = 0; r < nrows[t]; r++) begin
        rowdata[t][r] = {$urandom, $urandom};
        send(rowdata[t][r]);
      end
    end
    @(posedge clk); #1;
    begin
      int i = 0;
      chk(cw_log.size() == DLF_ROWS + ULF_ROWS + CMB_ROWS + SPL_ROWS, "row writes");
      for (int t = 0; t < 4; t++)
        for (int r = 0; r < nrows[t]; r++) begin
          if (i < cw_log.size())
            chk(cw_log[i] == {rowdata[t][r][39:0], 4'(styp[t]), 8'(100 + t), 1'b0, 3'(r), 8'(0)},
                $sformatf("row write type %0d row %0d", t, r));
          i++;
        end
    end
    // transmit words
    tx_active = 1;
    for (int k = 0; k < 20; k++) send(hdr(PK_REQ, 0, 0, 0, 0) | 64'(k * 37 % 4096));
    tx_active = 0;
    @(posedge clk); #1;
    chk(txs.size() == 20, "transmit words passed");
    for (int k = 0; k < 20 && k < txs.size(); k++) chk(txs[k] == 12'(k * 37 % 4096), "transmit data");
    chk(reqs.size() == 4, "no request decoded from transmit words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
