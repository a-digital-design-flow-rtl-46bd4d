// tb_packer: drives the packer with random stream words (header alone, data
// alone, or both in one cycle) and random one-word responses from four
// sources, and compares every output word with a cycle-accurate queue
// model: a stream word first, else the lowest-numbered waiting response,
// with responses held back while data words owed to the last RES header
// (its bits [23:0], 0..3 here) are still missing.
// The load is kept below one word per cycle in the random phase; a final
// burst then fills a response FIFO to check the sticky overflow flag.
module tb_packer;
  import digif_pkg::*;
  localparam int NEV = 4;
  logic clk = 0, rst_n;
  logic st_hdr_valid, st_valid, bb_out_valid, busy, overflow;
  logic [63:0] st_hdr, st_data, bb_out_data;
  logic [NEV-1:0] ev_valid;
  event_t ev [NEV];
  int checks = 0, failures = 0;

  packer dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [64:0] sq [$];
  int pend = 0;
  logic [63:0] eq [NEV][$];
  logic [63:0] exp_word;
  bit exp_valid;
  int nstream = 0, nev = 0;

  // model: decide the next output from the queues as they were before the
  // clock edge, then add the words offered in this cycle
  always @(posedge clk) if (rst_n) begin
    chk(bb_out_valid == exp_valid && (!exp_valid || bb_out_data == exp_word),
        $sformatf("output word at %0t: got %0b %h exp %0b %h", $time, bb_out_valid, bb_out_data, exp_valid, exp_word));
    exp_valid = 0;
    if (sq.size() != 0) begin
      logic [64:0] e;
      e = sq.pop_front();
      exp_valid = 1; exp_word = e[63:0];
      if (e[64]) pend = int'(e[23:0]);
      else if (pend > 0) pend--;
    end else if (pend == 0) for (int i = 0; i < NEV; i++)
      if (!exp_valid && eq[i].size() != 0) begin exp_valid = 1; exp_word = eq[i].pop_front(); end
    if (st_hdr_valid) begin sq.push_back({1'b1, st_hdr}); nstream++; end
    if (st_valid) begin sq.push_back({1'b0, st_data}); nstream++; end
    for (int i = 0; i < NEV; i++)
      if (ev_valid[i]) begin eq[i].push_back(event_word(ev[i])); nev++; end
  end

  task automatic drive_idle();
    st_hdr_valid = 0; st_valid = 0; ev_valid = '0;
  endtask

  initial begin
    exp_valid = 0; exp_word = 0;
    rst_n = 0; drive_idle(); st_hdr = 0; st_data = 0;
    for (int i = 0; i < NEV; i++) ev[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      drive_idle();
      // on average about 0.6 words per cycle
      if (cyc % 8 == 0) begin st_hdr_valid = 1; st_valid = 1; end
      else if (($urandom % 4) == 0) st_valid = 1;
      st_hdr = {$urandom, 8'($urandom), 24'($urandom % 4)}; st_data = {$urandom, $urandom};
      for (int i = 0; i < NEV; i++) begin
        ev_valid[i] = ($urandom % 40) == 0;
        ev[i] = '{kind: pkt_t'(PK_ACK + $urandom % 4), id: 16'($urandom), fn: 16'($urandom),
                  err: err_t'($urandom % 5), ls: $urandom};
      end
      @(posedge clk); #1;
    end
    drive_idle();
    repeat (100) @(posedge clk);
    #1;
    chk(!busy, "idle after the random phase");
    chk(!overflow, "no overflow at moderate load");
    chk(nstream > 1000 && nev > 250, "enough traffic");
    // continuous stream traffic stalls the responses; source 3 overflows
    for (int cyc = 0; cyc < 12; cyc++) begin
      drive_idle();
      st_valid = 1; st_data = {$urandom, $urandom};
      ev_valid[3] = 1;
      @(posedge clk); #1;
    end
    drive_idle();
    chk(overflow, "overflow reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
