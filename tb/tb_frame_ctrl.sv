// tb_frame_ctrl: offers requests to the frame controller one at a time and
// checks, tick by tick, that a request is taken exactly at its start time,
// stays active for exactly ls sample periods with its fields unchanged and
// a single start pulse, that a request due while another is active fails
// with OVERLAP, and that a request offered after its start time fails with
// TIMING_OUT_OF_BOUND.
module tb_frame_ctrl;
  import digif_pkg::*;
  logic clk = 0, rst_n, tick, stg_valid, take, act_valid, start, ev_valid;
  logic [TS_W-1:0] ti;
  req_t stg, act;
  event_t ev;
  int checks = 0, failures = 0;

  frame_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (ti=%0d)", what, ti); end
  endtask

  // one sample period = one tick cycle followed by one idle cycle
  task automatic period();
    tick = 1;
    @(posedge clk); #1;
    tick = 0;
    @(posedge clk); #1;
    ti = ti + 1;
  endtask

  function automatic req_t mk(input int id, input int ts, input int ls);
    return '{kind: PK_REQ, id: ID_W'(id), fn: FN_W'(7), faddr: 8'(id), daddr: 8'(id + 1),
             ts: TS_W'(ts), ls: LS_W'(ls)};
  endfunction

  int n_start = 0, n_fail_ovl = 0, n_fail_late = 0;
  always @(posedge clk) begin
    if (start) n_start++;
    if (ev_valid && ev.kind == PK_FAIL && ev.err == ERR_OVERLAP) n_fail_ovl++;
    if (ev_valid && ev.kind == PK_FAIL && ev.err == ERR_TIMING_OUT_OF_BOUND) n_fail_late++;
  end

  // offer r, run until it is taken, then check its active window
  task automatic run_one(input req_t r);
    int active_periods;
    stg = r; stg_valid = 1;
    while (ti != r.ts) begin
      period();
      chk(!(act_valid && act.id == r.id), "not active before ts");
    end
    tick = 1; #1;
    chk(take, "taken at ts");
    @(posedge clk); #1;
    tick = 0; stg_valid = 0;
    @(posedge clk); #1;
    ti = ti + 1;
    active_periods = 0;
    while (act_valid && act.id == r.id) begin
      active_periods++;
      chk(act == r, "fields kept");
      period();
    end
    chk(active_periods == int'(r.ls), $sformatf("active for ls periods (%0d)", active_periods));
  endtask

  initial begin
    int s0;
    rst_n = 0; tick = 0; stg_valid = 0; stg = '0; ti = 5;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    s0 = n_start;
    run_one(mk(1, 10, 4));
    run_one(mk(2, 20, 1));
    run_one(mk(3, 30, 17));
    chk(n_start - s0 == 3, "one start pulse per request");
    // overlap: request 5 due while request 4 is active
    stg = mk(4, ti + 2, 10); stg_valid = 1;
    while (!act_valid) period();
    stg = mk(5, ti + 3, 5);
    repeat (4) period();
    chk(n_fail_ovl == 1, "overlap fails");
    chk(act.id == 4, "first request stays active");
    stg_valid = 0;
    repeat (10) period();
    chk(!act_valid, "request over");
    // late
    stg = mk(6, ti - 3, 5); stg_valid = 1;
    period();
    stg_valid = 0;
    period();
    chk(n_fail_late == 1, "late request fails");
    chk(!act_valid, "late request not activated");
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
