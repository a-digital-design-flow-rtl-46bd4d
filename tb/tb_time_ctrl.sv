// tb_time_ctrl: ticks the sample time counter with an irregular tick
// pattern and checks its value against a count of the ticks; then arms two
// SET_TI shifts and checks that ti wraps to 0 exactly at the tick on which
// it equals tis, and only once.
module tb_time_ctrl;
  logic clk = 0, rst_n, tick, set_valid;
  logic [31:0] tis, ti;
  int checks = 0, failures = 0;
  longint exp_ti;

  time_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ti=%0d expected %0d", what, ti, exp_ti); end
  endtask

  task automatic step(input bit t);
    tick = t;
    @(posedge clk); #1;
    tick = 0;
  endtask

  initial begin
    int wraps;
    rst_n = 0; tick = 0; set_valid = 0; tis = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    exp_ti = 0;
    chk(ti == 0, "reset");
    for (int i = 0; i < 500; i++) begin
      bit t;
      t = ($urandom_range(0, 2) != 0);
      step(t);
      if (t) exp_ti++;
      chk(ti == 32'(exp_ti), "count");
    end
    // arm a shift at ti = exp_ti + 20
    tis = 32'(exp_ti + 20); set_valid = 1;
    @(posedge clk); #1 set_valid = 0;
    wraps = 0;
    for (int i = 0; i < 80; i++) begin
      bit wrap;
      wrap = (ti == tis) && (wraps == 0);
      step(1);
      if (wrap) begin exp_ti = 0; wraps++; end else exp_ti++;
      chk(ti == 32'(exp_ti), "shift");
    end
    chk(wraps == 1, "exactly one wrap");
    // a second shift to 0 when ti reaches 5 from 0 later
    tis = 32'(exp_ti + 3); set_valid = 1;
    @(posedge clk); #1 set_valid = 0;
    repeat (3) begin step(1); exp_ti++; end
    chk(ti == tis, "before second wrap");
    step(1);
    exp_ti = 0;
    chk(ti == 0, "second wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
