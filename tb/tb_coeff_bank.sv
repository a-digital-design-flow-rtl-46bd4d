// tb_coeff_bank: fills all 256 banks of an 8-row coefficient bank (the
// combiner geometry) row by row with random data, reads every bank back
// (one cycle latency, all rows side by side), then overwrites single rows
// and checks that only that row of that bank changed.
module tb_coeff_bank;
  localparam int ROWS = 8, AW = 8, RW = 64;
  logic clk = 0, wr_en;
  logic [AW-1:0] wr_bank, rd_bank;
  logic [2:0] wr_row;
  logic [RW-1:0] wr_data;
  logic [ROWS*RW-1:0] rd_data;
  logic [ROWS*RW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  coeff_bank #(.ROWS(ROWS)) dut (.*);
  always #5 clk = ~clk;

  task automatic read_check(input int b);
    rd_bank = AW'(b);
    @(posedge clk); #1;
    checks++;
    if (rd_data !== model[b]) begin failures++; $display("FAIL bank %0d", b); end
  endtask

  initial begin
    wr_en = 0; rd_bank = 0; wr_bank = 0; wr_row = 0; wr_data = 0;
    for (int b = 0; b < 2**AW; b++)
      for (int r = 0; r < ROWS; r++) begin
        wr_en = 1; wr_bank = AW'(b); wr_row = 3'(r); wr_data = {$urandom, $urandom};
        model[b][r*RW +: RW] = wr_data;
        @(posedge clk); #1;
      end
    wr_en = 0;
    for (int b = 0; b < 2**AW; b++) read_check(b);
    for (int t = 0; t < 300; t++) begin
      int b, r;
      b = $urandom_range(0, 255); r = $urandom_range(0, ROWS-1);
      wr_en = 1; wr_bank = AW'(b); wr_row = 3'(r); wr_data = {$urandom, $urandom};
      model[b][r*RW +: RW] = wr_data;
      @(posedge clk); #1;
      wr_en = 0;
      read_check(b);
      read_check($urandom_range(0, 255));
    end
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
