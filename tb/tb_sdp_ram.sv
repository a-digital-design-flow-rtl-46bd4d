// tb_sdp_ram: writes random words to random addresses of the RAM and reads
// them back, checking the one-cycle read latency, read-before-write on the
// same address, and that rd_dout holds while en is low.
module tb_sdp_ram;
  localparam int AW = 6, DW = 32;
  logic clk = 0, en, wr_en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [DW-1:0] din, rd_dout;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  sdp_ram #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic [DW-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [DW-1:0] exp, hold;
    en = 1; wr_en = 1; rd_addr = 0;
    for (int a = 0; a < 2**AW; a++) begin
      wr_addr = AW'(a); din = $urandom; model[a] = din;
      @(posedge clk); #1;
    end
    // random traffic with same-address collisions
    for (int t = 0; t < 2000; t++) begin
      wr_en   = $urandom_range(0, 1);
      wr_addr = AW'($urandom);
      rd_addr = (t % 4 == 0) ? wr_addr : AW'($urandom);
      din     = $urandom;
      exp     = model[rd_addr];              // old word: read before write
      @(posedge clk); #1;
      if (wr_en) model[wr_addr] = din;
      chk(rd_dout, exp, "read");
    end
    // hold while disabled
    hold = rd_dout;
    en = 0; wr_en = 1; wr_addr = rd_addr; din = ~hold;
    rd_addr = rd_addr + 1;
    repeat (3) @(posedge clk);
    #1 chk(rd_dout, hold, "hold");
    en = 1; wr_en = 0; rd_addr = wr_addr;
    @(posedge clk); #1 chk(rd_dout, model[rd_addr], "no write while disabled");
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
