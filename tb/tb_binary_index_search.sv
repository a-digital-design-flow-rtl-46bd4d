// tb_binary_index_search: checks the one-cycle free-slot finder against a
// plain loop over the occupancy bits, for random vectors of every density,
// one-hot-free vectors and the full and empty cases.
module tb_binary_index_search;
  localparam int N = 64;
  logic [N-1:0] occ;
  logic [5:0]   index;
  logic         not_full;
  int checks = 0, failures = 0;

  binary_index_search #(.N(N)) dut (.occupied(occ), .index(index), .not_full(not_full));

  task automatic check_one();
    int exp_idx;
    bit exp_nf;
    exp_idx = 0;
    exp_nf  = 0;
    for (int i = N-1; i >= 0; i--) if (!occ[i]) begin exp_idx = i; exp_nf = 1; end
    #1;
    checks++;
    if (not_full !== exp_nf || (exp_nf && index != 6'(exp_idx))) begin
      failures++;
      $display("FAIL occ=%h index=%0d nf=%0d expected %0d/%0d", occ, index, not_full, exp_idx, exp_nf);
    end
  endtask

  initial begin
    occ = '0;            check_one();
    occ = '1;            check_one();
    for (int i = 0; i < N; i++) begin occ = ~(64'(1) << i); check_one(); end
    for (int i = 0; i < N; i++) begin occ = (64'(1) << i) - 1; check_one(); end
    for (int t = 0; t < 3000; t++) begin
      occ = {$urandom, $urandom};
      for (int d = 0; d < t % 5; d++) occ = occ | {$urandom, $urandom};
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
