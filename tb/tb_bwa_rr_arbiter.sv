// tb_bwa_rr_arbiter: checks the round-robin arbiter against a model.
// Random request vectors; the grant must be one-hot, a requester, and the
// first requester after the last one served; the pointer holds when advance
// is low. With all requesters active, each of the N must be served once in
// every N consecutive cycles (one grant per cycle).
module tb_bwa_rr_arbiter;
  localparam int unsigned N = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic [3:0]   grant_idx;
  logic         grant_valid, advance;
  int checks = 0, failures = 0;
  int last_m;

  bwa_rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int exp_idx;
    int served [N];
    req = '0; advance = 0;
    repeat (3) @(posedge clk);
    rst_n  = 1;
    last_m = N - 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      req     = (t < 1000) ? N'($urandom) & N'($urandom) : (t < 2000 ? N'($urandom) : '1);
      advance = (t < 2000) ? ($urandom_range(0, 3) != 0) : 1'b1;
      #1;
      exp_idx = -1;
      for (int off = 1; off <= N; off++)
        if (exp_idx < 0 && req[(last_m + off) % N]) exp_idx = (last_m + off) % N;
      check(grant_valid == (req != 0), "grant_valid");
      if (exp_idx >= 0) begin
        check(grant == (N'(1) << exp_idx), "grant is next requester");
        check(grant_idx == exp_idx, "grant_idx");
      end else check(grant == '0, "no grant");
      if (t >= 2000) served[grant_idx]++;
      if (t >= 2000 && (t - 2000) % N == N - 1) begin
        for (int p = 0; p < N; p++) check(served[p] == 1, "each served once per N cycles");
        served = '{default: 0};
      end
      @(posedge clk);
      if (advance && exp_idx >= 0) last_m = exp_idx;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
