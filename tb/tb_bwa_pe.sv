// tb_bwa_pe: maps reads on one processing element and compares every
// reported SA interval with the software InexRecur of bwa_ref_pkg.
//
// A random 1500-symbol genome is encoded into occurrence codes; a simple
// memory answers the PE's code requests after 1..6 cycles with random
// request stalls. Reads of 20..90 symbols with up to three differences are
// mapped with and without D(i) pruning. For each read the multiset of
// reported intervals must equal the software one, followed by a done record.
// A second PE with a 16-entry register file must flag overflow.
// The control-path events (k = 0 shortcut, shared code, pruning) are counted
// and each must occur.
module tb_bwa_pe;
  import bwa_pkg::*;
  import bwa_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #6 clk = ~clk;

  ref_cfg_t cfg;
  logic     read_valid = 0, read_ready;
  read_t    read_in;
  logic     mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [ADDR_W-1:0] mem_req_addr;
  logic [CODE_W-1:0] mem_rsp_code;
  logic     res_valid, res_ready, busy;
  result_t  res;

  int checks = 0, failures = 0;

  bwa_pe dut (.clk, .rst_n, .cfg, .read_valid, .read_ready, .read_in,
              .mem_req_valid, .mem_req_ready, .mem_req_addr,
              .mem_rsp_valid, .mem_rsp_code,
              .res_valid, .res_ready, .res, .busy);

  // second PE with a tiny register file, shares the memory model idea
  logic     r2_valid = 0, r2_ready, m2_req_valid, m2_rsp_valid = 0, res2_valid, busy2;
  logic [ADDR_W-1:0] m2_addr;
  logic [CODE_W-1:0] m2_code = '0;
  result_t  res2;
  bwa_pe #(.STACK_DEPTH(16)) dut_small (.clk, .rst_n, .cfg, .read_valid(r2_valid),
              .read_ready(r2_ready), .read_in, .mem_req_valid(m2_req_valid),
              .mem_req_ready(1'b1), .mem_req_addr(m2_addr), .mem_rsp_valid(m2_rsp_valid),
              .mem_rsp_code(m2_code), .res_valid(res2_valid), .res_ready(1'b1),
              .res(res2), .busy(busy2));

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t", what, $time);
      if (failures >= 50) begin   // enough evidence; stop early
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  // ---- memory model for the main PE: one request at a time ----
  int unsigned mem_lat;
  initial begin
    mem_req_ready = 0;
    mem_rsp_valid = 0;
    mem_rsp_code  = '0;
    forever begin
      @(negedge clk);
      mem_rsp_valid = 0;
      mem_req_ready = ($urandom_range(0, 3) != 0);
      if (mem_req_valid && mem_req_ready) begin
        logic [ADDR_W-1:0] a;
        a = mem_req_addr;
        @(negedge clk);
        mem_req_ready = 0;
        repeat ($urandom_range(0, 5)) @(negedge clk);
        mem_rsp_valid = 1;
        mem_rsp_code  = codes[a];
      end
    end
  end

  // ---- memory model for the small PE ----
  always @(posedge clk) begin
    m2_rsp_valid <= m2_req_valid;
    m2_code      <= codes[m2_addr];
  end

  // ---- event counters (read from the PE's control path) ----
  int unsigned n_k0 = 0, n_reuse = 0, n_prune = 0, n_dprune = 0, n_emit = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.state == dut.S_CHECK && !dut.prune && !dut.p_ineg && dut.stk_rdata.k == 0) n_k0++;
    if (dut.state == dut.S_REUSE_L) n_reuse++;
    if (dut.state == dut.S_CHECK && dut.p_zneg) n_prune++;
    if (dut.state == dut.S_CHECK && dut.prune && !dut.p_zneg) n_dprune++;
    if (dut.state == dut.S_EMIT && res_ready) n_emit++;
  end

  task automatic map_one(input read_t rd);
    hit_t exp_hits [$];
    int unsigned calls;
    bit done = 0;
    expected_hits(rd, exp_hits, calls);
    @(negedge clk);
    read_in    = rd;
    read_valid = 1;
    @(posedge clk);
    while (!read_ready) @(posedge clk);
    @(negedge clk) read_valid = 0;
    while (!done) begin
      @(negedge clk);
      res_ready = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      if (res_valid && res_ready) begin
        check(res.id == rd.id, "result read id");
        if (res.done) begin
          done = 1;
          check(!res.overflow, "no overflow");
          check(exp_hits.size() == 0, $sformatf("all %0d remaining hits reported", exp_hits.size()));
        end else begin
          int idx[$] = exp_hits.find_first_index(h) with (h.k == res.k && h.l == res.l);
          check(idx.size() == 1, $sformatf("hit [%0d,%0d] expected", res.k, res.l));
          if (idx.size() == 1) exp_hits.delete(idx[0]);
        end
      end
    end
    @(negedge clk) res_ready = 0;
  endtask

  initial begin
    res_ready = 0;
    build(1500);
    cfg = bwa_ref_pkg::cfg();
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      int unsigned len;
      int          zmax;
      read_t       rd;
      len  = (t < 4) ? 90 : $urandom_range(20, 90);
      zmax = t % 4;
      rd   = make_read(t, len, zmax, $urandom_range(0, zmax), (t % 3 == 0) ? 1 : 0, t % 2);
      map_one(rd);
    end
    // overflow of a small register file
    begin
      read_t rd;
      rd = make_read(99, 60, 3, 1, 0, 0);
      @(negedge clk) begin read_in = rd; r2_valid = 1; end
      @(negedge clk) r2_valid = 0;
      while (!(res2_valid && res2.done)) @(negedge clk);
      check(res2.overflow, "small register file overflow reported");
    end
    check(n_k0 > 0,     "k = 0 shortcut used");
    check(n_reuse > 0,  "shared code reused");
    check(n_prune > 0,  "z < 0 calls dropped");
    check(n_dprune > 0, "D(i) pruning used");
    check(n_emit > 0,   "hits emitted");
    $display("events: k0=%0d reuse=%0d zprune=%0d dprune=%0d hits=%0d", n_k0, n_reuse, n_prune, n_dprune, n_emit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
