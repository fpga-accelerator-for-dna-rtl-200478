// tb_bwa_workload_misses: the 0..4-miss workload on one processing element.
//
// Reads of 90 symbols are sampled from a random 16000-symbol reference and
// given exactly m differences (substitutions, plus one indel for m >= 2), and
// are searched with a budget of m differences and D(i) bounds, for m = 0..4.
// A memory model answers each code request after 10 cycles, about the round
// trip of the shared DDR3 path. Every reported interval is checked against
// the software InexRecur, and the cycles per read are printed for each m:
// the cost grows steeply with the number of misses allowed, as the search
// tree does.
module tb_bwa_workload_misses;
  import bwa_pkg::*;
  import bwa_ref_pkg::*;

  localparam int unsigned READS_PER_M = 3;
  localparam int unsigned MAX_M       = 4;
  localparam int unsigned MEM_LAT     = 10;

  logic clk = 0, rst_n = 0;
  always #6 clk = ~clk;

  ref_cfg_t cfg;
  logic     read_valid = 0, read_ready;
  read_t    read_in;
  logic     mem_req_valid, mem_rsp_valid = 0;
  logic [ADDR_W-1:0] mem_req_addr;
  logic [CODE_W-1:0] mem_rsp_code = '0;
  logic     res_valid, res_ready, busy;
  result_t  res;

  int checks = 0, failures = 0;

  bwa_pe dut (.clk, .rst_n, .cfg, .read_valid, .read_ready, .read_in,
              .mem_req_valid, .mem_req_ready(1'b1), .mem_req_addr,
              .mem_rsp_valid, .mem_rsp_code,
              .res_valid, .res_ready, .res, .busy);

  initial begin : watchdog
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t", what, $time);
      if (failures >= 50) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  // fixed-latency memory: one request in flight per PE
  logic [ADDR_W-1:0] lat_addr [MEM_LAT];
  logic              lat_v    [MEM_LAT];
  always @(posedge clk) begin
    lat_v[0]    <= mem_req_valid && !lat_v[0] && !busy_mem();
    lat_addr[0] <= mem_req_addr;
    for (int d = 1; d < int'(MEM_LAT); d++) begin
      lat_v[d]    <= lat_v[d-1];
      lat_addr[d] <= lat_addr[d-1];
    end
    mem_rsp_valid <= lat_v[MEM_LAT-1];
    mem_rsp_code  <= codes[lat_addr[MEM_LAT-1]];
  end
  function automatic bit busy_mem();
    for (int d = 1; d < int'(MEM_LAT); d++) if (lat_v[d]) return 1;
    return mem_rsp_valid;
  endfunction

  initial begin
    longint cyc [MAX_M+1];
    for (int d = 0; d < int'(MEM_LAT); d++) lat_v[d] = 0;
    res_ready = 1;
    build(16000);
    cfg = bwa_ref_pkg::cfg();
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m <= int'(MAX_M); m++) begin
      cyc[m] = 0;
      for (int r = 0; r < int'(READS_PER_M); r++) begin
        read_t rd;
        hit_t exp_hits [$];
        int unsigned calls;
        longint t0;
        bit done;
        rd = make_read(m * 10 + r, READ_LEN, m, (m >= 2) ? m - 1 : m, (m >= 2) ? 1 : 0, 1);
        expected_hits(rd, exp_hits, calls);
        @(negedge clk);
        read_in = rd; read_valid = 1;
        @(posedge clk);
        t0 = $time;
        @(negedge clk) read_valid = 0;
        done = 0;
        while (!done) begin
          @(posedge clk);
          if (res_valid) begin
            if (res.done) begin
              done = 1;
              check(!res.overflow && exp_hits.size() == 0,
                    $sformatf("m=%0d read %0d: %0d hits missing", m, r, exp_hits.size()));
            end else begin
              int idx[$];
              idx = exp_hits.find_first_index(h) with (h.k == res.k && h.l == res.l);
              check(idx.size() == 1, $sformatf("m=%0d: hit [%0d,%0d] expected", m, res.k, res.l));
              if (idx.size() == 1) exp_hits.delete(idx[0]);
            end
          end
        end
        cyc[m] += ($time - t0) / 12;
      end
      $display("misses=%0d: %0d cycles per read on one PE", m, cyc[m] / READS_PER_M);
    end
    check(cyc[MAX_M] > cyc[0], "cost grows with the number of misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
