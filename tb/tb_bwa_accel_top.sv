// tb_bwa_accel_top: end-to-end test of the whole accelerator at its default
// size (two channels of 32 PEs, 1024-entry call register files).
//
// A random 6000-symbol reference is encoded into occurrence codes that both
// DDR3 controller models serve (80 MHz accelerator clock, 200 MHz controller
// clocks, 12-clock read latency, random wait requests). Each channel is sent
// NREADS reads of 90 symbols sampled from the reference with 0..3
// substitutions or indels, allowed 0..3 differences, half of them with D(i)
// bounds. Every result record is checked against the software InexRecur:
// each read must report exactly its multiset of SA intervals, then one done
// record without overflow. The host side stalls the result streams at
// random.
//
// Each mechanism of the design is counted and must occur at least once:
// both address streams writing in one cycle, one stream alone, several PEs
// of a stream requesting in one cycle, a controller wait request, a shared
// code reused for k-1 and l, the k = 0 shortcut, a '$' row masked by the
// decoder, calls dropped for z < 0 and for D(i), hits, read dispatch stalled
// with all PEs busy, and result back-pressure.
module tb_bwa_accel_top;
  import bwa_pkg::*;
  import bwa_ref_pkg::*;

  localparam int unsigned NCH    = 2;
  localparam int unsigned NPE    = 32;
  localparam int unsigned NREADS = 40;     // per channel

  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] ddr_clk = '0, ddr_rst_n = '0;
  always #12.5 clk = ~clk;
  always #5    ddr_clk[0] = ~ddr_clk[0];
  always #5.2  ddr_clk[1] = ~ddr_clk[1];

  ref_cfg_t cfg;
  logic [NCH-1:0] read_valid = '0, read_ready, res_valid, res_ready = '0;
  read_t    read_in [NCH];
  result_t  res_out [NCH];
  logic [NCH-1:0][NPE-1:0] pe_busy;
  logic [NCH-1:0] ddr_read, ddr_ready, ddr_rdata_valid;
  logic [NCH-1:0][ADDR_W-1:0] ddr_addr;
  logic [NCH-1:0][DDR_W-1:0]  ddr_rdata;

  bwa_accel_top dut (.*);

  for (genvar c = 0; c < NCH; c++) begin : g_ddr
    ddr3_ctrl_model #(.LATENCY(12), .BUSY_PCT(5)) u_ddr (
      .clk(ddr_clk[c]), .read(ddr_read[c]), .addr(ddr_addr[c]), .ready(ddr_ready[c]),
      .rdata_valid(ddr_rdata_valid[c]), .rdata(ddr_rdata[c]));
  end

  int checks = 0, failures = 0;

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

  initial begin : watchdog
    #30000000;   // 1,200,000 accelerator cycles
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- expected results ----
  hit_t exp_hits [NCH][NREADS][$];
  bit   done_seen [NCH][NREADS];
  int   n_done = 0, n_hits = 0;
  int unsigned sw_calls = 0;

  // ---- result checking ----
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCH; c++) begin
      if (res_valid[c] && res_ready[c]) begin
        int id;
        id = int'(res_out[c].id);
        check(id < int'(NREADS) && !done_seen[c][id], "result for a live read");
        if (id < int'(NREADS)) begin
          if (res_out[c].done) begin
            done_seen[c][id] = 1;
            n_done++;
            check(!res_out[c].overflow, "no overflow");
            check(exp_hits[c][id].size() == 0,
                  $sformatf("ch%0d read %0d: %0d hits missing", c, id, exp_hits[c][id].size()));
          end else begin
            int idx[$];
            n_hits++;
            idx = exp_hits[c][id].find_first_index(h) with (h.k == res_out[c].k && h.l == res_out[c].l);
            check(idx.size() == 1, $sformatf("ch%0d read %0d: hit [%0d,%0d] expected", c, id,
                                             res_out[c].k, res_out[c].l));
            if (idx.size() == 1) exp_hits[c][id].delete(idx[0]);
          end
        end
      end
    end
  end
  always @(negedge clk) for (int c = 0; c < NCH; c++) res_ready[c] <= ($urandom_range(0, 5) != 0);

  // ---- mechanism counters ----
  int unsigned ev_dual = 0, ev_single = 0, ev_contend = 0, ev_ddr_wait = 0, ev_reuse = 0,
               ev_k0 = 0, ev_dollar = 0, ev_zprune = 0, ev_dprune = 0, ev_full = 0,
               ev_backpr = 0;
  for (genvar c = 0; c < NCH; c++) begin : g_cnt
    always @(posedge clk) if (rst_n) begin
      if (dut.g_ch[c].u_ch.u_mem.af_wr) begin
        if (dut.g_ch[c].u_ch.u_mem.wr_valid == 2'b11) ev_dual++;
        else ev_single++;
      end
      for (int s = 0; s < 2; s++)
        if (!$onehot0(dut.g_ch[c].u_ch.u_mem.s_req[s])) ev_contend++;
      if (read_valid[c] && !read_ready[c]) ev_full++;
      if (res_valid[c] && !res_ready[c]) ev_backpr++;
    end
    always @(posedge ddr_clk[c]) if (ddr_read[c] && !ddr_ready[c]) ev_ddr_wait++;
    for (genvar p = 0; p < NPE; p++) begin : g_pe
      always @(posedge clk) if (rst_n) begin
        if (dut.g_ch[c].u_ch.g_pe[p].u_pe.state == dut.g_ch[c].u_ch.g_pe[p].u_pe.S_REUSE_L) ev_reuse++;
        if (dut.g_ch[c].u_ch.g_pe[p].u_pe.state == dut.g_ch[c].u_ch.g_pe[p].u_pe.S_CHECK) begin
          if (dut.g_ch[c].u_ch.g_pe[p].u_pe.p_zneg) ev_zprune++;
          else if (dut.g_ch[c].u_ch.g_pe[p].u_pe.prune) ev_dprune++;
          else if (!dut.g_ch[c].u_ch.g_pe[p].u_pe.p_ineg &&
                   dut.g_ch[c].u_ch.g_pe[p].u_pe.stk_rdata.k == '0) ev_k0++;
        end
        if (dut.g_ch[c].u_ch.g_pe[p].u_pe.u_dec.dollar_hit &&
            (dut.g_ch[c].u_ch.g_pe[p].u_pe.state == dut.g_ch[c].u_ch.g_pe[p].u_pe.S_WAIT_K ||
             dut.g_ch[c].u_ch.g_pe[p].u_pe.state == dut.g_ch[c].u_ch.g_pe[p].u_pe.S_WAIT_L) &&
            dut.g_ch[c].u_ch.g_pe[p].u_pe.mem_rsp_valid &&
            dut.g_ch[c].u_ch.g_pe[p].u_pe.u_dec.dollar_slot >
              dut.g_ch[c].u_ch.g_pe[p].u_pe.u_dec.j) ev_dollar++;
      end
    end
  end

  longint t_start, t_end;
  initial begin
    build(6000);
    cfg = bwa_ref_pkg::cfg();
    #100;
    rst_n = 1; ddr_rst_n = '1;
    t_start = $time;
    fork
      begin
        process::self().srandom(11);
        pre_and_feed(0);
      end
      begin
        process::self().srandom(22);
        pre_and_feed(1);
      end
    join
    wait (n_done == int'(NCH * NREADS));
    t_end = $time;
    repeat (10) @(posedge clk);
    check(ev_dual > 0,     "both streams wrote in one cycle");
    check(ev_single > 0,   "one stream wrote alone");
    check(ev_contend > 0,  "several PEs of a stream competed");
    check(ev_ddr_wait > 0, "controller wait request");
    check(ev_reuse > 0,    "shared code reused");
    check(ev_k0 > 0,       "k = 0 shortcut");
    check(ev_dollar > 0,   "'$' slot masked");
    check(ev_zprune > 0,   "z < 0 calls dropped");
    check(ev_dprune > 0,   "D(i) pruning");
    check(n_hits > 0,      "hits reported");
    check(ev_full > 0,     "read dispatch waited for an idle PE");
    check(ev_backpr > 0,   "result back-pressure");
    $display("reads=%0d hits=%0d sw_calls=%0d accel_cycles=%0d", n_done, n_hits, sw_calls,
             (t_end - t_start) / 25);
    $display("events: dual=%0d single=%0d contend=%0d ddr_wait=%0d reuse=%0d k0=%0d dollar=%0d zprune=%0d dprune=%0d full=%0d backpressure=%0d",
             ev_dual, ev_single, ev_contend, ev_ddr_wait, ev_reuse, ev_k0, ev_dollar,
             ev_zprune, ev_dprune, ev_full, ev_backpr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // generate every read of a channel, record its expected hits, then send it
  task automatic pre_and_feed(input int c);
    read_t rds [NREADS];
    for (int r = 0; r < int'(NREADS); r++) begin
      int zmax;
      int unsigned calls;
      hit_t h [$];
      zmax = r % 3;
      rds[r] = make_read(r, READ_LEN, zmax, $urandom_range(0, zmax), (r % 5 == 4) ? 1 : 0, (r % 2) == 0);
      expected_hits(rds[r], h, calls);
      exp_hits[c][r] = h;
      sw_calls += calls;
    end
    for (int r = 0; r < int'(NREADS); r++) begin
      @(negedge clk);
      read_in[c]    = rds[r];
      read_valid[c] = 1'b1;
      @(posedge clk);
      while (!read_ready[c]) @(posedge clk);
      @(negedge clk) read_valid[c] = 1'b0;
    end
  endtask
endmodule
