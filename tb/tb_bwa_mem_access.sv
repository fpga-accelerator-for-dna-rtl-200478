// tb_bwa_mem_access: checks the two-stream DDR3 read path of one channel.
//
// 32 request agents stand in for the PEs: each keeps at most one request
// for a random occurrence code outstanding and checks that the code it gets
// back is the one stored at that address. Accelerator clock period 25, DDR3
// controller clock period 10 (80 / 200 MHz); the controller model has a
// 12-clock latency and random wait requests. Phase 1 uses sparse random
// requests; phase 2 keeps every agent busy and checks that the controller
// receives more than 1.5 addresses per accelerator cycle, which a single
// stream (one address per accelerator cycle) could not deliver. Cycles in
// which both streams write an address, and cycles with one, are counted and
// must both occur.
module tb_bwa_mem_access;
  import bwa_pkg::*;
  import bwa_ref_pkg::*;

  localparam int unsigned N = 32;

  logic clk = 0, rst_n = 0, ddr_clk = 0, ddr_rst_n = 0;
  logic [N-1:0] pe_req_valid = '0, pe_req_ready, pe_rsp_valid;
  logic [N-1:0][ADDR_W-1:0] pe_req_addr;
  logic [1:0][CODE_W-1:0] rsp_code;
  logic ddr_read, ddr_ready, ddr_rdata_valid;
  logic [ADDR_W-1:0] ddr_addr;
  logic [DDR_W-1:0] ddr_rdata;

  always #12.5 clk = ~clk;
  always #5    ddr_clk = ~ddr_clk;

  bwa_mem_access dut (.*);

  ddr3_ctrl_model #(.LATENCY(12), .BUSY_PCT(5)) u_ddr (
    .clk(ddr_clk), .read(ddr_read), .addr(ddr_addr), .ready(ddr_ready),
    .rdata_valid(ddr_rdata_valid), .rdata(ddr_rdata));

  int checks = 0, failures = 0;
  int phase = 0;
  logic [N-1:0] outstanding = '0;
  logic [ADDR_W-1:0] want [N];
  int n_rsp = 0, n_dual = 0, n_single = 0, cyc2 = 0, ddr2 = 0;

  initial begin : watchdog
    #5000000;
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

  // request agents
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < N; p++) begin
      if (pe_rsp_valid[p]) begin
        n_rsp++;
        check(outstanding[p], "response to a waiting PE");
        check(rsp_code[p / (N / 2)] == codes[want[p]], "returned code matches address");
        outstanding[p] <= 1'b0;
      end
      if (pe_req_valid[p] && pe_req_ready[p]) begin
        outstanding[p]  <= 1'b1;
        pe_req_valid[p] <= 1'b0;
      end else if (!pe_req_valid[p] && !outstanding[p] && (phase == 1 || phase == 2) &&
                   (phase == 2 || $urandom_range(0, 9) == 0)) begin
        pe_req_valid[p] <= 1'b1;
        pe_req_addr[p]  <= ADDR_W'($urandom_range(0, codes.size() - 1));
      end
    end
    if (dut.af_wr && dut.wr_valid == 2'b11) n_dual++;
    if (dut.af_wr && dut.wr_valid != 2'b11) n_single++;
    if (phase == 2) cyc2++;
  end
  // address captured when the request is accepted
  always @(posedge clk)
    for (int p = 0; p < N; p++)
      if (pe_req_valid[p] && pe_req_ready[p]) want[p] <= pe_req_addr[p];

  always @(posedge ddr_clk) if (phase == 2 && ddr_read && ddr_ready) ddr2++;

  initial begin
    build(8000);
    #100 rst_n = 1; ddr_rst_n = 1;
    phase = 1;
    #200000;
    phase = 2;
    #200000;
    phase = 3;
    #20000;
    check(outstanding == '0 && pe_req_valid == '0, "all requests answered");
    check(n_rsp > 1000, $sformatf("responses %0d", n_rsp));
    check(n_dual > 0, "both streams wrote in one cycle");
    check(n_single > 0, "one stream wrote alone");
    check(real'(ddr2) / real'(cyc2) > 1.5,
          $sformatf("addresses per accelerator cycle %0.2f", real'(ddr2) / real'(cyc2)));
    $display("responses=%0d dual=%0d single=%0d rate=%0.2f", n_rsp, n_dual, n_single,
             real'(ddr2) / real'(cyc2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
