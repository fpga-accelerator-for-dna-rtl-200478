// bwa_channel: one channel of the accelerator, N_PE processing elements that
// share one DDR3 memory through bwa_mem_access.
//
// Different short reads run in parallel, one per PE. A new read from the
// host stream is handed to the lowest-numbered idle PE, so reads are fed as
// soon as earlier ones finish mapping. The PEs' result records (hits and
// end-of-read markers) are merged into one output stream by a round-robin
// arbiter. The original architecture gives the channel's composition (32 PEs, one DDR3
// memory, shared access path); the dispatch and collection rules are this
// design's own.
//
// Interfaces: read_valid/read_ready/read_in in, res_valid/res_ready/res_out
// out, both valid/ready handshakes on clk; DDR3 controller user port on
// ddr_clk (see bwa_mem_access). pe_busy shows which PEs hold a read.
module bwa_channel
  import bwa_pkg::*;
#(
  parameter int unsigned N_PE        = 32,
  parameter int unsigned STACK_DEPTH = 1024,
  parameter int unsigned AFIFO_DEPTH = 16,
  parameter int unsigned RFIFO_DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ref_cfg_t          cfg,

  input  logic              read_valid,
  output logic              read_ready,
  input  read_t             read_in,

  output logic              res_valid,
  input  logic              res_ready,
  output result_t           res_out,

  output logic [N_PE-1:0]   pe_busy,

  input  logic              ddr_clk,
  input  logic              ddr_rst_n,
  output logic              ddr_read,
  output logic [ADDR_W-1:0] ddr_addr,
  input  logic              ddr_ready,
  input  logic              ddr_rdata_valid,
  input  logic [DDR_W-1:0]  ddr_rdata
);

  localparam int unsigned IW = $clog2(N_PE > 1 ? N_PE : 2);

  logic [N_PE-1:0]             pe_read_ready, pe_read_valid;
  logic [N_PE-1:0]             req_valid, req_ready, rsp_valid;
  logic [N_PE-1:0][ADDR_W-1:0] req_addr;
  logic [1:0][CODE_W-1:0]      rsp_code;
  logic [N_PE-1:0]             pe_res_valid, pe_res_ready, res_grant;
  result_t                     pe_res [N_PE];
  logic [IW-1:0]               res_idx;

  // ---------------- read dispatch: lowest idle PE ----------------
  always_comb begin
    pe_read_valid = '0;
    for (int p = N_PE - 1; p >= 0; p--) begin
      if (pe_read_ready[p]) begin
        pe_read_valid    = '0;
        pe_read_valid[p] = read_valid;
      end
    end
  end
  assign read_ready = |pe_read_ready;

  // ---------------- processing elements ----------------
  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    bwa_pe #(.STACK_DEPTH(STACK_DEPTH)) u_pe (
      .clk, .rst_n, .cfg,
      .read_valid   (pe_read_valid[p]),
      .read_ready   (pe_read_ready[p]),
      .read_in      (read_in),
      .mem_req_valid(req_valid[p]),
      .mem_req_ready(req_ready[p]),
      .mem_req_addr (req_addr[p]),
      .mem_rsp_valid(rsp_valid[p]),
      .mem_rsp_code (rsp_code[p / (N_PE / 2)]),
      .res_valid    (pe_res_valid[p]),
      .res_ready    (pe_res_ready[p]),
      .res          (pe_res[p]),
      .busy         (pe_busy[p])
    );
  end

  // ---------------- shared memory path ----------------
  bwa_mem_access #(.N_PE(N_PE), .AFIFO_DEPTH(AFIFO_DEPTH), .RFIFO_DEPTH(RFIFO_DEPTH)) u_mem (
    .clk, .rst_n,
    .pe_req_valid(req_valid),
    .pe_req_addr (req_addr),
    .pe_req_ready(req_ready),
    .pe_rsp_valid(rsp_valid),
    .rsp_code    (rsp_code),
    .ddr_clk, .ddr_rst_n, .ddr_read, .ddr_addr, .ddr_ready,
    .ddr_rdata_valid, .ddr_rdata
  );

  // ---------------- result collection ----------------
  bwa_rr_arbiter #(.N(N_PE)) u_res_arb (
    .clk, .rst_n,
    .req        (pe_res_valid),
    .advance    (res_ready),
    .grant      (res_grant),
    .grant_idx  (res_idx),
    .grant_valid(res_valid)
  );
  assign res_out      = pe_res[res_idx];
  assign pe_res_ready = res_ready ? res_grant : '0;

endmodule
