// bwa_mem_access: shared DDR3 read path of one channel, built around two
// address streams.
//
// The PEs of a channel are split into two halves, one per stream. Each
// stream has an arbiter that lets one PE request through per accelerator
// cycle; the two winners are written together, as one pair, into the
// dual-stream address FIFO (bwa_addr_fifo). The DDR3 controller side reads one
// address per DDR3 clock (200 MHz against 80 MHz), so with two streams it
// can be fed up to two requests per accelerator cycle instead of one. This is
// the original architecture's scheme for random, data-dependent accesses.
//
// An address is the index of a 256-bit occurrence code; two codes share a
// 512-bit DDR3 word, the even code in the low half. The controller returns
// words in request order, so a small FIFO in the DDR3 clock domain remembers
// the requesting PE and the half for each outstanding read. The selected
// code crosses back through one of two return FIFOs (bwa_async_fifo), one
// per stream, so that up to two codes per accelerator cycle reach the PEs,
// matching the two address streams; rsp_code[s] is shared by the PEs of
// stream s and pe_rsp_valid marks the one it is for. The return path is this
// design's own (the original architecture description does not describe it). Every PE keeps at most
// one request outstanding, so with the FIFOs at least N_PE/2 (return) and
// N_PE (tags) deep nothing can overflow even though the controller's read
// data cannot be stalled.
//
// DDR3 user side: ddr_read/ddr_addr with ddr_ready (request accepted when
// both high), ddr_rdata_valid/ddr_rdata for returned words.
module bwa_mem_access
  import bwa_pkg::*;
#(
  parameter int unsigned N_PE       = 32,
  parameter int unsigned AFIFO_DEPTH = 16,   // address pairs
  parameter int unsigned RFIFO_DEPTH = 32    // tags and returned codes, >= N_PE
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N_PE-1:0]             pe_req_valid,
  input  logic [N_PE-1:0][ADDR_W-1:0] pe_req_addr,
  output logic [N_PE-1:0]             pe_req_ready,
  output logic [N_PE-1:0]             pe_rsp_valid,
  output logic [1:0][CODE_W-1:0]      rsp_code,     // per stream

  input  logic                        ddr_clk,
  input  logic                        ddr_rst_n,
  output logic                        ddr_read,
  output logic [ADDR_W-1:0]           ddr_addr,
  input  logic                        ddr_ready,
  input  logic                        ddr_rdata_valid,
  input  logic [DDR_W-1:0]            ddr_rdata
);

  localparam int unsigned HALF  = N_PE / 2;
  localparam int unsigned TAG_W = $clog2(N_PE);
  localparam int unsigned HI_W  = $clog2(HALF > 1 ? HALF : 2);

  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic [ADDR_W-1:0] addr;
  } areq_t;

  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic [CODE_W-1:0] code;
  } arsp_t;

  // ---------------- two request streams (accelerator clock) ----------------
  logic [1:0][HALF-1:0] s_req, s_grant;
  logic [1:0][HI_W-1:0] s_idx;
  logic [1:0]           s_val;
  logic [1:0]           wr_valid;
  logic [1:0][$bits(areq_t)-1:0] wr_data;
  logic                 af_full, af_wr;

  logic                      af_rd_valid, af_rd_ready;
  logic [$bits(areq_t)-1:0]  af_rd_data;

  assign af_wr = |s_val && !af_full;

  for (genvar s = 0; s < 2; s++) begin : g_stream
    assign s_req[s] = pe_req_valid[s*HALF +: HALF];

    bwa_rr_arbiter #(.N(HALF)) u_arb (
      .clk, .rst_n,
      .req        (s_req[s]),
      .advance    (!af_full),
      .grant      (s_grant[s]),
      .grant_idx  (s_idx[s]),
      .grant_valid(s_val[s])
    );

    assign wr_valid[s] = s_val[s];
    assign wr_data[s]  = areq_t'{tag:  TAG_W'(s*HALF) + TAG_W'(s_idx[s]),
                                 addr: pe_req_addr[s*HALF + int'(s_idx[s])]};
    assign pe_req_ready[s*HALF +: HALF] = af_full ? '0 : s_grant[s];
  end

  bwa_addr_fifo #(.W($bits(areq_t)), .DEPTH(AFIFO_DEPTH)) u_afifo (
    .wclk    (clk),
    .wrst_n  (rst_n),
    .wr_en   (af_wr),
    .wr_valid(wr_valid),
    .wr_data (wr_data),
    .wr_full (af_full),
    .rclk    (ddr_clk),
    .rrst_n  (ddr_rst_n),
    .rd_valid(af_rd_valid),
    .rd_data (af_rd_data),
    .rd_ready(af_rd_ready)
  );

  // ---------------- DDR3 side (controller clock) ----------------
  areq_t                     head;
  logic                      tq_full, tq_empty;
  logic [TAG_W:0]            tq_head;

  assign head        = areq_t'(af_rd_data);
  assign ddr_read    = af_rd_valid && !tq_full;
  assign ddr_addr    = head.addr >> 1;
  assign af_rd_ready = ddr_ready && !tq_full;

  bwa_sync_fifo #(.W(TAG_W + 1), .DEPTH(RFIFO_DEPTH)) u_tagq (
    .clk    (ddr_clk),
    .rst_n  (ddr_rst_n),
    .push   (ddr_read && ddr_ready),
    .wr_data({head.tag, head.addr[0]}),
    .pop    (ddr_rdata_valid),
    .rd_data(tq_head),
    .empty  (tq_empty),
    .full   (tq_full)
  );

  // read data is steered to the return FIFO of the requesting PE's stream
  arsp_t rsp_in;
  logic  rsp_stream;
  assign rsp_in = '{tag:  tq_head[TAG_W:1],
                    code: tq_head[0] ? ddr_rdata[DDR_W-1:CODE_W] : ddr_rdata[CODE_W-1:0]};
  assign rsp_stream = (int'(rsp_in.tag) >= HALF);

  logic [1:0]                     rf_rd_valid, rf_full;
  logic [1:0][$bits(arsp_t)-1:0]  rf_rd_data;
  logic [1:0][HALF-1:0]           ret_valid;

  assign pe_rsp_valid = ret_valid;

  for (genvar s = 0; s < 2; s++) begin : g_ret
    arsp_t rsp_out;

    bwa_async_fifo #(.W($bits(arsp_t)), .DEPTH(RFIFO_DEPTH)) u_rfifo (
      .wclk    (ddr_clk),
      .wrst_n  (ddr_rst_n),
      .wr_en   (ddr_rdata_valid && (rsp_stream == 1'(s))),
      .wr_data (rsp_in),
      .wr_full (rf_full[s]),
      .rclk    (clk),
      .rrst_n  (rst_n),
      .rd_valid(rf_rd_valid[s]),
      .rd_data (rf_rd_data[s]),
      .rd_ready(1'b1)
    );

    // ---------------- return to the PEs (accelerator clock) ----------------
    assign rsp_out     = arsp_t'(rf_rd_data[s]);
    assign rsp_code[s] = rsp_out.code;
    assign ret_valid[s] = rf_rd_valid[s] ? (HALF'(1) << rsp_out.tag[HI_W-1:0]) : '0;
  end

  a_no_orphan_data: assert property (@(posedge ddr_clk) disable iff (!ddr_rst_n)
                                     ddr_rdata_valid |-> !tq_empty);
  a_no_rsp_overflow: assert property (@(posedge ddr_clk) disable iff (!ddr_rst_n)
                                      ddr_rdata_valid |-> !rf_full[rsp_stream]);

endmodule
