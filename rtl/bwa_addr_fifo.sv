// bwa_addr_fifo: dual-stream address FIFO between the accelerator clock
// (80 MHz) and the DDR3 controller clock (200 MHz).
//
// The write side takes a pair of address entries per accelerator cycle, one
// from each of the two request streams (the 64-bit write path of the
// original architecture); each half carries its own valid bit because a stream may have no
// request that cycle. The read side hands out one entry per DDR3 clock (the
// 32-bit read path), skipping empty halves, so the fast side sees up to two
// valid addresses per slow cycle instead of one.
//
// The FIFO is built as a memory of pairs with Gray-coded pair pointers passed
// through two-flop synchronisers; an entry pair is freed once its valid
// halves have been read. DEPTH (pairs) and the entry width (address plus the
// PE tag used to route the read data back) are this design's choices.
//
// Write side: wr_en with at least one of wr_valid set; wr_full stops writes.
// Read side: rd_valid/rd_data/rd_ready handshake, rd_data is the head entry.
module bwa_addr_fifo #(
  parameter int unsigned W     = 37,
  parameter int unsigned DEPTH = 16    // pairs, power of two
) (
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic              wr_en,
  input  logic [1:0]        wr_valid,
  input  logic [1:0][W-1:0] wr_data,
  output logic              wr_full,

  input  logic              rclk,
  input  logic              rrst_n,
  output logic              rd_valid,
  output logic [W-1:0]      rd_data,
  input  logic              rd_ready
);

  localparam int unsigned AW = $clog2(DEPTH);

  typedef struct packed {
    logic [1:0]        v;
    logic [1:0][W-1:0] d;
  } pair_t;

  pair_t mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;    // read pointer seen by the write side
  logic [AW:0] wgray_r1, wgray_r2;    // write pointer seen by the read side
  logic        hsel;                  // next half of the head pair to read

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  assign wr_full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk) begin
    if (wr_en && !wr_full)
      mem[wbin[AW-1:0]] <= '{v: wr_valid, d: wr_data};
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // ---------------- read side ----------------
  pair_t head;
  logic  empty, cur_half, last_of_pair;

  assign empty        = (rgray == wgray_r2);
  assign head         = mem[rbin[AW-1:0]];
  assign cur_half     = (!hsel && head.v[0]) ? 1'b0 : 1'b1;
  assign last_of_pair = cur_half || !head.v[1];
  assign rd_valid     = !empty;
  assign rd_data      = head.d[cur_half];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      hsel     <= 1'b0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_valid && rd_ready) begin
        if (last_of_pair) begin
          hsel  <= 1'b0;
          rbin  <= rbin + 1'b1;
          rgray <= bin2gray(rbin + 1'b1);
        end else begin
          hsel  <= 1'b1;
        end
      end
    end
  end

  a_pair_has_entry: assert property (@(posedge wclk) disable iff (!wrst_n)
                                     wr_en |-> (wr_valid != 2'b00));

endmodule
