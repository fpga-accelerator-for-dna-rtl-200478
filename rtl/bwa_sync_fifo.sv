// bwa_sync_fifo: small single-clock FIFO.
//
// Remembers, in the DDR3 clock domain, which PE and which half of the 512-bit
// word each outstanding read belongs to; the DDR3 controller returns read data
// in request order, so the head entry always names the data arriving next.
// Write: push when !full. Read: head shown on rd_data while !empty, pop frees it.
module bwa_sync_fifo #(
  parameter int unsigned W     = 6,
  parameter int unsigned DEPTH = 32    // power of two
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wr_data,
  input  logic         pop,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;

  assign empty   = (wptr == rptr);
  assign full    = (wptr == {~rptr[AW], rptr[AW-1:0]});
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push && !full)
      mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push && !full) wptr <= wptr + 1'b1;
      if (pop && !empty) rptr <= rptr + 1'b1;
    end
  end

endmodule
