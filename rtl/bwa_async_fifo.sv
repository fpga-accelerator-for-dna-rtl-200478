// bwa_async_fifo: single-width clock-crossing FIFO.
//
// Carries the decoded-memory read data (code plus PE tag) from the DDR3
// controller clock back to the accelerator clock. The original architecture description does not
// describe the return path; this is a plain Gray-pointer FIFO with two-flop
// synchronisers. Write: wr_en when !wr_full. Read: rd_valid/rd_data/rd_ready,
// rd_data shows the head entry.
module bwa_async_fifo #(
  parameter int unsigned W     = 261,
  parameter int unsigned DEPTH = 32    // power of two
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         wr_full,

  input  logic         rclk,
  input  logic         rrst_n,
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  input  logic         rd_ready
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wr_full  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign rd_valid = (rgray != wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge wclk) begin
    if (wr_en && !wr_full)
      mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_valid && rd_ready) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
