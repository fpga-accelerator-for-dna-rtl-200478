// ddr3_ctrl_model: behavioural model of the user side of a DDR3 memory
// controller (not synthesizable, testbench only).
//
// Accepts one read per controller clock when ready is high (ready drops at
// random to model the controller's wait requests), returns the 512-bit words
// in request order LATENCY clocks later, at most one per clock and without
// back-pressure. Contents are the occurrence codes of bwa_ref_pkg: word w
// holds codes 2w (low half) and 2w+1. Counts accepted reads in n_reads.
module ddr3_ctrl_model
  import bwa_pkg::*;
#(
  parameter int unsigned LATENCY   = 12,
  parameter int unsigned BUSY_PCT  = 10
) (
  input  logic              clk,
  input  logic              read,
  input  logic [ADDR_W-1:0] addr,
  output logic              ready,
  output logic              rdata_valid,
  output logic [DDR_W-1:0]  rdata
);

  typedef struct { longint due; logic [ADDR_W-1:0] addr; } pend_t;
  pend_t  pend [$];
  longint cycle = 0;
  int unsigned n_reads = 0;

  initial begin
    ready       = 1'b0;
    rdata_valid = 1'b0;
    rdata       = '0;
  end

  always @(posedge clk) begin
    cycle++;
    if (read && ready) begin
      pend.push_back('{cycle + LATENCY, addr});
      n_reads++;
    end
    if (pend.size() > 0 && pend[0].due <= cycle) begin
      rdata_valid <= 1'b1;
      rdata       <= bwa_ref_pkg::ddr_word(pend[0].addr);
      void'(pend.pop_front());
    end else begin
      rdata_valid <= 1'b0;
    end
    ready <= ($urandom_range(0, 99) >= BUSY_PCT);
  end

endmodule
