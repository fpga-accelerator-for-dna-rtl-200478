// bwa_rr_arbiter: round-robin arbiter granting one request per cycle.
//
// Used twice per channel (one per address stream) to pick one PE memory
// request per accelerator cycle, and once to pick one PE result per cycle.
// The original architecture asks only that one request proceeds per cycle; round-robin
// order, which keeps any PE from starving, is this design's choice.
//
// Combinational grant: grant is one-hot (or zero) among req, from the
// requester after the last one served. The pointer moves past the granted
// requester when advance is high (the grant was taken this cycle).
module bwa_rr_arbiter #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx,
  output logic         grant_valid
);

  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] last;   // index served most recently

  always_comb begin
    grant       = '0;
    grant_idx   = '0;
    grant_valid = 1'b0;
    for (int unsigned off = 1; off <= N; off++) begin
      int unsigned c;
      c = (int'(last) + off) % N;
      if (!grant_valid && req[c]) begin
        grant_valid = 1'b1;
        grant_idx   = IW'(c);
        grant[c]    = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        last <= IW'(N - 1);
    else if (advance && grant_valid)   last <= grant_idx;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
