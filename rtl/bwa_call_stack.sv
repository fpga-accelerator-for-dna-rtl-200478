// bwa_call_stack: register file of pending InexRecur calls inside one PE.
//
// Each expansion of a call creates up to nine new calls; they are kept here
// and taken back one at a time, last in first out, so the search runs depth
// first and the number of pending calls stays bounded by about eight per
// recursion level (under 800 for a 90-symbol read with four differences).
// The original architecture description says only that the parameters of the recursive calls are kept
// in a register file; the LIFO order and the depth are this design's choices.
//
// Interface: one push or one pop per cycle (not both). pop_data is registered
// and valid the cycle after pop. A push into a full stack is dropped and sets
// the sticky overflow flag; clear empties the stack and clears the flag.
module bwa_call_stack
  import bwa_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  push,
  input  call_t push_data,
  input  logic  pop,
  output call_t pop_data,
  output logic  empty,
  output logic  full,
  output logic  overflow
);

  localparam int unsigned PTR_W = $clog2(DEPTH + 1);

  call_t             mem [DEPTH];
  logic [PTR_W-1:0]  sp;          // number of stored calls

  assign empty = (sp == '0);
  assign full  = (sp == PTR_W'(DEPTH));

  always_ff @(posedge clk) begin
    if (push && !full)
      mem[sp[PTR_W-2:0]] <= push_data;
    if (pop && !empty)
      pop_data <= mem[sp[PTR_W-2:0] - 1'b1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp       <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      sp       <= '0;
      overflow <= 1'b0;
    end else if (push) begin
      if (full) overflow <= 1'b1;
      else      sp <= sp + 1'b1;
    end else if (pop && !empty) begin
      sp <= sp - 1'b1;
    end
  end

  // a push and a pop may not share a cycle
  a_no_push_pop: assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));

endmodule
