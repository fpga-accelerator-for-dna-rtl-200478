// bwa_pe: processing element that maps one short read with the inexact
// BWA search InexRecur(W, i, z, k, l).
//
// A call narrows the suffix-array interval [k, l] of the suffix W[i+1..] by
// one more symbol a with the backward-search step
//     k_a = C(a) + O(a, k - 1) + 1,    l_a = C(a) + O(a, l)
// and branches for insertions, deletions, matches and mismatches while the
// difference budget z lasts. The recursion is unrolled with a register file
// of pending calls (bwa_call_stack): one call is taken, expanded, and its
// children pushed back, until the register file is empty.
//
// Per call the control path
//   1. drops the call if z < 0, or if z < D(i) (the lower bound on the
//      differences still needed, supplied with the read; all zeros turns the
//      pruning off),
//   2. reports [k, l] as a hit if the whole read is consumed (i < 0),
//   3. otherwise pushes the insertion call (i-1, z-1, k, l), fetches the
//      occurrence codes of rows k-1 and l from memory and decodes them
//      (one fetch when both rows share a code, none for k-1 when k = 0,
//      where O(a, -1) = 0),
//   4. and for a = A, C, G, T computes k_a, l_a with the adder and, when the
//      comparator finds k_a <= l_a, pushes the deletion call (i, z-1, k_a, l_a)
//      and the match/mismatch call (i-1, z or z-1, k_a, l_a).
// The search, the equations and the D(i) control input follow the original architecture;
// the explicit z < 0 test (needed to end the recursion), the LIFO order, the
// one-request-at-a-time memory port and the result record are this design's.
//
// Interfaces (all on clk):
//   read_valid/read_ready  accepts a new read while the PE is idle
//   mem_req_*              one outstanding code request (address = row / 64)
//   mem_rsp_*              the 256-bit code, one cycle valid
//   res_valid/res_ready    hit records, then one done record per read
// Timing: a call costs 2 cycles to pop and test, one memory round trip per
// distinct code, and one cycle per child pushed (up to 9).
module bwa_pe
  import bwa_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ref_cfg_t          cfg,

  input  logic              read_valid,
  output logic              read_ready,
  input  read_t             read_in,

  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic [ADDR_W-1:0] mem_req_addr,
  input  logic              mem_rsp_valid,
  input  logic [CODE_W-1:0] mem_rsp_code,

  output logic              res_valid,
  input  logic              res_ready,
  output result_t           res,

  output logic              busy
);

  typedef enum logic [3:0] {
    S_IDLE, S_START, S_POP, S_CHECK, S_REQ_K, S_WAIT_K, S_REQ_L, S_WAIT_L,
    S_REUSE_L, S_EXT_DEL, S_EXT_MAT, S_EMIT, S_DONE
  } state_e;

  state_e         state;
  read_t          rd;
  call_t          cur;
  occ_t           ok, ol, dec_occ;
  logic [CODE_W-1:0] code_q;
  logic [1:0]     a;
  logic [ROW_W-1:0] ka_q, la_q;

  // call register file
  logic  stk_clear, stk_push, stk_pop, stk_empty, stk_ovf;
  call_t stk_wdata, stk_rdata;

  bwa_call_stack #(.DEPTH(STACK_DEPTH)) u_stack (
    .clk, .rst_n,
    .clear    (stk_clear),
    .push     (stk_push),
    .push_data(stk_wdata),
    .pop      (stk_pop),
    .pop_data (stk_rdata),
    .empty    (stk_empty),
    .full     (),
    .overflow (stk_ovf)
  );

  // rows of the current call
  logic [ROW_W-1:0] km1;
  assign km1 = cur.k - 1'b1;

  function automatic logic [ADDR_W-1:0] code_addr(input logic [ROW_W-1:0] row);
    return ADDR_W'(row >> SLOT_W);
  endfunction

  // occurrence decoder: from the memory response, or from the kept code
  logic [ROW_W-1:0]  dec_row;
  logic [CODE_W-1:0] dec_code;
  assign dec_row  = (state == S_WAIT_K) ? km1 : cur.l;
  assign dec_code = (state == S_REUSE_L) ? code_q : mem_rsp_code;

  bwa_occ_decoder u_dec (
    .code       (dec_code),
    .j          (dec_row[SLOT_W-1:0]),
    .dollar_hit ((cfg.dollar_row >> SLOT_W) == (dec_row >> SLOT_W)),
    .dollar_slot(cfg.dollar_row[SLOT_W-1:0]),
    .occ        (dec_occ)
  );

  // adder and comparator of the extension step
  logic [ROW_W-1:0] ka, la;
  logic             ext_ok, is_match;
  logic [IDX_W-2:0] ipos;
  assign ka       = cfg.c[a] + ok[a] + 1'b1;
  assign la       = cfg.c[a] + ol[a];
  assign ext_ok   = (ka <= la);
  assign ipos     = cur.i[IDX_W-2:0];
  assign is_match = (rd.sym[ipos] == a);

  // control-path tests of a freshly popped call
  logic [IDX_W-2:0] ppos;
  logic             p_ineg, p_zneg, prune;
  assign ppos   = stk_rdata.i[IDX_W-2:0];
  assign p_ineg = stk_rdata.i[IDX_W-1];
  assign p_zneg = stk_rdata.z[Z_W-1];
  assign prune  = p_zneg ||
                  (!p_ineg && ({1'b0, stk_rdata.z[Z_W-2:0]} < (Z_W)'(rd.dmin[ppos])));

  always_comb begin
    stk_clear = 1'b0;
    stk_push  = 1'b0;
    stk_pop   = 1'b0;
    stk_wdata = '0;
    unique case (state)
      S_IDLE: if (read_valid) begin
        stk_clear = 1'b1;
      end
      S_START: begin                             // InexRecur(W, len-1, zmax, 0, last)
        stk_push  = 1'b1;
        stk_wdata = '{i: IDX_W'(rd.len) - 1'b1,
                      z: Z_W'(rd.zmax),
                      k: '0, l: cfg.last_row};
      end
      S_POP:  stk_pop = !stk_empty;
      S_CHECK: if (!prune && !p_ineg) begin
        stk_push  = 1'b1;                        // insertion
        stk_wdata = '{i: stk_rdata.i - 1'b1, z: stk_rdata.z - 1'b1,
                      k: stk_rdata.k, l: stk_rdata.l};
      end
      S_EXT_DEL: if (ext_ok) begin
        stk_push  = 1'b1;                        // deletion
        stk_wdata = '{i: cur.i, z: cur.z - 1'b1, k: ka, l: la};
      end
      S_EXT_MAT: begin
        stk_push  = 1'b1;                        // match or mismatch
        stk_wdata = '{i: cur.i - 1'b1,
                      z: is_match ? cur.z : cur.z - 1'b1,
                      k: ka_q, l: la_q};
      end
      default: ;
    endcase
  end

  assign read_ready    = (state == S_IDLE);
  assign busy          = (state != S_IDLE);
  assign mem_req_valid = (state == S_REQ_K) || (state == S_REQ_L);
  assign mem_req_addr  = (state == S_REQ_K) ? code_addr(km1) : code_addr(cur.l);
  assign res_valid     = (state == S_EMIT) || (state == S_DONE);

  always_comb begin
    res    = '0;
    res.id = rd.id;
    if (state == S_DONE) begin
      res.done     = 1'b1;
      res.overflow = stk_ovf;
    end else begin
      res.k = cur.k;
      res.l = cur.l;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      rd     <= '0;
      cur    <= '0;
      ok     <= '0;
      ol     <= '0;
      code_q <= '0;
      a      <= '0;
      ka_q   <= '0;
      la_q   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (read_valid) begin
          rd    <= read_in;
          state <= S_START;
        end
        S_START: state <= S_POP;
        S_POP:   state <= stk_empty ? S_DONE : S_CHECK;
        S_CHECK: begin
          cur <= stk_rdata;
          if (prune)                 state <= S_POP;
          else if (p_ineg)           state <= S_EMIT;
          else if (stk_rdata.k == '0) begin
            ok    <= '0;
            state <= S_REQ_L;
          end else                   state <= S_REQ_K;
        end
        S_REQ_K: if (mem_req_ready) state <= S_WAIT_K;
        S_WAIT_K: if (mem_rsp_valid) begin
          ok     <= dec_occ;
          code_q <= mem_rsp_code;
          state  <= (code_addr(km1) == code_addr(cur.l)) ? S_REUSE_L : S_REQ_L;
        end
        S_REQ_L: if (mem_req_ready) state <= S_WAIT_L;
        S_WAIT_L: if (mem_rsp_valid) begin
          ol    <= dec_occ;
          a     <= '0;
          state <= S_EXT_DEL;
        end
        S_REUSE_L: begin
          ol    <= dec_occ;
          a     <= '0;
          state <= S_EXT_DEL;
        end
        S_EXT_DEL: begin
          ka_q <= ka;
          la_q <= la;
          if (ext_ok)          state <= S_EXT_MAT;
          else if (a == 2'd3)  state <= S_POP;
          else                 a <= a + 1'b1;
        end
        S_EXT_MAT: begin
          if (a == 2'd3) state <= S_POP;
          else begin
            a     <= a + 1'b1;
            state <= S_EXT_DEL;
          end
        end
        S_EMIT: if (res_ready) state <= S_POP;
        S_DONE: if (res_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
