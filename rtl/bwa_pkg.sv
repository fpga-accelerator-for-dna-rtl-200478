// bwa_pkg: types and constants shared by the short-read mapping accelerator.
//
// Symbols use the 2-bit code of the encoded occurrence array: A=00, C=01,
// G=10, T=11. The occurrence array is stored as 256-bit codes, one code per
// 64 consecutive rows: bits [127:0] hold the 64 BWT symbols of the rows
// (row r of the group in bits [2r+1:2r]) and bits [255:128] hold the
// occurrence counts of the last row of the group, A in [159:128], C in
// [191:160], G in [223:192] and T in [255:224]. The end marker '$' is not a
// symbol; its row is held in a configuration register and its slot in the
// code is ignored by the decoder. A 512-bit DDR3 word holds two codes, the
// even one in the low half.
//
// The widths (32-bit rows and counts, 90-symbol reads, 64 rows per code)
// follow the original architecture; the read, call and result record layouts are this
// design's own.
package bwa_pkg;

  typedef enum logic [1:0] {
    SYM_A = 2'b00,
    SYM_C = 2'b01,
    SYM_G = 2'b10,
    SYM_T = 2'b11
  } sym_e;

  localparam int unsigned NSYM         = 4;
  localparam int unsigned ROW_W        = 32;   // row index of the BWT / SA
  localparam int unsigned CNT_W        = 32;   // occurrence count width
  localparam int unsigned ADDR_W       = 32;   // code address (row / 64)
  localparam int unsigned ROWS_PER_CODE = 64;
  localparam int unsigned SLOT_W       = 6;    // log2(ROWS_PER_CODE)
  localparam int unsigned CODE_W       = 256;
  localparam int unsigned DDR_W        = 512;
  localparam int unsigned READ_LEN     = 90;   // symbols per short read
  localparam int unsigned LEN_W        = 8;
  localparam int unsigned IDX_W        = 8;    // signed read position i (-1 .. READ_LEN-1)
  localparam int unsigned Z_W          = 4;    // signed remaining differences z
  localparam int unsigned ZMAX_W       = 3;    // per-read difference budget (0..7)
  localparam int unsigned D_W          = 3;    // lower bound D(i) on differences
  localparam int unsigned READ_ID_W    = 32;

  // One pending InexRecur(W, i, z, k, l) call. i and z are two's complement
  // (i = -1 once the read is consumed, z = -1 once the budget is exceeded).
  typedef struct packed {
    logic [IDX_W-1:0]        i;
    logic [Z_W-1:0]          z;
    logic [ROW_W-1:0]        k;
    logic [ROW_W-1:0]        l;
  } call_t;

  // A short read handed to a PE. sym[p] is W[p]; dmin[p] is D(p).
  typedef struct packed {
    logic [READ_ID_W-1:0]           id;
    logic [LEN_W-1:0]               len;
    logic [ZMAX_W-1:0]              zmax;
    logic [READ_LEN-1:0][1:0]       sym;
    logic [READ_LEN-1:0][D_W-1:0]   dmin;
  } read_t;

  // A result record: either one SA interval [k, l] found for read id, or
  // (done = 1) the end-of-read marker, which also reports a call-stack overflow.
  typedef struct packed {
    logic [READ_ID_W-1:0] id;
    logic                 done;
    logic                 overflow;
    logic [ROW_W-1:0]     k;
    logic [ROW_W-1:0]     l;
  } result_t;

  // Reference description loaded by the host: C(a), the row of '$' and the
  // last row of the BWT (the genome length).
  typedef struct packed {
    logic [NSYM-1:0][CNT_W-1:0] c;
    logic [ROW_W-1:0]           dollar_row;
    logic [ROW_W-1:0]           last_row;
  } ref_cfg_t;

  typedef logic [NSYM-1:0][CNT_W-1:0] occ_t;

endpackage
