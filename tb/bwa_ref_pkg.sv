// bwa_ref_pkg: software reference for the accelerator testbenches.
//
// Builds a random reference genome X, its suffix array and BWT (with the end
// marker '$'), C(a), the occurrence table O(a, row) and the 256-bit
// occurrence codes exactly as the host would load them into DDR3. It also
// produces short reads sampled from X with random substitutions, insertions
// and deletions, computes the D(i) lower bounds by the greedy substring cut
// rule, and runs the inexact search InexRecur in software to give the
// multiset of SA intervals a PE must report.
package bwa_ref_pkg;
  import bwa_pkg::*;

  int unsigned       n;            // genome length (rows 0..n)
  logic [1:0]        genome [];    // X[0..n-1]
  int unsigned       sa [];        // suffix array of X$ (n+1 rows)
  logic [1:0]        bwt [];       // BWT symbol per row (undefined at dollar)
  int unsigned       dollar_row;
  int unsigned       occ_tab [][4];// O(a, row)
  int unsigned       cnt_less [4]; // C(a)
  logic [CODE_W-1:0] codes [];

  // ---- suffix comparison and merge sort ----
  function automatic bit suffix_less(int unsigned x, int unsigned y);
    while (x < n && y < n) begin
      if (genome[x] != genome[y]) return genome[x] < genome[y];
      x++; y++;
    end
    return x == n;   // the shorter suffix ('$' first) is smaller
  endfunction

  function automatic void merge_sort(ref int unsigned v [], input int lo, input int hi,
                                     ref int unsigned tmp []);
    int mid, a, b, o;
    if (hi - lo < 2) return;
    mid = (lo + hi) / 2;
    merge_sort(v, lo, mid, tmp);
    merge_sort(v, mid, hi, tmp);
    a = lo; b = mid; o = lo;
    while (a < mid || b < hi) begin
      if (b >= hi || (a < mid && !suffix_less(v[b], v[a]))) tmp[o++] = v[a++];
      else tmp[o++] = v[b++];
    end
    for (int q = lo; q < hi; q++) v[q] = tmp[q];
  endfunction

  // ---- build everything for a random genome of length len ----
  function automatic void build(int unsigned len);
    int unsigned tmp [];
    int unsigned run [4];
    int unsigned ncodes;
    n = len;
    genome = new[n];
    foreach (genome[p]) genome[p] = 2'($urandom);
    sa  = new[n + 1];
    tmp = new[n + 1];
    foreach (sa[r]) sa[r] = r;
    merge_sort(sa, 0, n + 1, tmp);
    bwt     = new[n + 1];
    occ_tab = new[n + 1];
    run = '{0, 0, 0, 0};
    for (int unsigned r = 0; r <= n; r++) begin
      if (sa[r] == 0) begin
        dollar_row = r;
        bwt[r]     = 2'b00;
      end else begin
        bwt[r] = genome[sa[r] - 1];
        run[bwt[r]]++;
      end
      for (int a = 0; a < 4; a++) occ_tab[r][a] = run[a];
    end
    cnt_less[0] = 0;
    for (int a = 1; a < 4; a++) cnt_less[a] = cnt_less[a-1] + run[a-1];
    // codes: rows past n are padding symbols A, counted in the stored counts
    ncodes = (n + 1 + ROWS_PER_CODE - 1) / ROWS_PER_CODE;
    if (ncodes % 2) ncodes++;
    codes = new[ncodes];
    for (int unsigned g = 0; g < ncodes; g++) begin
      int unsigned last;
      int unsigned cnt [4];
      codes[g] = '0;
      last = g * ROWS_PER_CODE + ROWS_PER_CODE - 1;
      for (int r = 0; r < ROWS_PER_CODE; r++) begin
        int unsigned row = g * ROWS_PER_CODE + r;
        codes[g][2*r +: 2] = (row <= n) ? bwt[row] : 2'b00;
      end
      for (int a = 0; a < 4; a++)
        cnt[a] = (last <= n) ? occ_tab[last][a] : occ_tab[n][a] + ((a == 0) ? last - n : 0);
      for (int a = 0; a < 4; a++) codes[g][128 + 32*a +: 32] = cnt[a];
    end
  endfunction

  function automatic ref_cfg_t cfg();
    ref_cfg_t c;
    for (int a = 0; a < 4; a++) c.c[a] = cnt_less[a];
    c.dollar_row = dollar_row;
    c.last_row   = n;
    return c;
  endfunction

  function automatic logic [DDR_W-1:0] ddr_word(int unsigned w);
    if (2*w + 1 < codes.size()) return {codes[2*w + 1], codes[2*w]};
    return '0;
  endfunction

  function automatic int unsigned occ(int a, longint row);
    if (row < 0) return 0;
    return occ_tab[row][a];
  endfunction

  // is W[j..i] a substring of X? (backward search)
  function automatic bit is_substring(input read_t rd, int j, int i);
    longint k = 0, l = n;
    for (int p = i; p >= j; p--) begin
      int a = rd.sym[p];
      k = cnt_less[a] + occ(a, k - 1) + 1;
      l = cnt_less[a] + occ(a, l);
      if (k > l) return 0;
    end
    return 1;
  endfunction

  // ---- reads ----
  // Sample len symbols from X, then apply nsub substitutions and nindel
  // insertions or deletions; D(i) from the greedy cut rule unless use_d = 0.
  function automatic read_t make_read(int unsigned id, int unsigned len, int zmax,
                                      int nsub, int nindel, bit use_d);
    read_t rd;
    logic [1:0] s [$];
    int unsigned start = $urandom_range(0, n - len - 6);
    for (int p = 0; p < len + 4; p++) s.push_back(genome[start + p]);
    for (int e = 0; e < nindel; e++) begin
      int pos = $urandom_range(1, len - 2);
      if ($urandom_range(0, 1)) s.delete(pos);
      else s.insert(pos, 2'($urandom));
    end
    for (int e = 0; e < nsub; e++) begin
      int pos = $urandom_range(0, len - 1);
      s[pos] = s[pos] + 2'($urandom_range(1, 3));
    end
    rd      = '0;
    rd.id   = id;
    rd.len  = LEN_W'(len);
    rd.zmax = ZMAX_W'(zmax);
    for (int p = 0; p < int'(len); p++) rd.sym[p] = s[p];
    if (use_d) begin
      int z = 0, j = 0;
      for (int i = 0; i < int'(len); i++) begin
        if (!is_substring(rd, j, i)) begin
          z++;
          j = i + 1;
        end
        rd.dmin[i] = D_W'(z > 7 ? 7 : z);
      end
    end
    return rd;
  endfunction

  // ---- software InexRecur: appends every reported interval to hits ----
  typedef struct { longint k; longint l; } hit_t;

  function automatic void inex_recur(input read_t rd, input int i, input int z,
                                     input longint k, input longint l,
                                     ref hit_t hits [$], ref int unsigned calls);
    calls++;
    if (z < 0) return;
    if (i >= 0 && z < int'(rd.dmin[i])) return;
    if (i < 0) begin
      hits.push_back('{k, l});
      return;
    end
    inex_recur(rd, i - 1, z - 1, k, l, hits, calls);
    for (int a = 0; a < 4; a++) begin
      longint ka = cnt_less[a] + occ(a, k - 1) + 1;
      longint la = cnt_less[a] + occ(a, l);
      if (ka <= la) begin
        inex_recur(rd, i, z - 1, ka, la, hits, calls);
        if (a == int'(rd.sym[i])) inex_recur(rd, i - 1, z, ka, la, hits, calls);
        else                      inex_recur(rd, i - 1, z - 1, ka, la, hits, calls);
      end
    end
  endfunction

  function automatic void expected_hits(input read_t rd, ref hit_t hits [$],
                                        ref int unsigned calls);
    hits.delete();
    calls = 0;
    inex_recur(rd, int'(rd.len) - 1, int'(rd.zmax), 0, n, hits, calls);
  endfunction

endpackage
