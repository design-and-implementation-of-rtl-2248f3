// mult_pkg: types and elaboration-time planning functions shared by the
// multipliers.
//
// tree_e selects the reduction rule of tree_multiplier. The functions below
// replay that rule on the N x N AND-gate partial product matrix while the
// design elaborates, so they cost no hardware.
//
// Wallace rule (row wise): the rows of a stage are taken in groups of three;
// in each group a column holding three bits gets a full adder (3:2), a column
// holding two bits a half adder (2:2), a single bit passes. Each group
// becomes a sum row and a carry row; one or two rows left over pass to the
// next stage. wallace_mask() returns which columns of a row can hold a bit.
// For 8 x 8 this places 38 full and 15 half adders in 4 stages.
//
// Dadda rule (column wise): with d1 = 2, d(j+1) = floor(1.5*d(j)), the stage
// targets are the d(j) below the largest column height, from the largest
// down; each column receives only as many full/half adders as keep it (with
// the carries arriving from the column to its right) at the target height.
// dadda_plan() returns, for a stage and column, the column height at the
// stage input and the numbers of full and half adders placed there. For
// 8 x 8 this places 35 full and 7 half adders in 4 stages.
//
// accum_next_rows() gives the number of rows after one stage of the row-wise
// compressor reduction used by pp_accumulator: every full group of ORDER rows
// becomes two rows, a remaining group of 3 or more rows also becomes two, and
// a remaining group of one or two rows passes through.
package mult_pkg;

  typedef enum logic {WALLACE = 1'b0, DADDA = 1'b1} tree_e;

  localparam int MAX_COLS = 128;
  localparam int MAX_ROWS = 64;

  typedef logic [MAX_COLS-1:0] colmask_t;

  // Height of column c of the unsigned N x N AND-gate matrix.
  function automatic int and_height(int n, int c);
    int lo, hi;
    if (c > 2*n - 2) return 0;
    lo = (c - (n - 1) > 0) ? c - (n - 1) : 0;
    hi = (c < n - 1) ? c : n - 1;
    return hi - lo + 1;
  endfunction

  // Wallace: column mask of row r entering stage s (bit c set when the row
  // can hold a bit in column c); r = -1 returns the number of rows instead.
  function automatic colmask_t wallace_mask(int n, int s, int r);
    colmask_t rows [MAX_ROWS];
    colmask_t nrows [MAX_ROWS];
    int cnt, ncnt;
    for (int i = 0; i < n; i++) rows[i] = colmask_t'((1 << n) - 1) << i;
    cnt = n;
    for (int st = 0; st < s; st++) begin
      ncnt = 0;
      for (int g = 0; g + 3 <= cnt; g += 3) begin
        nrows[ncnt]   = rows[g] | rows[g+1] | rows[g+2];
        nrows[ncnt+1] = ((rows[g] & rows[g+1]) | (rows[g] & rows[g+2]) |
                         (rows[g+1] & rows[g+2])) << 1;
        ncnt += 2;
      end
      for (int g = cnt - cnt % 3; g < cnt; g++) begin
        nrows[ncnt] = rows[g];
        ncnt++;
      end
      for (int i = 0; i < ncnt; i++) rows[i] = nrows[i];
      cnt = ncnt;
    end
    if (r < 0) return colmask_t'(cnt);
    return (r < cnt) ? rows[r] : '0;
  endfunction

  function automatic int wallace_rows(int n, int s);
    return int'(wallace_mask(n, s, -1));
  endfunction

  // Number of reduction stages until every column holds at most two bits.
  function automatic int tree_stages(int n, tree_e tree);
    int s, d;
    s = 0;
    if (tree == DADDA) begin
      d = 2;
      while (d < n) begin
        d = (3 * d) / 2;
        s++;
      end
      return s;
    end
    while (wallace_rows(n, s) > 2) s++;
    return s;
  endfunction

  // Dadda target height of stage s (0 = first stage): d(K - s), where K is
  // the number of stages and d(1) = 2.
  function automatic int dadda_target(int n, int s);
    int v, k;
    k = tree_stages(n, DADDA);
    v = 2;
    for (int i = 1; i < k - s; i++) v = (3 * v) / 2;
    return v;
  endfunction

  // Dadda: what = 0 gives the column height entering stage s, 1 the full
  // adders placed, 2 the half adders placed. s may equal the stage count for
  // what = 0.
  function automatic int dadda_plan(int n, int s, int c, int what);
    int h   [MAX_COLS];
    int nfa [MAX_COLS];
    int nha [MAX_COLS];
    int hn  [MAX_COLS];
    int st, col, cin, excess, tgt;
    for (col = 0; col < 2*n; col++) h[col] = and_height(n, col);
    for (st = 0; st <= s; st++) begin
      for (col = 0; col < 2*n; col++) begin
        cin = (col == 0) ? 0 : nfa[col-1] + nha[col-1];
        tgt    = (st < tree_stages(n, DADDA)) ? dadda_target(n, st) : 2;
        excess = h[col] + cin - tgt;
        nfa[col] = (excess > 0) ? excess / 2 : 0;
        nha[col] = (excess > 0) ? excess % 2 : 0;
      end
      if (st == s) begin
        if (what == 1) return nfa[c];
        if (what == 2) return nha[c];
        return h[c];
      end
      for (col = 0; col < 2*n; col++) begin
        cin     = (col == 0) ? 0 : nfa[col-1] + nha[col-1];
        hn[col] = h[col] - 2*nfa[col] - nha[col] + cin;
      end
      for (col = 0; col < 2*n; col++) h[col] = hn[col];
    end
    return 0;
  endfunction

  function automatic int accum_next_rows(int rows, int order);
    int rest;
    rest = rows % order;
    return 2 * (rows / order) + ((rest >= 3) ? 2 : rest);
  endfunction

  function automatic int accum_stages(int rows, int order);
    int s;
    s = 0;
    while (rows > 2) begin
      rows = accum_next_rows(rows, order);
      s++;
    end
    return s;
  endfunction

  // Rows entering stage s of the row-wise reduction.
  function automatic int accum_rows(int rows, int order, int s);
    for (int i = 0; i < s; i++) rows = accum_next_rows(rows, order);
    return rows;
  endfunction

endpackage
