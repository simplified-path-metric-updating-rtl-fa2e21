// oem_sorter: Batcher odd-even merge sorting network for M paths.
//
// The network sorts into ascending order on either key: the path metric
// (KEY = KEY_METRIC) or the state number (KEY = KEY_STATE). In both cases an
// invalid path compares larger than any valid one, so invalid entries end at
// the bottom. The network is the classic odd-even merge sort: for every merge
// size 2p (p = 1, 2, 4, ... M/2) and every distance k = p, p/2, ... 1 there
// is one column of compare elements joining positions x and x+k that lie in
// the same block of 2p and whose offset from k mod p, taken modulo 2k, is
// below k. That gives (log2(M)^2 - log2(M) + 4) * 2^(log2(M)-2) - 1 compare
// elements in log2(M)*(log2(M)+1)/2 columns, the count used in the
// complexity comparison of the architecture (5, 19, 63, 191, 543, 1471 for
// M = 4 ... 128); mpath_pkg::oem_count gives it for the same index pattern.
//
// M must be a power of two, at least 2. Purely combinational; no pipeline
// registers are placed between the columns.
module oem_sorter
  import mpath_pkg::*;
#(
  parameter int        M   = 16,
  parameter sort_key_e KEY = KEY_METRIC
) (
  input  path_t d [M],
  output path_t q [M]
);

  localparam int LG     = $clog2(M);
  localparam int STAGES = LG * (LG + 1) / 2;

  // Partner below x in the column (p, k), or -1 when x is not the upper
  // (smaller-index) end of a compare element in that column.
  function automatic int lower_partner(int x, int p, int k);
    int j0, y;
    j0 = k % p;
    if (x < j0) return -1;
    if (((x - j0) % (2 * k)) >= k) return -1;
    y = x + k;
    if (y >= M) return -1;
    if ((x / (2 * p)) != (y / (2 * p))) return -1;
    return y;
  endfunction

  initial begin
    assert (M >= 2 && (M & (M - 1)) == 0)
      else $error("oem_sorter: M=%0d is not a power of two", M);
  end

  // Merge size p and distance k of column s (s = 0 .. STAGES-1).
  function automatic int col_p(int s);
    int n;
    n = 0;
    for (int sp = 0; sp < LG; sp++)
      for (int sk = 0; sk <= sp; sk++) begin
        if (n == s) return 1 << sp;
        n++;
      end
    return 1;
  endfunction

  function automatic int col_k(int s);
    int n;
    n = 0;
    for (int sp = 0; sp < LG; sp++)
      for (int sk = 0; sk <= sp; sk++) begin
        if (n == s) return 1 << (sp - sk);
        n++;
      end
    return 1;
  endfunction

  for (genvar s = 0; s < STAGES; s++) begin : g_col
    localparam int P = col_p(s);
    localparam int D = col_k(s);
    path_t i_v [M];
    path_t o_v [M];
    if (s == 0) begin : g_first
      assign i_v = d;
    end else begin : g_next
      assign i_v = g_col[s-1].o_v;
    end
    for (genvar x = 0; x < M; x++) begin : g_pos
      if (lower_partner(x, P, D) >= 0) begin : g_min
        assign o_v[x] = path_gt(i_v[x], i_v[x+D], KEY) ? i_v[x+D] : i_v[x];
      end else if (x >= D && lower_partner(x - D, P, D) == x) begin : g_max
        assign o_v[x] = path_gt(i_v[x-D], i_v[x], KEY) ? i_v[x-D] : i_v[x];
      end else begin : g_pass
        assign o_v[x] = i_v[x];
      end
    end
  end

  assign q = g_col[STAGES-1].o_v;

endmodule
