// mpath_pkg: types, constants and helper functions shared by the M-algorithm
// path metric updating datapath.
//
// A path (one entry of the M-survivor list) carries a valid flag, its trellis
// state number (K-1 bits), its accumulated path metric and the decision bit of
// the last transition. The state width follows from the constraint length K
// (a 2^(K-1)-state trellis built on a K-bit shift register) and the decision
// word is one bit, as in a two-branch trellis. K, the metric width and the
// symbol width are this design's own choices; the document fixes none of them.
//
// Ordering rule used by every compare element: invalid paths compare larger
// than every valid path, so they always drift to the bottom of a sorted list
// and are the first to be dropped by the merger.
package mpath_pkg;

  // Constraint length: 2^(K-1) trellis states.
  localparam int K    = 9;
  localparam int SW   = K - 1;   // state number width
  localparam int MW   = 16;      // path metric width (saturating)
  localparam int SYMW = 8;       // input symbol width (two's complement)
  localparam int TMW  = 8;       // transition metric width (unsigned)

  localparam logic [MW-1:0] METRIC_MAX = '1;

  typedef struct packed {
    logic          valid;
    logic [SW-1:0] state;
    logic [MW-1:0] metric;
    logic          dec;
  } path_t;

  typedef enum logic {
    KEY_METRIC = 1'b0,
    KEY_STATE  = 1'b1
  } sort_key_e;

  // An empty list entry.
  localparam path_t PATH_NONE = '{valid: 1'b0, state: '0, metric: METRIC_MAX, dec: 1'b0};

  // True when a must be placed below b (a is "larger") for the given key.
  function automatic logic path_gt(path_t a, path_t b, sort_key_e key);
    if (key == KEY_METRIC)
      return {~a.valid, a.metric} > {~b.valid, b.metric};
    else
      return {~a.valid, a.state} > {~b.valid, b.state};
  endfunction

  // Saturating metric addition.
  function automatic logic [MW-1:0] metric_add(logic [MW-1:0] pm, logic [TMW-1:0] tm);
    logic [MW:0] s;
    s = {1'b0, pm} + {{(MW+1-TMW){1'b0}}, tm};
    return s[MW] ? METRIC_MAX : s[MW-1:0];
  endfunction

  // Number of compare elements of Batcher's odd-even merge sort on n = 2^p
  // items, counted over exactly the index pattern oem_sorter builds.
  function automatic int oem_count(int n);
    int cnt;
    cnt = 0;
    for (int p = 1; p < n; p = p * 2)
      for (int k = p; k >= 1; k = k / 2)
        for (int j = k % p; j + k < n; j = j + 2 * k)
          for (int i = 0; i < k; i++)
            if ((i + j + k < n) && ((i + j) / (2 * p) == (i + j + k) / (2 * p)))
              cnt++;
    return cnt;
  endfunction

endpackage
