// path_merge_reject: suppression of merged paths in one state-sorted set.
//
// Within C0 (or C1) the states are in ascending order, the valid paths first,
// so two paths that reach the same state are neighbours. One compare element
// per neighbouring pair (j, j+1) checks for equal states; when both paths are
// valid and merge, the one with the larger path metric is discarded (on equal
// metrics the lower one, j+1, is discarded). Since the survivors of the
// previous step have distinct states, a state occurs at most twice in a set,
// so the pairs never conflict. A discarded path becomes invalid with the
// all-ones metric and keeps its place in the list. The document specifies
// what this block decides; the pairwise neighbour compare is this design's
// realisation of it.
//
// Interface: d[j] is the input set, q[j] the same set with the merged paths
// discarded, rejected[j] is set where path j was discarded. Combinational.
module path_merge_reject
  import mpath_pkg::*;
#(
  parameter int M = 16
) (
  input  path_t       d [M],
  output path_t       q [M],
  output logic [M-1:0] rejected
);

  logic [M-1:0] merge_hi;   // path j merges with path j+1

  always_comb begin
    for (int j = 0; j < M; j++) begin
      if (j < M - 1)
        merge_hi[j] = d[j].valid && d[j+1].valid && (d[j].state == d[j+1].state);
      else
        merge_hi[j] = 1'b0;
    end
    for (int j = 0; j < M; j++) begin
      rejected[j] = 1'b0;
      if (j > 0 && merge_hi[j-1] && d[j].metric >= d[j-1].metric)
        rejected[j] = 1'b1;
      if (merge_hi[j] && d[j].metric > d[j+1].metric)
        rejected[j] = 1'b1;
      q[j] = rejected[j] ? PATH_NONE : d[j];
    end
  end

endmodule
