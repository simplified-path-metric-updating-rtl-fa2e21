// path_selector: the sorting and selection block (second method).
//
// Inputs are the two extended sets C0 and C1, each already in ascending state
// order because the previous survivors were state-sorted. The block
//   1. discards merged paths in each set (path_merge_reject),
//   2. sorts each set by path metric (two M-item odd-even merge sorters),
//   3. keeps the M best of the 2M paths with one column of compare elements
//      (bitonic_merger),
//   4. sorts those M survivors by state number (a third M-item sorter), so
//      that the next extension again yields state-sorted C0 and C1 sets.
// Three M-item sorters plus one merge column replace the two 2M-item sorters
// of the earlier state-then-metric scheme. The order of steps is the
// document's; that it is one combinational network is this design's choice.
//
// Interface: c0, c1 are the sets (invalid entries at the bottom); surv are
// the M survivors in ascending state order with invalid entries last;
// min_metric is the smallest valid metric among them (taken from the heads
// of the two metric-sorted sets); rej0/rej1 flag discarded merged paths;
// from_c1 flags survivors taken from C1. Combinational.
module path_selector
  import mpath_pkg::*;
#(
  parameter int M = 16
) (
  input  path_t         c0 [M],
  input  path_t         c1 [M],
  output path_t         surv [M],
  output logic [MW-1:0] min_metric,
  output logic [M-1:0]  rej0,
  output logic [M-1:0]  rej1,
  output logic [M-1:0]  from_c1
);

  path_t r0 [M], r1 [M];
  path_t s0 [M], s1 [M];
  path_t best [M];

  path_merge_reject #(.M(M)) u_rej0 (.d(c0), .q(r0), .rejected(rej0));
  path_merge_reject #(.M(M)) u_rej1 (.d(c1), .q(r1), .rejected(rej1));

  oem_sorter #(.M(M), .KEY(KEY_METRIC)) u_msort0 (.d(r0), .q(s0));
  oem_sorter #(.M(M), .KEY(KEY_METRIC)) u_msort1 (.d(r1), .q(s1));

  bitonic_merger #(.M(M)) u_merge (.a(s0), .b(s1), .q(best), .from_b(from_c1));

  oem_sorter #(.M(M), .KEY(KEY_STATE)) u_ssort (.d(best), .q(surv));

  assign min_metric = path_gt(s0[0], s1[0], KEY_METRIC) ? s1[0].metric : s0[0].metric;

endmodule
