// bitonic_merger: selects the M paths with the smallest metrics out of two
// metric-sorted lists of M paths.
//
// List a ascending followed by list b descending is a bitonic sequence of 2M
// items. The first column of a bitonic sorter compares item i with item i+M;
// after it, the upper M positions hold the M smallest items, not in sorted
// order. With b reversed, that column compares a[i] with b[M-1-i], and only
// the smaller output of each compare element is kept: M compare elements in
// one layer. Invalid paths count as larger than valid ones.
//
// Interface: a and b ascending by metric; q[i] is the smaller of a[i] and
// b[M-1-i]; from_b[i] is set when q[i] came from b. Combinational.
module bitonic_merger
  import mpath_pkg::*;
#(
  parameter int M = 16
) (
  input  path_t        a [M],
  input  path_t        b [M],
  output path_t        q [M],
  output logic [M-1:0] from_b
);

  always_comb begin
    for (int i = 0; i < M; i++) begin
      from_b[i] = path_gt(a[i], b[M-1-i], KEY_METRIC);
      q[i]      = from_b[i] ? b[M-1-i] : a[i];
    end
  end

endmodule
