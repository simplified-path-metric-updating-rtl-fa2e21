// m_algo_pmu: path metric updating unit of an M-algorithm trellis search.
//
// The unit keeps the M best paths of a 2^(K-1)-state, two-branch trellis and
// advances them by one trellis step per accepted input symbol:
//   path_ext_update M survivors -> 2M extended paths in sets C0/C1 with
//                   their states, decision bits and updated metrics
//                   (transition metric from the input symbol, tm_pm_update),
//   path_selector   merged path rejection, metric sort of C0 and C1, bitonic
//                   merge to the M best, state sort of the survivors,
// and the survivor register closes the loop. Survivors are held in ascending
// state order, which is what lets the selector split its sorting into three
// M-item sorters. This structure is the document's. The following are this
// design's own choices: one whole step per clock cycle with no pipelining,
// synchronous active-low reset, the start condition (a single valid path in
// state 0 with metric 0, all others empty), and metric normalisation: at every
// step the smallest survivor metric (min_metric of the selector) is subtracted
// from all survivors, and reported on step_min, so stored metrics stay small
// and the best path always has metric 0. merge_cnt (merged paths discarded)
// and c1_cnt (survivors taken from set C1) report on the last step. The
// survivor memory that traces back the decoded sequence is outside this
// unit; it receives the decision bits and states of the survivors on the
// surv_* outputs.
//
// Timing: when sym_valid is high at a rising clock edge the step is taken and
// the new survivors appear on surv_* with out_valid high in the next cycle
// (latency 1, one symbol per cycle). start (synchronous) reloads the start
// condition, as does reset.
module m_algo_pmu
  import mpath_pkg::*;
#(
  parameter int M = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   sym_valid,
  input  logic signed [SYMW-1:0] sym,
  output logic                   out_valid,
  output logic                   surv_valid  [M],
  output logic [SW-1:0]          surv_state  [M],
  output logic                   surv_dec    [M],
  output logic [MW-1:0]          surv_metric [M],
  output logic [MW-1:0]          step_min,
  output logic [$clog2(2*M+1)-1:0] merge_cnt,
  output logic [$clog2(M+1)-1:0]   c1_cnt,
  output logic                   best_found,
  output logic [SW-1:0]          best_state,
  output logic                   best_dec
);

  path_t surv_q [M];

  path_t         c0 [M], c1 [M];
  path_t         sel [M];
  logic [MW-1:0] min_metric;
  logic [M-1:0]  rej0, rej1, from_c1;

  path_ext_update #(.M(M)) u_ext (
    .surv (surv_q),
    .sym  (sym),
    .c0   (c0),
    .c1   (c1)
  );

  path_selector #(.M(M)) u_sel (
    .c0         (c0),
    .c1         (c1),
    .surv       (sel),
    .min_metric (min_metric),
    .rej0       (rej0),
    .rej1       (rej1),
    .from_c1    (from_c1)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      for (int k = 0; k < M; k++)
        surv_q[k] <= (k == 0) ? '{valid: 1'b1, state: '0, metric: '0, dec: 1'b0} : PATH_NONE;
      out_valid <= 1'b0;
      step_min  <= '0;
      merge_cnt <= '0;
      c1_cnt    <= '0;
    end else begin
      out_valid <= sym_valid;
      if (sym_valid) begin
        for (int k = 0; k < M; k++) begin
          surv_q[k] <= sel[k];
          if (sel[k].valid && sel[k].metric != METRIC_MAX)
            surv_q[k].metric <= sel[k].metric - min_metric;
        end
        step_min  <= min_metric;
        merge_cnt <= $bits(merge_cnt)'($countones({rej0, rej1}));
        c1_cnt    <= $bits(c1_cnt)'($countones(from_c1));
      end
    end
  end

  always_comb begin
    for (int k = 0; k < M; k++) begin
      surv_valid[k]  = surv_q[k].valid;
      surv_state[k]  = surv_q[k].state;
      surv_dec[k]    = surv_q[k].dec;
      surv_metric[k] = surv_q[k].metric;
    end
    best_found = 1'b0;
    best_state = '0;
    best_dec   = 1'b0;
    for (int k = M - 1; k >= 0; k--) begin
      if (surv_q[k].valid && surv_q[k].metric == '0) begin
        best_found = 1'b1;
        best_state = surv_q[k].state;
        best_dec   = surv_q[k].dec;
      end
    end
  end

endmodule
