// path_ext_update: path extension and path metric update.
//
// Turns the M survivors of time t into the 2M extended paths of time t+1,
// grouped into the sets C0 and C1. Each survivor state is the contents of a
// K-1 bit shift register with the newest input bit in the MSB. Extending
// shifts a 0 (set C0) or a 1 (set C1) into the MSB and shifts the LSB out;
// the bit shifted out is the decision bit of the new path, 0 when the path is
// the upper of the two transitions that can reach its state and 1 when it is
// the lower. Because the shift keeps the order of the states, state-sorted
// survivors give state-sorted C0 and C1 sets, in which two paths reaching the
// same state are neighbours. The metric of every extended path comes from
// tm_pm_update (transition metric from the input symbol plus parent metric).
// A path extended from an empty survivor is empty. The structure (two shift
// registers feeding the transition metric unit, decision bits from the
// register ends, metrics delivered per set) is the one the document draws.
//
// Interface: surv[k] are the survivors in ascending state order; sym is the
// input symbol; c0[k] and c1[k] are survivor k extended by bit 0 and bit 1.
// Purely combinational.
module path_ext_update
  import mpath_pkg::*;
#(
  parameter int M = 16
) (
  input  path_t                  surv [M],
  input  logic signed [SYMW-1:0] sym,
  output path_t                  c0 [M],
  output path_t                  c1 [M]
);

  logic [MW-1:0] cur_metric [M];
  logic          cur_valid  [M];
  logic [SW-1:0] ext_state  [2][M];
  logic          ext_dec    [2][M];
  logic [MW-1:0] new_metric [2][M];

  // Shift-register extension of every survivor state.
  always_comb begin
    for (int k = 0; k < M; k++) begin
      cur_metric[k] = surv[k].metric;
      cur_valid[k]  = surv[k].valid;
      for (int b = 0; b < 2; b++) begin
        ext_state[b][k] = {b[0], surv[k].state[SW-1:1]};
        ext_dec[b][k]   = surv[k].state[0];
      end
    end
  end

  tm_pm_update #(.M(M)) u_tm (
    .sym        (sym),
    .cur_metric (cur_metric),
    .cur_valid  (cur_valid),
    .ext_state  (ext_state),
    .ext_dec    (ext_dec),
    .new_metric (new_metric)
  );

  always_comb begin
    for (int k = 0; k < M; k++) begin
      c0[k] = '{valid: surv[k].valid, state: ext_state[0][k], metric: new_metric[0][k], dec: ext_dec[0][k]};
      c1[k] = '{valid: surv[k].valid, state: ext_state[1][k], metric: new_metric[1][k], dec: ext_dec[1][k]};
      if (!surv[k].valid) begin
        c0[k] = PATH_NONE;
        c1[k] = PATH_NONE;
      end
    end
  end

endmodule
