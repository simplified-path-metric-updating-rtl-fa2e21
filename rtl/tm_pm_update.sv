// tm_pm_update: transition metric computation and path metric updating.
//
// For each of the 2M transitions produced by the path extender it computes
// the distortion between the input symbol and the symbol labelling the
// transition, and adds it to the metric of the parent path. The document
// gives only this function; how transitions are labelled and which distortion
// is used are this design's choices:
//   * the K-bit shift register of a transition is r = {new state, decision
//     bit}; its two label bits are the parities of r masked with the generator
//     polynomials G1 and G0 (as in a rate-1/2 convolutional code);
//   * the 2-bit label picks one of four reproduction levels
//     {-3A, -A, +A, +3A} (label 0..3);
//   * the transition metric is the absolute difference |symbol - level|.
// Path metrics saturate at all-ones. A transition whose parent is not valid
// gets the all-ones metric.
//
// Interface: sym is the input symbol (two's complement); cur_metric[k] and
// cur_valid[k] describe survivor k; ext_state[b][k]/ext_dec[b][k] are the
// state and decision bit of survivor k extended by bit b; new_metric[b][k] is the updated metric of survivor k extended
// by bit b (b=0: set C0, state MSB 0; b=1: set C1, state MSB 1).
// Purely combinational.
module tm_pm_update
  import mpath_pkg::*;
#(
  parameter int          M  = 16,
  parameter logic [K-1:0] G0 = K'(9'o561),
  parameter logic [K-1:0] G1 = K'(9'o753),
  parameter int          A  = 32
) (
  input  logic signed [SYMW-1:0] sym,
  input  logic [MW-1:0]          cur_metric [M],
  input  logic                   cur_valid  [M],
  input  logic [SW-1:0]          ext_state  [2][M],
  input  logic                   ext_dec    [2][M],
  output logic [MW-1:0]          new_metric [2][M]
);

  // Reproduction level of a 2-bit transition label.
  function automatic logic signed [SYMW+1:0] level(logic [1:0] lab);
    case (lab)
      2'd0:    return -(SYMW+2)'(3 * A);
      2'd1:    return -(SYMW+2)'(A);
      2'd2:    return  (SYMW+2)'(A);
      default: return  (SYMW+2)'(3 * A);
    endcase
  endfunction

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      for (int k = 0; k < M; k++) begin
        logic [K-1:0]            r;
        logic [1:0]              lab;
        logic signed [SYMW+1:0]  diff;
        logic [TMW-1:0]          tm;
        r    = {ext_state[b][k], ext_dec[b][k]};
        lab  = {^(r & G1), ^(r & G0)};
        diff = (SYMW+2)'(sym) - level(lab);
        tm   = TMW'(diff < 0 ? -diff : diff);
        new_metric[b][k] = cur_valid[k] ? metric_add(cur_metric[k], tm) : METRIC_MAX;
      end
    end
  end

endmodule
