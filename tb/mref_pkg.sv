// mref_pkg: reference arithmetic for the M-algorithm testbenches.
//
// The functions here restate the trellis rules bit by bit, independently of
// the RTL: successor states, the transition label (parity of the shift
// register masked with the generator polynomials 561 and 753 octal), the four
// reproduction levels -96, -32, 32, 96 and the absolute-error transition
// metric. Also holds a plain insertion sort on integers.
package mref_pkg;

  localparam int K  = 9;
  localparam int SW = K - 1;
  localparam int G0 = 'o561;
  localparam int G1 = 'o753;

  function automatic int parity_masked(int r, int g);
    int p;
    p = 0;
    for (int i = 0; i < K; i++)
      if (((r >> i) & 1) && ((g >> i) & 1)) p = p ^ 1;
    return p;
  endfunction

  // Shift register value of the transition from state s on input bit b.
  function automatic int reg_of(int s, int b);
    return (b << (K - 1)) | s;
  endfunction

  function automatic int next_state(int s, int b);
    return reg_of(s, b) >> 1;
  endfunction

  function automatic int level_of(int r);
    int lab;
    lab = 2 * parity_masked(r, G1) + parity_masked(r, G0);
    case (lab)
      0: return -96;
      1: return -32;
      2: return 32;
      default: return 96;
    endcase
  endfunction

  function automatic int tm_of(int sym, int s, int b);
    int d;
    d = sym - level_of(reg_of(s, b));
    return d < 0 ? -d : d;
  endfunction

  function automatic void isort(ref int a[$]);
    for (int i = 1; i < a.size(); i++) begin
      int v, j;
      v = a[i];
      j = i - 1;
      while (j >= 0 && a[j] > v) begin
        a[j+1] = a[j];
        j--;
      end
      a[j+1] = v;
    end
  endfunction

endpackage
