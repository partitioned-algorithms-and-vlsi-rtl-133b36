// d_cell: the divide (D) cell.
//
// It forms a/b (NEGATE=0, used by the L-U module to produce the multipliers
// l_ik = a_ik/a_kk) or -a/b (NEGATE=1, used by the triangular-inversion
// module, whose off-diagonal results are v_ij = -w_ij/u_ii). Combinational;
// the enclosing module registers its output. A zero divisor gives 0.
//
// Ports: a (dividend), b (divisor), y (quotient), fixed-point words.
module d_cell
  import fxp_pkg::*;
#(
  parameter bit NEGATE = 1'b0
) (
  input  word_t a,
  input  word_t b,
  output word_t y
);
  word_t q;
  always_comb begin
    q = fx_div(a, b);
    y = NEGATE ? -q : q;
  end
endmodule
