// m_cell: the multiply (M) cell, the basic arithmetic cell of all module types.
//
// It forms a - b*c (SUBTRACT=1, the form used in the L-U module and the
// accumulated multiply units) or a + b*c (SUBTRACT=0, the form used in the
// triangular-inversion module). The cell is purely combinational; the
// modules that use it place their latches (registers) around it, so one pass
// through a cell is one time unit of the modules' schedules.
//
// Ports: a, b, c are fixed-point words (fxp_pkg), y the result.
module m_cell
  import fxp_pkg::*;
#(
  parameter bit SUBTRACT = 1'b1
) (
  input  word_t a,
  input  word_t b,
  input  word_t c,
  output word_t y
);
  word_t prod;
  always_comb begin
    prod = fx_mul(b, c);
    y    = SUBTRACT ? (a - prod) : (a + prod);
  end
endmodule
