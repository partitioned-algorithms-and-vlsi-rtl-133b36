// type3_amu: accumulated multiply unit (AMU) of the Type-III module.
//
// One multiply cell with its accumulator register fed back to the cell input.
// `load` latches the initial value a (time t1); each later cycle with `step`
// high folds one product in: acc <- acc - b*c (SUB=1) or acc + b*c (SUB=0).
// After the last product the accumulator holds the result on `acc`.
// `load` takes priority over `step`. The choice between subtracting and
// adding per job (`sub`) is this design's addition; the module described
// only subtracts.
module type3_amu
  import fxp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  word_t a,
  input  logic  step,
  input  logic  sub,
  input  word_t b,
  input  word_t c,
  output word_t acc
);
  word_t c_eff, y;

  // Adding is done by the same subtracting cell with c negated.
  assign c_eff = sub ? c : -c;
  m_cell #(.SUBTRACT(1'b1)) u_m (.a(acc), .b(b), .c(c_eff), .y(y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc <= '0;
    else if (load) acc <= a;
    else if (step) acc <= y;
  end
endmodule
