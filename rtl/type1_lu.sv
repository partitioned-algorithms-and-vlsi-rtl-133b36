// type1_lu: Type-I module, local L-U decomposition of an M x M block.
//
// Given a block A it produces the unit lower triangular L and the upper
// triangular U with A = L*U, by Gaussian elimination with natural ordering
// (no pivoting). Elimination step k takes two time units (clock cycles):
//   D phase: M-1 divide cells form l_ik = a_ik / a_kk for every row i > k;
//            row k of the working matrix is the k-th row of U.
//   M phase: (M-1)^2 multiply cells update a_ij <- a_ij - l_ik * a_kj for
//            i, j > k, and the result is fed back into the working register
//            (the multiplexer feedback of the module).
// The last step has no trailing submatrix and ends after its D phase, so the
// load cycle plus M-1 full steps plus one D phase take 2M cycles, the module
// delay of the design.
//
// Interface: pulse `start` for one cycle with the block on `a_in`; the block
// is latched that cycle (t1). `done` is high in the cycle 2M cycles after the
// start cycle, with `l_out`/`u_out` valid from then until the next start. `busy` is
// high in between; a start while busy is ignored.
//
// The cell counts, the 2M delay and the row/column order of the results
// follow the module's description. Loading the whole block in one cycle
// (rather than staggered by rows) and presenting the results as whole blocks
// are choices of this design.
module type1_lu
  import fxp_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t a_in  [M][M],
  output logic  busy,
  output logic  done,
  output word_t l_out [M][M],
  output word_t u_out [M][M]
);
  localparam int unsigned SW = (M > 1) ? $clog2(M) : 1;

  word_t           a_r [M][M];   // working matrix
  word_t           lcol[M];      // multipliers of the current step
  logic [SW-1:0]   k;            // elimination step
  logic            phase;        // 0: D phase, 1: M phase

  word_t d_y [M];
  word_t m_y [M][M];

  // Divide cells, one per row below the first (row 0 never needs one).
  for (genvar i = 1; i < M; i++) begin : g_d
    d_cell #(.NEGATE(1'b0)) u_d (.a(a_r[i][k]), .b(a_r[k][k]), .y(d_y[i]));
  end
  assign d_y[0] = '0;

  // Multiply cells for the trailing (M-1) x (M-1) submatrix.
  for (genvar i = 1; i < M; i++) begin : g_mr
    for (genvar j = 1; j < M; j++) begin : g_mc
      m_cell #(.SUBTRACT(1'b1)) u_m (.a(a_r[i][j]), .b(lcol[i]), .c(a_r[k][j]), .y(m_y[i][j]));
    end
  end
  for (genvar i = 0; i < M; i++) begin : g_mz
    assign m_y[i][0] = '0;
    if (i == 0) begin : g_r0
      for (genvar j = 1; j < M; j++) begin : g_z
        assign m_y[0][j] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      k     <= '0;
      phase <= 1'b0;
      for (int i = 0; i < M; i++) begin
        lcol[i] <= '0;
        for (int j = 0; j < M; j++) begin
          a_r[i][j]   <= '0;
          l_out[i][j] <= '0;
          u_out[i][j] <= '0;
        end
      end
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_r   <= a_in;
          busy  <= 1'b1;
          k     <= '0;
          phase <= 1'b0;
          for (int i = 0; i < M; i++)
            for (int j = 0; j < M; j++) begin
              l_out[i][j] <= (i == j) ? FX_ONE : '0;
              u_out[i][j] <= '0;
            end
        end
      end else if (!phase) begin
        // D phase: multipliers of column k, row k of U
        for (int i = 0; i < M; i++) begin
          lcol[i] <= (i > int'(k)) ? d_y[i] : '0;
          if (i > int'(k)) l_out[i][k] <= d_y[i];
          if (i >= int'(k)) u_out[k][i] <= a_r[k][i];
        end
        // the last step has no trailing submatrix: it ends after its D phase
        if (int'(k) == M - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          phase <= 1'b1;
        end
      end else begin
        // M phase: update trailing submatrix
        for (int i = 1; i < M; i++)
          for (int j = 1; j < M; j++)
            if (i > int'(k) && j > int'(k)) a_r[i][j] <= m_y[i][j];
        phase <= 1'b0;
        k     <= k + 1'b1;
      end
    end
  end
endmodule
