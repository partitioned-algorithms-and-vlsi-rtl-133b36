// type2_inv: Type-II module, inversion of an M x M upper triangular block.
//
// Computes V = U^-1 row by row from the bottom, following
//   v_ii = 1/u_ii,   v_ij = -(sum_{k=i+1..j} u_ik * v_kj) / u_ii   (j > i).
// The array holds a triangle of M(M-1)/2 multiply cells, column j owning j
// cells whose products u_ik*v_kj are summed into w_j (the cells are of the
// form a + b*c; here each forms its product and the column adds them), and a
// bottom row of M divide cells of the form -e/f. Each row
// takes two time units: the M phase latches the column sums w_j, the D phase
// writes row i of V (v_ii by feeding -1 into the diagonal divide cell).
// Rows of V not yet computed are held at zero, so a chain may sum over all of
// its cells without masking. The bottom row needs no sum and starts in the
// D phase, so the load cycle plus 2M-1 phases take 2M cycles, the module
// delay.
// The last row (v_MM) is produced first, the first row last.
//
// Interface: pulse `start` with U on `u_in` (only the upper triangle is
// used); it is latched in the start cycle (t1). `done` is high in the cycle
// 2M cycles after the start cycle; `v_out` is valid from
// then until the next start. `busy` is high in between.
//
// The cell triangle, the 2M delay and the bottom-up row order follow the
// module's description; whole-block loading and output are this design's
// choice.
module type2_inv
  import fxp_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t u_in  [M][M],
  output logic  busy,
  output logic  done,
  output word_t v_out [M][M]
);
  localparam int unsigned SW = (M > 1) ? $clog2(M) : 1;

  word_t         u_r [M][M];
  word_t         w_r [M];
  logic [SW-1:0] i;          // row being computed
  logic          phase;      // 0: M phase, 1: D phase

  // prod[j][k]: product u_ik * v_kj formed by the cell at (k, j) of the
  // triangle; colsum[j]: the column's accumulated sum
  word_t prod   [M][M];
  word_t colsum [M];
  word_t d_a    [M];
  word_t d_y    [M];

  for (genvar j = 0; j < M; j++) begin : g_col
    for (genvar kk = 0; kk < M; kk++) begin : g_k
      if (kk >= 1 && kk <= j) begin : g_cell
        m_cell #(.SUBTRACT(1'b0)) u_m (
          .a('0), .b(u_r[i][kk]), .c(v_out[kk][j]), .y(prod[j][kk]));
      end else begin : g_none
        assign prod[j][kk] = '0;
      end
    end
    always_comb begin
      colsum[j] = '0;
      for (int kk = 0; kk < M; kk++) colsum[j] = colsum[j] + prod[j][kk];
    end
    assign d_a[j] = (j == int'(i)) ? -FX_ONE : w_r[j];
    d_cell #(.NEGATE(1'b1)) u_d (.a(d_a[j]), .b(u_r[i][i]), .y(d_y[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      i     <= '0;
      phase <= 1'b0;
      for (int r = 0; r < M; r++) begin
        w_r[r] <= '0;
        for (int c = 0; c < M; c++) begin
          u_r[r][c]   <= '0;
          v_out[r][c] <= '0;
        end
      end
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          u_r   <= u_in;
          busy  <= 1'b1;
          i     <= SW'(M - 1);
          phase <= 1'b1;   // the bottom row has no sum to form
          for (int r = 0; r < M; r++)
            for (int c = 0; c < M; c++)
              v_out[r][c] <= '0;
        end
      end else if (!phase) begin
        for (int c = 0; c < M; c++) w_r[c] <= colsum[c];
        phase <= 1'b1;
      end else begin
        for (int c = 0; c < M; c++)
          if (c >= int'(i)) v_out[i][c] <= d_y[c];
        phase <= 1'b0;
        if (i == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          i <= i - 1'b1;
        end
      end
    end
  end
endmodule
