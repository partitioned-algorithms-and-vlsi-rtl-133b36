// partitioned_matmul: partitioned multiplication of two n x n matrices,
// C = A * B with n = K*M, on K*K Type-III modules working in parallel.
//
// Module (p,q) accumulates C_pq = sum_{r=1..K} A_pr * B_rq. After `start`
// (t1, every module loads zero) the K terms are streamed to all modules at
// once, one column of A_pr and one row of B_rq per cycle, so the whole product
// takes M*K+1 = n+1 cycles. A and B must stay stable on `a_in`/`b_in` while
// `busy`; `done` pulses when `c_out` is valid, n+1 cycles after the start
// cycle; `busy` stays high until the cycle after `done`.
//
// The number of modules (K^2) and the n+1 delay follow the algorithm as
// described; presenting A and B as whole-matrix ports and the internal column
// counter are this design's choices.
module partitioned_matmul
  import fxp_pkg::*;
#(
  parameter int unsigned M = 2,
  parameter int unsigned K = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t a_in  [K*M][K*M],
  input  word_t b_in  [K*M][K*M],
  output logic  busy,
  output logic  done,
  output word_t c_out [K*M][K*M]
);
  localparam int unsigned N  = K * M;
  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] col;      // global column of A / row of B being streamed
  logic          streaming;
  word_t         zero_blk [M][M];
  logic [K*K-1:0] mod_done;

  always_comb
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) zero_blk[i][j] = '0;

  for (genvar p = 0; p < K; p++) begin : g_p
    for (genvar q = 0; q < K; q++) begin : g_q
      word_t b_col [M];
      word_t c_row [M];
      word_t d_blk [M][M];
      logic  unused_busy;
      always_comb
        for (int i = 0; i < M; i++) begin
          b_col[i] = a_in[p*M + i][col];
          c_row[i] = b_in[col][q*M + i];
        end
      type3_mm #(.M(M)) u_t3 (
        .clk(clk), .rst_n(rst_n), .start(start && !busy), .sub(1'b0),
        .a_in(zero_blk), .in_valid(streaming), .in_last(int'(col) == N - 1),
        .b_col(b_col), .c_row(c_row), .busy(unused_busy),
        .done(mod_done[p*K + q]), .d_out(d_blk));
      for (genvar i = 0; i < M; i++) begin : g_oi
        for (genvar j = 0; j < M; j++) begin : g_oj
          assign c_out[p*M + i][q*M + j] = d_blk[i][j];
        end
      end
    end
  end

  assign done = mod_done[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      streaming <= 1'b0;
      col       <= '0;
    end else if (!busy) begin
      if (start) begin
        busy      <= 1'b1;
        streaming <= 1'b1;
        col       <= '0;
      end
    end else if (streaming) begin
      if (int'(col) == N - 1) streaming <= 1'b0;
      else                    col       <= col + 1'b1;
    end else if (done) begin
      busy <= 1'b0;
    end
  end

  // All K*K modules run the same job and finish in the same cycle.
  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
                                mod_done[0] |-> &mod_done)
    else $error("partitioned_matmul: modules out of step");
endmodule
