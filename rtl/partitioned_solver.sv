// partitioned_solver: solves a dense linear system A*x = b of order n = K*M
// with fixed-size M x M modules, by partitioned L-U decomposition followed by
// partitioned back-substitution. It also carries the partitioned inverter of
// upper triangular matrices and the partitioned matrix multiplier as two
// independent engines with their own ports.
//
// Solver datapath: one Type-I module (local L-U of a diagonal block), two
// Type-II modules (inverses of U_qq and of L_qq; L_qq is inverted as the
// transpose of the upper triangular L_qq^T), a grid of K*(K+1) Type-III
// modules, one for each block of [A | b], and one reduced Type-III module
// (matrix-vector) for the triangular solve. A, and then L and U, are held in
// a block register file mem[p][q] (block row p, column q).
//
// Sequence (0-based block indices; b is an extra block column K whose first
// column is b, so the forward system L*d = b is solved by the same steps that
// produce the rows of U):
//   at start every grid module loads its block A_ij (b for column K)
//   for q = 0..K-1
//     A^_qq = L_qq*U_qq                               (Type-I)
//     L_qq^-1, U_qq^-1                                (two Type-II in parallel)
//     L_pq = A^_pq*U_qq^-1 (q<p<K), U_qp = L_qq^-1*A^_qp (q<p<=K), all on
//       the modules of those blocks, restarted (U_qK is d_q)
//     every block (i, j) with i, j > q folds in the term -L_iq*U_qj, all
//       in parallel, so that it holds A^_ij = A_ij - sum_{s<=q} L_is*U_sj
//   for p = K-1..0                                   (back-substitution)
//     U_pp^-1                                        (Type-II)
//     d^_p = d_p - sum_{q>p} U_pq*x_q                 (reduced Type-III)
//     x_p  = U_pp^-1*d^_p                             (reduced Type-III)
// After a run mem holds L (strictly lower part, unit diagonal implied) and U
// packed in place of A, and the vectors d = L^-1*b and x are kept.
//
// Overlap: the reduced blocks A^ of Algorithm 1 are sums over all earlier
// steps. Here each sum is built up in its own module one term per step, as
// soon as the L and U blocks of that step exist (look-ahead), instead of
// being formed from scratch when its step comes. Every step therefore costs
// the same fixed time, and a run grows linearly with n. The chain L-U ->
// inverses -> products -> update within a step is run one job after
// another, and the next step's L-U does not start before the update is
// finished. In the back-substitution the Type-II inversion of U_{p-1,p-1}
// starts as soon as U_pp^-1 is taken and runs during the matrix-vector jobs
// of block p; only the last block's inversion is waited for in full. Job
// lengths: a Type-III job of r terms occupies M*r+3 cycles (start, load,
// M*r products, capture), or M*r+2 for the d^ jobs of the back-substitution;
// an update round takes M cycles, the Type-I job 2M+2 and the Type-II jobs
// that follow it 2M+1. The grid size (one module per block, no sharing) and
// the job framing are this design's choices.
//
// Host interface (solver): while idle, `wr_en` writes `wr_data` to element
// (wr_row, wr_col) of [A | b] (wr_col = n addresses b). `rd_data` shows
// element (rd_row, rd_col) combinationally: columns 0..n-1 the packed L\U (or
// A before a run), column n the solution x, column n+1 the vector d.
// `start` (one cycle) begins a run; `busy` is high during it and `done`
// pulses at its end. The grid loads A in the start cycle, so a write must not
// share its cycle with `start`.
//
// Triangular inverter: `ti_*` ports of a partitioned_tri_inv, and matrix
// multiplier: `mm_*` ports of a partitioned_matmul, both with the same M and
// K and independent of the solver and of each other.
module partitioned_solver
  import fxp_pkg::*;
#(
  parameter int unsigned M = 2,
  parameter int unsigned K = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  // solver
  input  logic  start,
  output logic  busy,
  output logic  done,
  input  logic                         wr_en,
  input  logic [$clog2(K*M+2)-1:0]     wr_row,
  input  logic [$clog2(K*M+2)-1:0]     wr_col,
  input  word_t                        wr_data,
  input  logic [$clog2(K*M+2)-1:0]     rd_row,
  input  logic [$clog2(K*M+2)-1:0]     rd_col,
  output word_t                        rd_data,
  // triangular inverter
  input  logic  ti_start,
  input  word_t ti_u [K*M][K*M],
  output logic  ti_busy,
  output logic  ti_done,
  output word_t ti_v [K*M][K*M],
  // matrix multiplier
  input  logic  mm_start,
  input  word_t mm_a [K*M][K*M],
  input  word_t mm_b [K*M][K*M],
  output logic  mm_busy,
  output logic  mm_done,
  output word_t mm_c [K*M][K*M]
);
  localparam int unsigned N  = K * M;
  localparam int unsigned BW = $clog2(K + 1);                // block index 0..K
  localparam int unsigned TW = (M > 1) ? $clog2(M) : 1;      // index in a block

  typedef word_t blk_t [M][M];
  typedef word_t vec_t [M];

  typedef enum logic [3:0] {
    S_IDLE, S_DIAG, S_LU, S_LU_W, S_INV_W, S_MUL,
    S_LOAD, S_FEED, S_FEED_W, S_BS, S_BS_X, S_DONE
  } state_t;

  typedef enum logic [1:0] {J_UPD, J_MUL, J_MV1, J_MV2} job_t;

  // ---------------------------------------------------------------- storage
  blk_t mem  [K][K];
  vec_t bvec [K];
  vec_t dvec [K];
  vec_t xvec [K];

  // ---------------------------------------------------------------- control
  state_t        st;
  job_t          job;
  logic [BW-1:0] q, bp;
  logic [BW-1:0] s, rterms;
  logic [TW-1:0] t;
  blk_t          ahat_diag, uinv, linv;
  blk_t          uinv_nx;          // inverse of the next U_pp (back-substitution)
  logic          inv_pend, inv_rdy;  // that inversion is running / finished
  blk_t          ahat_l [K];
  blk_t          ahat_u [K];
  vec_t          dhat;

  // ------------------------------------------------------------ helpers
  function automatic blk_t col_blk(input vec_t v);
    blk_t r;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) r[i][j] = (j == 0) ? v[i] : '0;
    return r;
  endfunction

  function automatic blk_t upper(input blk_t a);
    blk_t r;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) r[i][j] = (j >= i) ? a[i][j] : '0;
    return r;
  endfunction

  function automatic blk_t transpose(input blk_t a);
    blk_t r;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) r[i][j] = a[j][i];
    return r;
  endfunction

  function automatic blk_t zero_blk();
    blk_t r;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) r[i][j] = '0;
    return r;
  endfunction

  // block column p of the extended matrix [A | b] in block row r
  function automatic blk_t ext_blk(input blk_t a_rp, input vec_t v_r, input int p);
    return (p < K) ? a_rp : col_blk(v_r);
  endfunction

  // ---------------------------------------------------------------- modules
  logic  t1_start, t1_busy, t1_done;
  blk_t  t1_l, t1_u;
  type1_lu #(.M(M)) u_type1 (
    .clk(clk), .rst_n(rst_n), .start(t1_start), .a_in(ahat_diag),
    .busy(t1_busy), .done(t1_done), .l_out(t1_l), .u_out(t1_u));

  logic  t2u_start, t2u_busy, t2u_done;
  blk_t  t2u_in, t2u_v;
  type2_inv #(.M(M)) u_type2_u (
    .clk(clk), .rst_n(rst_n), .start(t2u_start), .u_in(t2u_in),
    .busy(t2u_busy), .done(t2u_done), .v_out(t2u_v));

  logic  t2l_start, t2l_busy, t2l_done;
  blk_t  t2l_in, t2l_v;
  type2_inv #(.M(M)) u_type2_l (
    .clk(clk), .rst_n(rst_n), .start(t2l_start), .u_in(t2l_in),
    .busy(t2l_busy), .done(t2l_done), .v_out(t2l_v));

  // Type-III grid: one module per block (i, j) of [A | b], j = K being the
  // b column. Block (i, j) holds A^_ij in its accumulator: it loads A_ij at
  // the start of a run and, after each step q < min(i, j), folds in
  // -L_iq*U_qj. When its own step comes its A^ is taken out, and an
  // off-diagonal block's module is restarted for its product with an inverse.
  logic          ld_start, mul_start, feed_valid, feed_last;
  logic [K:0]    blk_done [K];
  blk_t          blk_d    [K][K+1];

  assign ld_start = (st == S_IDLE) && start;

  for (genvar bi = 0; bi < K; bi++) begin : g_r
    for (genvar bj = 0; bj <= K; bj++) begin : g_c
      localparam int MN = (bi < bj) ? bi : bj;   // the step that completes it
      blk_t  a0, bb, cb;
      vec_t  bcol, crow;
      logic  in_mul, in_upd;
      always_comb begin
        in_mul = (bi != bj) && (MN == int'(q));
        in_upd = (job == J_UPD) && MN > int'(q);
        a0 = zero_blk();
        if (ld_start) a0 = (bj < K) ? mem[bi][bj % K] : col_blk(bvec[bi]);
        bb = zero_blk();
        cb = zero_blk();
        if (job == J_MUL && in_mul) begin
          if (bi > bj) begin            // L_iq = A^_iq * U_qq^-1
            bb = ahat_l[(bi + K - int'(q) - 1) % K];
            cb = uinv;
          end else begin                // U_qj = L_qq^-1 * A^_qj
            bb = linv;
            cb = ahat_u[(bj + K - int'(q) - 1) % K];
          end
        end else if (in_upd) begin      // term L_iq * U_qj
          bb = mem[bi][q];
          cb = (bj < K) ? mem[q][bj % K] : col_blk(dvec[q]);
        end
        for (int i = 0; i < M; i++) begin
          bcol[i] = bb[i][t];
          crow[i] = cb[t][i];
        end
      end

      type3_mm #(.M(M)) u_t3 (
        .clk(clk), .rst_n(rst_n),
        .start(ld_start || (mul_start && in_mul)), .sub(ld_start),
        .a_in(a0),
        .in_valid(feed_valid && ((job == J_MUL && in_mul) || in_upd)),
        .in_last(feed_last && (job == J_MUL || MN == int'(q) + 1)),
        .b_col(bcol), .c_row(crow), .busy(),
        .done(blk_done[bi][bj]), .d_out(blk_d[bi][bj]));
    end
  end

  // reduced Type-III for the triangular solve
  logic  mv_start, mv_sub, mv_busy, mv_done;
  vec_t  mv_init, mv_ucol, mv_d;
  word_t mv_x;
  blk_t  mv_blk;
  vec_t  mv_xv;
  type3_mv #(.M(M)) u_type3_mv (
    .clk(clk), .rst_n(rst_n), .start(mv_start), .sub(mv_sub), .d_in(mv_init),
    .in_valid(feed_valid && (job == J_MV1 || job == J_MV2)), .in_last(feed_last),
    .u_col(mv_ucol), .x_elem(mv_x), .busy(mv_busy), .done(mv_done), .d_out(mv_d));

  always_comb begin
    int qq;
    qq = int'(bp) + 1 + int'(s);
    mv_blk  = zero_blk();
    mv_init = '{default: '0};
    mv_xv   = '{default: '0};
    if (job == J_MV1) begin
      mv_init = dvec[bp];
      if (qq < K) begin
        mv_blk = mem[bp][qq];
        mv_xv  = xvec[qq];
      end
    end else begin
      mv_blk = uinv;
      mv_xv  = dhat;
    end
    for (int i = 0; i < M; i++) mv_ucol[i] = mv_blk[i][t];
    mv_x = mv_xv[t];
  end

  assign feed_valid = (st == S_FEED);
  assign feed_last  = (st == S_FEED) && (s == rterms - 1'b1) && (int'(t) == M - 1);

  // -------------------------------------------------------- host read port
  always_comb begin
    int r, c;
    r = int'(rd_row);
    c = int'(rd_col);
    rd_data = '0;
    if (r < N) begin
      if (c < N)       rd_data = mem[r / M][c / M][r % M][c % M];
      else if (c == N) rd_data = xvec[r / M][r % M];
      else             rd_data = dvec[r / M][r % M];
    end
  end

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      job       <= J_UPD;
      q         <= '0;
      bp        <= '0;
      s         <= '0;
      t         <= '0;
      rterms    <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      t1_start  <= 1'b0;
      t2u_start <= 1'b0;
      t2l_start <= 1'b0;
      mul_start <= 1'b0;
      mv_start  <= 1'b0;
      mv_sub    <= 1'b1;
      t2u_in    <= zero_blk();
      t2l_in    <= zero_blk();
      ahat_diag <= zero_blk();
      uinv      <= zero_blk();
      uinv_nx   <= zero_blk();
      inv_pend  <= 1'b0;
      inv_rdy   <= 1'b0;
      linv      <= zero_blk();
      dhat      <= '{default: '0};
      for (int a = 0; a < K; a++) begin
        ahat_l[a] <= zero_blk();
        ahat_u[a] <= zero_blk();
        bvec[a]   <= '{default: '0};
        dvec[a]   <= '{default: '0};
        xvec[a]   <= '{default: '0};
        for (int c = 0; c < K; c++) mem[a][c] <= zero_blk();
      end
    end else begin
      done      <= 1'b0;
      t1_start  <= 1'b0;
      t2u_start <= 1'b0;
      t2l_start <= 1'b0;
      mul_start <= 1'b0;
      mv_start  <= 1'b0;
      // an inversion started ahead of time finishes while the back-
      // substitution of the previous block is still running
      if (inv_pend && t2u_done) begin
        uinv_nx  <= t2u_v;
        inv_rdy  <= 1'b1;
        inv_pend <= 1'b0;
      end
      unique case (st)
        S_IDLE: begin
          if (wr_en) begin
            int r, c;
            r = int'(wr_row);
            c = int'(wr_col);
            if (r < N && c < N)  mem[r / M][c / M][r % M][c % M] <= wr_data;
            if (r < N && c == N) bvec[r / M][r % M] <= wr_data;
          end
          if (start) begin
            busy <= 1'b1;
            q    <= '0;
            st   <= S_DIAG;
          end
        end

        // step q: every A^ of the step is complete in its block's module
        S_DIAG: begin
          ahat_diag <= blk_d[q][q];
          for (int j = 0; j < K; j++) begin
            if (int'(q) + 1 + j < K) ahat_l[j] <= blk_d[int'(q) + 1 + j][q];
            if (int'(q) + 1 + j <= K) ahat_u[j] <= blk_d[q][int'(q) + 1 + j];
          end
          st <= S_LU;
        end

        S_LU: begin
          t1_start <= 1'b1;
          st       <= S_LU_W;
        end

        S_LU_W: if (t1_done) begin
          for (int i = 0; i < M; i++)
            for (int j = 0; j < M; j++)
              mem[q][q][i][j] <= (j >= i) ? t1_u[i][j] : t1_l[i][j];
          t2u_in    <= t1_u;
          t2l_in    <= transpose(t1_l);
          t2u_start <= 1'b1;
          t2l_start <= 1'b1;
          st        <= S_INV_W;
        end

        S_INV_W: if (t2u_done) begin
          uinv     <= t2u_v;
          linv     <= transpose(t2l_v);
          st       <= S_MUL;
        end

        // L_pq = A^_pq*U_qq^-1, U_qp = L_qq^-1*A^_qp on the blocks' modules
        S_MUL: begin
          job       <= J_MUL;
          rterms    <= 1;
          mul_start <= 1'b1;
          s         <= '0;
          t         <= '0;
          st        <= S_LOAD;
        end

        // the start pulse reaches the modules (t1); products follow from t2
        S_LOAD: st <= S_FEED;

        // stream the products of the current job
        S_FEED: begin
          if (feed_last && job == J_UPD) begin
            q  <= q + 1'b1;     // the trailing blocks are up to date
            st <= S_DIAG;
          end else if (feed_last) begin
            st <= S_FEED_W;
          end else if (int'(t) == M - 1) begin
            t <= '0;
            s <= s + 1'b1;
          end else begin
            t <= t + 1'b1;
          end
        end

        S_FEED_W: begin
          if (job == J_MUL && blk_done[q][int'(q) + 1]) begin
            for (int p = 0; p <= K; p++) begin
              if (p > int'(q) && p < K) begin
                mem[p][q] <= blk_d[p][q];
                mem[q][p] <= blk_d[q][p];
              end
            end
            for (int i = 0; i < M; i++) dvec[q][i] <= blk_d[q][K][i][0];
            if (int'(q) == K - 1) begin
              bp <= BW'(K - 1);
              st <= S_BS;
            end else begin
              // look-ahead: every block of the trailing matrix takes its
              // term L_iq*U_qj now, all in parallel
              job    <= J_UPD;
              rterms <= 1;
              s      <= '0;
              t      <= '0;
              st     <= S_FEED;
            end
          end else if (job == J_MV1 && mv_done) begin
            dhat <= mv_d;
            st   <= S_BS_X;
          end else if (job == J_MV2 && mv_done) begin
            xvec[bp] <= mv_d;
            if (bp == '0) st <= S_DONE;
            else begin
              bp <= bp - 1'b1;
              st <= S_BS;
            end
          end
        end

        // back-substitution: take U_pp^-1 (inverting it first for the last
        // block), start the inversion of the next diagonal block so that it
        // runs during this block's matrix-vector jobs, then d^_p and x_p
        S_BS: begin
          if (inv_rdy || (inv_pend && t2u_done)) begin
            uinv     <= inv_rdy ? uinv_nx : t2u_v;
            inv_rdy  <= 1'b0;
            inv_pend <= 1'b0;
            if (bp != '0) begin
              t2u_in    <= upper(mem[bp - 1'b1][bp - 1'b1]);
              t2u_start <= 1'b1;
              inv_pend  <= 1'b1;
            end
            if (int'(bp) == K - 1) begin
              dhat <= dvec[bp];
              st   <= S_BS_X;
            end else begin
              job      <= J_MV1;
              rterms   <= BW'(K - 1) - bp;
              mv_start <= 1'b1;
              mv_sub   <= 1'b1;
              s        <= '0;
              t        <= '0;
              st       <= S_LOAD;
            end
          end else if (!inv_pend) begin
            t2u_in    <= upper(mem[bp][bp]);
            t2u_start <= 1'b1;
            inv_pend  <= 1'b1;
          end
        end

        S_BS_X: begin
          job      <= J_MV2;
          rterms   <= 1;
          mv_start <= 1'b1;
          mv_sub   <= 1'b0;
          s        <= '0;
          t        <= '0;
          st       <= S_LOAD;
        end

        S_DONE: begin
          busy <= 1'b0;
          done <= 1'b1;
          st   <= S_IDLE;
        end

        default: st <= S_IDLE;
      endcase
    end
  end

  // -------------------------------------------------- triangular inverter
  partitioned_tri_inv #(.M(M), .K(K)) u_tri_inv (
    .clk(clk), .rst_n(rst_n), .start(ti_start), .u_in(ti_u),
    .busy(ti_busy), .done(ti_done), .v_out(ti_v));

  // ----------------------------------------------------- matrix multiplier
  partitioned_matmul #(.M(M), .K(K)) u_matmul (
    .clk(clk), .rst_n(rst_n), .start(mm_start), .a_in(mm_a), .b_in(mm_b),
    .busy(mm_busy), .done(mm_done), .c_out(mm_c));

  // The product jobs of a step end together, in the capture state.
  a_mul_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
                                    (st == S_FEED_W && job == J_MUL) |-> blk_done[q][int'(q) + 1])
    else $error("partitioned_solver: block products out of step");
  // The U-side Type-II module is never restarted while it is still working.
  a_inv_free : assert property (@(posedge clk) disable iff (!rst_n)
                                t2u_start |-> !t2u_busy)
    else $error("partitioned_solver: Type-II restarted while busy");
  // The same holds for the Type-I and the reduced Type-III module.
  a_lu_free : assert property (@(posedge clk) disable iff (!rst_n)
                               t1_start |-> !t1_busy)
    else $error("partitioned_solver: Type-I restarted while busy");
  a_mv_free : assert property (@(posedge clk) disable iff (!rst_n)
                               mv_start |-> !mv_busy)
    else $error("partitioned_solver: matrix-vector job restarted while busy");
  // The L-side inverse is only taken together with the U-side one.
  a_inv_pair : assert property (@(posedge clk) disable iff (!rst_n)
                                t2l_done |-> t2u_done)
    else $error("partitioned_solver: Type-II modules out of step");
  // A write in the start cycle would miss the grid's load of A.
  a_start_alone : assert property (@(posedge clk) disable iff (!rst_n)
                                   ld_start |-> !wr_en)
    else $error("partitioned_solver: write in the start cycle");
  // Host writes are only taken while the solver is idle.
  a_write_idle : assert property (@(posedge clk) disable iff (!rst_n)
                                  wr_en |-> !busy)
    else $error("partitioned_solver: write while busy is ignored");
endmodule
