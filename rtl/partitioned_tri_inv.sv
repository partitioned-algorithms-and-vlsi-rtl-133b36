// partitioned_tri_inv: partitioned inversion of an n x n upper triangular
// matrix U (n = K*M) with K Type-II modules and K(K-1)/2 Type-III modules,
// one Type-III module per block above the block diagonal.
//
// Step 1: the K Type-II modules invert all diagonal blocks at once,
//         V_pp = U_pp^-1.
// Step 2: every block V_p,p+q (distance q = 1..K-1 from the diagonal) is
//           W_p,p+q = sum_{r=1..q} U_p,p+r * V_p+r,p+q
//           V_p,p+q = -V_pp * W_p,p+q      (formed as 0 - V_pp*W)
//         The term with index r needs a block of V at distance q-r, so the
//         sums are built up in rounds d = 1..K-1. Before round d all blocks
//         of distance below d are known. In round d every block at distance
//         q >= d folds in its term r = q-d+1 (the one that uses a block of
//         distance d-1, just finished), all in parallel. Blocks with q = d
//         then hold their complete W, and their modules are restarted for
//         V = -V_pp*W. Each sum therefore grows while the blocks it needs
//         are produced, and each round adds a fixed time to the run, so the
//         run time grows linearly with K rather than quadratically.
// The algorithm (Eq. 19 form of the sums, K Type-II modules, at most
// K(K-1)/2 Type-III modules) follows the partitioned inversion method; the
// round structure is this design's way of overlapping the substeps, and it
// spends one cycle per round more than the published schedule.
//
// Interface: `u_in` must stay stable while `busy`; the lower triangle is
// ignored. `start` begins a run; `done` pulses when `v_out` (zero below the
// diagonal) is complete. The W accumulators are cleared together with the
// Type-II start. Timing, from the start cycle to the done cycle: 2M+2
// cycles for step 1, then 2M+3 per round (M product cycles, one capture
// cycle, then load, M product cycles and capture of the V job).
module partitioned_tri_inv
  import fxp_pkg::*;
#(
  parameter int unsigned M = 2,
  parameter int unsigned K = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t u_in  [K*M][K*M],
  output logic  busy,
  output logic  done,
  output word_t v_out [K*M][K*M]
);
  localparam int unsigned BW = $clog2(K + 1);
  localparam int unsigned TW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;

  typedef word_t blk_t [M][M];

  typedef enum logic [2:0] {S_IDLE, S_INV, S_FEED, S_FEED_W, S_LOAD} state_t;

  state_t        st;
  logic          vph;         // 0: W round, 1: V = -V_pp*W job
  logic [BW-1:0] d;           // round = distance being completed
  logic [TW-1:0] t;
  blk_t          vb [K][K];   // blocks of V
  blk_t          wb [K];      // complete W of block (p, p+d)
  logic          w_start, v_start;

  function automatic blk_t ublk(input int bp, input int bq);
    blk_t r;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        r[i][j] = (bp < K && bq < K && (bp != bq || j >= i)) ? u_in[bp*M + i][bq*M + j] : '0;
    return r;
  endfunction

  function automatic blk_t zero_blk();
    blk_t r;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) r[i][j] = '0;
    return r;
  endfunction

  // ------------------------------------------------ step 1: Type-II modules
  logic t2_start;
  logic [K-1:0] t2_done;
  blk_t t2_v [K];
  for (genvar p = 0; p < K; p++) begin : g_t2
    blk_t in_blk;
    logic unused_busy;
    assign in_blk = ublk(p, p);
    type2_inv #(.M(M)) u_t2 (
      .clk(clk), .rst_n(rst_n), .start(t2_start), .u_in(in_blk),
      .busy(unused_busy), .done(t2_done[p]), .v_out(t2_v[p]));
  end

  // ------------------------------- step 2: one Type-III module per block
  logic [K-1:0] t3_done [K];
  blk_t         t3_d    [K][K];
  for (genvar bi = 0; bi < K; bi++) begin : g_r
    for (genvar bj = 0; bj < K; bj++) begin : g_c
      if (bj > bi) begin : g_blk
        localparam int QD = bj - bi;       // distance from the diagonal
        blk_t  bb, cb;
        word_t b_col [M];
        word_t c_row [M];
        logic  w_act, v_act, unused_busy;
        assign w_act = !vph && (QD >= int'(d));
        assign v_act = vph && (QD == int'(d));
        always_comb begin
          bb = zero_blk();
          cb = zero_blk();
          if (w_act) begin
            // term r = QD-d+1: U_bi,bj-d+1 * V_bj-d+1,bj
            bb = ublk(bi, bj - int'(d) + 1);
            cb = vb[(bj - int'(d) + 1) % K][bj];
          end else if (v_act) begin
            bb = vb[bi][bi];
            cb = wb[bi];
          end
          for (int i = 0; i < M; i++) begin
            b_col[i] = bb[i][t];
            c_row[i] = cb[t][i];
          end
        end
        type3_mm #(.M(M)) u_t3 (
          .clk(clk), .rst_n(rst_n),
          .start(w_start || (v_start && QD == int'(d))), .sub(v_start),
          .a_in(zero_blk()),
          .in_valid((st == S_FEED) && (w_act || v_act)),
          .in_last((QD == int'(d)) && (int'(t) == M - 1)),
          .b_col(b_col), .c_row(c_row), .busy(unused_busy),
          .done(t3_done[bi][bj]), .d_out(t3_d[bi][bj]));
      end else begin : g_none
        assign t3_done[bi][bj] = 1'b0;
        assign t3_d[bi][bj]    = zero_blk();
      end
    end
  end

  for (genvar bi = 0; bi < K; bi++) begin : g_oi
    for (genvar bj = 0; bj < K; bj++) begin : g_oj
      for (genvar i = 0; i < M; i++) begin : g_i
        for (genvar j = 0; j < M; j++) begin : g_j
          assign v_out[bi*M + i][bj*M + j] = vb[bi][bj][i][j];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      busy     <= 1'b0;
      done     <= 1'b0;
      vph      <= 1'b0;
      d        <= '0;
      t        <= '0;
      t2_start <= 1'b0;
      w_start  <= 1'b0;
      v_start  <= 1'b0;
      for (int a = 0; a < K; a++) begin
        wb[a] <= zero_blk();
        for (int b = 0; b < K; b++) vb[a][b] <= zero_blk();
      end
    end else begin
      done     <= 1'b0;
      t2_start <= 1'b0;
      w_start  <= 1'b0;
      v_start  <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          busy     <= 1'b1;
          t2_start <= 1'b1;
          w_start  <= (K > 1);     // clear every W accumulator meanwhile
          vph      <= 1'b0;
          d        <= 1;
          for (int a = 0; a < K; a++)
            for (int b = 0; b < K; b++) vb[a][b] <= zero_blk();
          st <= S_INV;
        end
        S_INV: if (t2_done[0]) begin
          for (int a = 0; a < K; a++) vb[a][a] <= t2_v[a];
          t <= '0;
          if (K == 1) begin
            busy <= 1'b0;
            done <= 1'b1;
            st   <= S_IDLE;
          end else begin
            st <= S_FEED;
          end
        end
        S_FEED: begin
          if (int'(t) == M - 1) st <= S_FEED_W;
          else                  t  <= t + 1'b1;
        end
        // the modules of distance d are done: W (then V) of those blocks
        S_FEED_W: begin
          t <= '0;
          if (!vph) begin
            for (int a = 0; a < K; a++)
              if (a + int'(d) < K) wb[a] <= t3_d[a][a + int'(d)];
            vph     <= 1'b1;
            v_start <= 1'b1;
            st      <= S_LOAD;
          end else begin
            for (int a = 0; a < K; a++)
              if (a + int'(d) < K) vb[a][a + int'(d)] <= t3_d[a][a + int'(d)];
            vph <= 1'b0;
            if (int'(d) == K - 1) begin
              busy <= 1'b0;
              done <= 1'b1;
              st   <= S_IDLE;
            end else begin
              d  <= d + 1'b1;
              st <= S_FEED;
            end
          end
        end
        S_LOAD: st <= S_FEED;   // t1 of the V jobs
        default: st <= S_IDLE;
      endcase
    end
  end

  // The diagonal inversions all finish in the same cycle.
  a_diag_done : assert property (@(posedge clk) disable iff (!rst_n)
                                 t2_done[0] |-> &t2_done)
    else $error("partitioned_tri_inv: Type-II modules out of step");

  // The blocks of the round being completed finish together.
  if (K > 1) begin : g_chk
    a_round_done : assert property (@(posedge clk) disable iff (!rst_n)
                                    (st == S_FEED_W) |-> t3_done[0][d[KW-1:0]])
      else $error("partitioned_tri_inv: blocks of distance d not done on time");
  end
endmodule
