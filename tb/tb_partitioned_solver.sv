// tb_partitioned_solver: end-to-end test of the partitioned solver at its
// default size. Each run builds A = L*U from random integer factors (unit
// lower L, upper U with a +-1/+-2 diagonal, so every step is exact in the
// fixed-point format) and b = A*x for a random integer x, writes [A | b]
// through the host port, starts a solve, and checks the packed L\U,
// d = L^-1 b and x against the generating values, and the solve time
// against the cycle count of the schedule.
//
// It counts how often each mechanism of the sequencer ran and fails any that
// never did: local L-U, the two triangular inversions, update rounds that
// complete diagonal and off-diagonal blocks, updates to blocks whose own
// step is further ahead (look-ahead), several block products ending
// together, the forward step on the b column, back-substitution with and
// without a block update, and the inversion of the next U_pp overlapping the
// current block's matrix-vector jobs. It also runs the partitioned matrix
// multiplier (checking its result and its n+1 cycle delay) and the
// partitioned triangular inverter on the last U (checking U*V = I).
module tb_partitioned_solver;
  import fxp_pkg::*;
  localparam int unsigned M = 2;
  localparam int unsigned K = 3;
  localparam int unsigned N = K * M;
  localparam int unsigned AW = $clog2(N + 2);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic wr_en = 1'b0;
  logic [AW-1:0] wr_row = '0, wr_col = '0, rd_row = '0, rd_col = '0;
  word_t wr_data = '0, rd_data;
  logic ti_start = 1'b0, ti_busy, ti_done;
  word_t ti_u [N][N], ti_v [N][N];
  logic mm_start = 1'b0, mm_busy, mm_done;
  word_t mm_a [N][N], mm_b [N][N], mm_c [N][N];
  int checks = 0, failures = 0;

  partitioned_solver dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .wr_en(wr_en), .wr_row(wr_row), .wr_col(wr_col), .wr_data(wr_data),
    .rd_row(rd_row), .rd_col(rd_col), .rd_data(rd_data),
    .ti_start(ti_start), .ti_u(ti_u), .ti_busy(ti_busy), .ti_done(ti_done),
    .ti_v(ti_v),
    .mm_start(mm_start), .mm_a(mm_a), .mm_b(mm_b), .mm_busy(mm_busy),
    .mm_done(mm_done), .mm_c(mm_c));

  always #5 clk = ~clk;

  // ------------------------------------------------ mechanism counters
  int n_lu = 0, n_inv = 0, n_ahat_diag = 0, n_ahat_off = 0, n_mul = 0;
  int n_parallel = 0, n_bcol = 0, n_bs_update = 0, n_bs_plain = 0, n_mm = 0, n_ti = 0;
  int n_bs_overlap = 0, n_early = 0;
  always @(negedge clk) if (rst_n) begin
    int nd;
    if (dut.u_type1.done) n_lu++;
    if (dut.u_type2_l.done) n_inv++;
    nd = 0;
    for (int i = 0; i < K; i++)
      for (int j = 0; j <= K; j++)
        if (dut.blk_done[i][j]) begin
          nd++;
          if (dut.job == dut.J_UPD && i == j) n_ahat_diag++;
          if (dut.job == dut.J_UPD && i != j) n_ahat_off++;
          if (dut.job == dut.J_MUL && j == K) n_bcol++;
        end
    if (dut.job == dut.J_MUL) n_mul += nd;
    if (dut.job == dut.J_MUL && nd > 1) n_parallel++;
    // look-ahead: a round also feeds blocks whose own step is further off
    if (dut.st == dut.S_FEED && dut.job == dut.J_UPD && dut.feed_last)
      for (int i = 0; i < K; i++)
        for (int j = 0; j <= K; j++)
          if (i > int'(dut.q) + 1 && j > int'(dut.q) + 1) n_early++;
    if (dut.u_type3_mv.done && dut.job == dut.J_MV1) n_bs_update++;
    if (dut.st == dut.S_BS && dut.u_type2_u.done && int'(dut.bp) == K - 1) n_bs_plain++;
    if (dut.u_type2_u.busy && dut.u_type3_mv.busy) n_bs_overlap++;
    if (mm_done) n_mm++;
    if (ti_done) n_ti++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  // Cycles from the start cycle to the cycle in which `done` is high, for the
  // schedule of the sequencer: each Type-III job costs a start cycle, a load
  // cycle (t1), M cycles per term and one capture cycle; each Type-I / Type-II
  // job costs a start cycle plus 2M+1 cycles of waiting. In the
  // back-substitution the inversion of the next U_pp (2M cycles) runs during
  // the current block's jobs, and only the part it sticks out is waited for.
  function automatic int solve_cycles(input int m, input int k);
    int c;
    c = 1;                                            // idle cycle with start
    for (int q = 0; q < k; q++) begin
      c += 1;                                         // take the A^ blocks
      c += 1 + (2 * m + 1) + (2 * m + 1);             // L-U, then both inversions
      c += m + 3;                                     // all block products at once
      if (q < k - 1) c += m;                          // update of the trailing blocks
    end
    c += 2 * m + 2;                                   // U_kk^-1, waited for
    for (int bp = k - 1; bp >= 0; bp--) begin
      int len;
      len = (bp < k - 1) ? m * (k - 1 - bp) + 2 : 0;  // d^_p
      len += m + 3;                                   // x_p
      c += len;
      // U_pp^-1 of the next block was started with this block's jobs
      if (bp > 0) c += 1 + ((2 * m > len) ? 2 * m - len : 0);
    end
    return c + 1;                                     // done state
  endfunction

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic expect_val(input int r, input int c, input real e, input string what);
    real got;
    @(negedge clk);
    rd_row = AW'(r); rd_col = AW'(c);
    #1;
    got = $itor(rd_data) / 65536.0;
    checks++;
    if (absr(got - e) > 1.0 / 256.0) begin
      failures++;
      $display("FAIL %s (%0d,%0d) = %f expected %f", what, r, c, got, e);
    end
  endtask

  int L [N][N], U [N][N], A [N][N], X [N], B [N], D [N];

  task automatic solve_once(input int trial);
    int cyc;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        L[i][j] = (i == j) ? 1 : (i > j ? rnd(-2, 2) : 0);
        U[i][j] = (i == j) ? ((rnd(0, 1) != 0 ? 1 : -1) * (1 << rnd(0, 1))) : (j > i ? rnd(-2, 2) : 0);
      end
    for (int i = 0; i < N; i++) X[i] = rnd(-4, 4);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        A[i][j] = 0;
        for (int k = 0; k < N; k++) A[i][j] += L[i][k] * U[k][j];
      end
    for (int i = 0; i < N; i++) begin
      B[i] = 0;
      for (int j = 0; j < N; j++) B[i] += A[i][j] * X[j];
    end
    for (int i = 0; i < N; i++) begin
      D[i] = 0;
      for (int j = 0; j < N; j++) D[i] += U[i][j] * X[j];
    end
    // load [A | b]
    for (int i = 0; i < N; i++)
      for (int j = 0; j <= N; j++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_row = AW'(i); wr_col = AW'(j);
        wr_data = word_t'(((j < N) ? A[i][j] : B[i]) <<< FRAC);
      end
    @(negedge clk);
    wr_en = 1'b0;
    begin
      int r; r = rnd(0, N - 1);
      expect_val(r, 1, A[r][1], "loaded A");
    end
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    $display("solve %0d: %0d cycles", trial, cyc);
    checks++;
    if (cyc != solve_cycles(M, K)) begin
      failures++; $display("FAIL solve took %0d cycles, schedule gives %0d", cyc, solve_cycles(M, K));
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        expect_val(i, j, (j >= i) ? U[i][j] : L[i][j], (j >= i) ? "U" : "L");
    for (int i = 0; i < N; i++) begin
      expect_val(i, N, X[i], "x");
      expect_val(i, N + 1, D[i], "d");
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin mm_a[i][j] = '0; mm_b[i][j] = '0; ti_u[i][j] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 4; trial++) solve_once(trial);

    // partitioned matrix multiplication: C = L * U must give back A
    begin
      int cyc;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          mm_a[i][j] = word_t'(L[i][j] <<< FRAC);
          mm_b[i][j] = word_t'(U[i][j] <<< FRAC);
        end
      @(negedge clk);
      mm_start = 1'b1;
      @(negedge clk);
      mm_start = 1'b0;
      cyc = 1;
      while (!mm_done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != N + 1) begin failures++; $display("FAIL matmul delay %0d exp %0d", cyc, N + 1); end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          checks++;
          if (mm_c[i][j] !== word_t'(A[i][j] <<< FRAC)) begin
            failures++; $display("FAIL C[%0d][%0d]", i, j);
          end
        end
    end

    // partitioned triangular inversion: V = U^-1 must satisfy U*V = I
    begin
      real pr;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) ti_u[i][j] = word_t'(U[i][j] <<< FRAC);
      @(negedge clk);
      ti_start = 1'b1;
      @(negedge clk);
      ti_start = 1'b0;
      while (!ti_done) @(negedge clk);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          pr = 0.0;
          for (int k = 0; k < N; k++) pr += U[i][k] * ($itor(ti_v[k][j]) / 65536.0);
          checks++;
          if (absr(pr - ((i == j) ? 1.0 : 0.0)) > 1.0e-3) begin
            failures++; $display("FAIL (U*V)[%0d][%0d]=%f", i, j, pr);
          end
        end
    end

    repeat (2) @(negedge clk);
    $display("mechanisms: lu=%0d inv=%0d ahat_diag=%0d ahat_off=%0d mul=%0d bcol=%0d bs_update=%0d bs_plain=%0d mm=%0d ti=%0d parallel=%0d bs_overlap=%0d early=%0d",
             n_lu, n_inv, n_ahat_diag, n_ahat_off, n_mul, n_bcol, n_bs_update, n_bs_plain, n_mm, n_ti, n_parallel, n_bs_overlap, n_early);
    checks += 13;
    if (n_early == 0)     begin failures++; $display("FAIL no block was updated ahead of its step"); end
    if (n_bs_overlap == 0) begin failures++; $display("FAIL U_pp inversion never overlapped a back-substitution job"); end
    if (n_parallel == 0)  begin failures++; $display("FAIL block products never ran in parallel"); end
    if (n_ti == 0)        begin failures++; $display("FAIL no triangular matrix inversion"); end
    if (n_lu == 0)        begin failures++; $display("FAIL no local L-U"); end
    if (n_inv == 0)       begin failures++; $display("FAIL no triangular inversion"); end
    if (n_ahat_diag == 0) begin failures++; $display("FAIL no update round completed a diagonal block"); end
    if (n_ahat_off == 0)  begin failures++; $display("FAIL no update round completed an off-diagonal block"); end
    if (n_mul == 0)       begin failures++; $display("FAIL no L/U block product"); end
    if (n_bcol == 0)      begin failures++; $display("FAIL no forward step on b"); end
    if (n_bs_update == 0) begin failures++; $display("FAIL no back-substitution update"); end
    if (n_bs_plain == 0)  begin failures++; $display("FAIL no back-substitution of the last block"); end
    if (n_mm == 0)        begin failures++; $display("FAIL no matrix multiplication"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
