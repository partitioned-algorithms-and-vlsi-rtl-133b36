// tb_partitioned_tri_inv: inverts random n x n upper triangular matrices
// (integer entries, +-1/+-2 diagonal, junk below the diagonal) with the
// partitioned inverter, compares V with an inverse computed in real
// arithmetic, checks U*V = I, and checks the run length against the
// schedule (2M+2 cycles for the diagonal inversions, then 2M+3 cycles per
// round of the block sums). K = 4 makes the longest sum span three rounds.
module tb_partitioned_tri_inv;
  import fxp_pkg::*;
  localparam int unsigned M = 2;
  localparam int unsigned K = 4;
  localparam int unsigned N = K * M;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  word_t u_in [N][N], v_out [N][N];
  logic busy, done;
  int checks = 0, failures = 0;

  partitioned_tri_inv #(.M(M), .K(K)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .u_in(u_in), .busy(busy), .done(done), .v_out(v_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic int sched(input int m, input int k);
    int c;
    c = 2 * m + 2;
    for (int d = 1; d < k; d++) c += 2 * m + 3;
    return c;
  endfunction

  initial begin
    real U [N][N], V [N][N], s, pr;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 20; trial++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          int e;
          e = (i == j) ? ((rnd(0, 1) != 0 ? 1 : -1) * (1 << rnd(0, 1))) : (j > i ? rnd(-2, 2) : 0);
          U[i][j] = e;
          u_in[i][j] = (j >= i) ? word_t'(e <<< FRAC) : word_t'($urandom);
        end
      for (int i = N - 1; i >= 0; i--)
        for (int j = 0; j < N; j++) begin
          if (j < i) V[i][j] = 0.0;
          else if (j == i) V[i][j] = 1.0 / U[i][i];
          else begin
            s = 0.0;
            for (int k = i + 1; k <= j; k++) s += U[i][k] * V[k][j];
            V[i][j] = -s / U[i][i];
          end
        end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != sched(M, K)) begin failures++; $display("FAIL run took %0d cycles, schedule %0d", cyc, sched(M, K)); end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          checks++;
          if (absr($itor(v_out[i][j]) / 65536.0 - V[i][j]) > 1.0e-3) begin
            failures++; $display("FAIL V[%0d][%0d]=%f exp %f", i, j, $itor(v_out[i][j]) / 65536.0, V[i][j]);
          end
          pr = 0.0;
          for (int k = 0; k < N; k++) pr += U[i][k] * ($itor(v_out[k][j]) / 65536.0);
          checks++;
          if (absr(pr - ((i == j) ? 1.0 : 0.0)) > 1.0e-3) begin
            failures++; $display("FAIL (U*V)[%0d][%0d]=%f", i, j, pr);
          end
        end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
