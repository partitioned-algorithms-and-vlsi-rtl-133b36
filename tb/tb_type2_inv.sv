// tb_type2_inv: drives the triangular-inversion module with random upper
// triangular blocks (integer entries, power-of-two diagonal, random junk below
// the diagonal that must be ignored), compares V with an inverse computed in
// real arithmetic by back-substitution, checks U*V = I, and checks that
// `done` comes exactly 2M cycles after `start`.
module tb_type2_inv;
  import fxp_pkg::*;
  localparam int unsigned M = 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  word_t u_in [M][M];
  word_t v_out [M][M];
  logic busy, done;
  int checks = 0, failures = 0;

  type2_inv #(.M(M)) dut (.clk(clk), .rst_n(rst_n), .start(start), .u_in(u_in),
                          .busy(busy), .done(done), .v_out(v_out));

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

  initial begin
    real U [M][M], V [M][M], s, pr;
    int cyc;
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) u_in[i][j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 40; trial++) begin
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          int e;
          e = (i == j) ? ((rnd(0, 1) ? 1 : -1) * (1 << rnd(0, 2))) : (j > i ? rnd(-3, 3) : 0);
          U[i][j] = e;
          u_in[i][j] = (j >= i) ? word_t'(e <<< FRAC) : word_t'($urandom);
        end
      // reference inverse, bottom row first
      for (int i = M - 1; i >= 0; i--)
        for (int j = 0; j < M; j++) begin
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
      if (cyc != 2 * M) begin failures++; $display("FAIL latency %0d, expected %0d", cyc, 2 * M); end
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          checks++;
          if (absr($itor(v_out[i][j]) / 65536.0 - V[i][j]) > 1.0e-3) begin
            failures++; $display("FAIL V[%0d][%0d]=%f exp %f", i, j, $itor(v_out[i][j]) / 65536.0, V[i][j]);
          end
          pr = 0.0;
          for (int k = 0; k < M; k++) pr += U[i][k] * ($itor(v_out[k][j]) / 65536.0);
          checks++;
          if (absr(pr - ((i == j) ? 1.0 : 0.0)) > 1.0e-3) begin
            failures++; $display("FAIL (U*V)[%0d][%0d]=%f", i, j, pr);
          end
        end
      repeat (rnd(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
