// tb_type1_lu: drives the L-U module with blocks A = L*U built from random
// integer factors (unit lower L, upper U with power-of-two diagonal, so the
// fixed-point elimination is exact), checks L and U element by element
// against the factors, and checks that `done` comes exactly 2M cycles after
// `start`.
module tb_type1_lu;
  import fxp_pkg::*;
  localparam int unsigned M = 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  word_t a_in [M][M];
  word_t l_out [M][M], u_out [M][M];
  logic busy, done;
  int checks = 0, failures = 0;

  type1_lu #(.M(M)) dut (.clk(clk), .rst_n(rst_n), .start(start), .a_in(a_in),
                         .busy(busy), .done(done), .l_out(l_out), .u_out(u_out));

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

  initial begin
    int L [M][M], U [M][M], A [M][M];
    int cyc;
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) a_in[i][j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 40; trial++) begin
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          L[i][j] = (i == j) ? 1 : (i > j ? rnd(-3, 3) : 0);
          U[i][j] = (i == j) ? ((rnd(0, 1) ? 1 : -1) * (1 << rnd(0, 2))) : (j > i ? rnd(-4, 4) : 0);
        end
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          A[i][j] = 0;
          for (int k = 0; k < M; k++) A[i][j] += L[i][k] * U[k][j];
          a_in[i][j] = word_t'(A[i][j] <<< FRAC);
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
          checks += 2;
          if (l_out[i][j] !== word_t'(L[i][j] <<< FRAC)) begin
            failures++; $display("FAIL L[%0d][%0d]=%0d exp %0d", i, j, l_out[i][j], L[i][j] <<< FRAC);
          end
          if (u_out[i][j] !== word_t'(U[i][j] <<< FRAC)) begin
            failures++; $display("FAIL U[%0d][%0d]=%0d exp %0d", i, j, u_out[i][j], U[i][j] <<< FRAC);
          end
        end
      repeat (rnd(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
