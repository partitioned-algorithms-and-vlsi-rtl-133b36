// tb_partitioned_matmul: multiplies random n x n matrices (n = K*M) with the
// K*K-module partitioned multiplier, compares C with an integer reference and
// checks that `done` comes exactly n+1 cycles after `start`.
module tb_partitioned_matmul;
  import fxp_pkg::*;
  localparam int unsigned M = 2;
  localparam int unsigned K = 3;
  localparam int unsigned N = K * M;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  word_t a_in [N][N], b_in [N][N], c_out [N][N];
  logic busy, done;
  int checks = 0, failures = 0;

  partitioned_matmul #(.M(M), .K(K)) dut (.clk(clk), .rst_n(rst_n), .start(start),
    .a_in(a_in), .b_in(b_in), .busy(busy), .done(done), .c_out(c_out));

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
    int A [N][N], B [N][N], C [N][N];
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 10; trial++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          A[i][j] = rnd(-9, 9); B[i][j] = rnd(-9, 9);
          a_in[i][j] = word_t'(A[i][j] <<< FRAC);
          b_in[i][j] = word_t'(B[i][j] <<< FRAC);
        end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          C[i][j] = 0;
          for (int k = 0; k < N; k++) C[i][j] += A[i][k] * B[k][j];
        end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != N + 1) begin failures++; $display("FAIL latency %0d exp %0d", cyc, N + 1); end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          checks++;
          if (c_out[i][j] !== word_t'(C[i][j] <<< FRAC)) begin
            failures++; $display("FAIL c[%0d][%0d]=%0d exp %0d", i, j, c_out[i][j], C[i][j] <<< FRAC);
          end
        end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
