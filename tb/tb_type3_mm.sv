// tb_type3_mm: runs the Type-III module on random jobs
// D = A -/+ sum_{s=1..r} B(s)*C(s) with r from 1 to 5, streaming the terms as
// column/row pairs, compares D with an integer reference and checks that
// `done` comes exactly M*r+1 cycles after `start`.
module tb_type3_mm;
  import fxp_pkg::*;
  localparam int unsigned M = 2;
  localparam int unsigned RMAX = 5;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, sub = 1'b1;
  logic in_valid = 1'b0, in_last = 1'b0;
  word_t a_in [M][M], b_col [M], c_row [M], d_out [M][M];
  logic busy, done;
  int checks = 0, failures = 0;

  type3_mm #(.M(M)) dut (.clk(clk), .rst_n(rst_n), .start(start), .sub(sub),
    .a_in(a_in), .in_valid(in_valid), .in_last(in_last), .b_col(b_col),
    .c_row(c_row), .busy(busy), .done(done), .d_out(d_out));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  initial begin
    int A [M][M], B [RMAX][M][M], C [RMAX][M][M], D [M][M];
    int r, cyc;
    for (int i = 0; i < M; i++) begin
      b_col[i] = '0; c_row[i] = '0;
      for (int j = 0; j < M; j++) a_in[i][j] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 50; trial++) begin
      r = rnd(1, RMAX);
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          A[i][j] = rnd(-30, 30);
          for (int s = 0; s < r; s++) begin B[s][i][j] = rnd(-9, 9); C[s][i][j] = rnd(-9, 9); end
        end
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          D[i][j] = A[i][j];
          for (int s = 0; s < r; s++)
            for (int k = 0; k < M; k++)
              D[i][j] += (trial % 2 == 0 ? -1 : 1) * B[s][i][k] * C[s][k][j];
        end
      @(negedge clk);
      sub = (trial % 2 == 0);
      for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) a_in[i][j] = word_t'(A[i][j] <<< FRAC);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      for (int s = 0; s < r; s++)
        for (int t = 0; t < M; t++) begin
          for (int i = 0; i < M; i++) begin
            b_col[i] = word_t'(B[s][i][t] <<< FRAC);
            c_row[i] = word_t'(C[s][t][i] <<< FRAC);
          end
          in_valid = 1'b1;
          in_last  = (s == r - 1) && (t == M - 1);
          @(negedge clk);
          cyc++;
        end
      in_valid = 1'b0; in_last = 1'b0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != M * r + 1) begin failures++; $display("FAIL latency %0d exp %0d", cyc, M * r + 1); end
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          checks++;
          if (d_out[i][j] !== word_t'(D[i][j] <<< FRAC)) begin
            failures++; $display("FAIL d[%0d][%0d]=%0d exp %0d", i, j, d_out[i][j], D[i][j] <<< FRAC);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
