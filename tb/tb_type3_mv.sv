// tb_type3_mv: runs the reduced Type-III module on random jobs
// d_hat = d -/+ sum_{s=1..r} U(s)*x(s) with r from 1 to 5, compares the result
// with an integer reference and checks the M*r+1 cycle delay.
module tb_type3_mv;
  import fxp_pkg::*;
  localparam int unsigned M = 2;
  localparam int unsigned RMAX = 5;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, sub = 1'b1;
  logic in_valid = 1'b0, in_last = 1'b0;
  word_t d_in [M], u_col [M], x_elem, d_out [M];
  logic busy, done;
  int checks = 0, failures = 0;

  type3_mv #(.M(M)) dut (.clk(clk), .rst_n(rst_n), .start(start), .sub(sub),
    .d_in(d_in), .in_valid(in_valid), .in_last(in_last), .u_col(u_col),
    .x_elem(x_elem), .busy(busy), .done(done), .d_out(d_out));

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
    int d [M], U [RMAX][M][M], X [RMAX][M], e [M];
    int r, cyc;
    x_elem = '0;
    for (int i = 0; i < M; i++) begin d_in[i] = '0; u_col[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 50; trial++) begin
      r = rnd(1, RMAX);
      for (int i = 0; i < M; i++) begin
        d[i] = rnd(-30, 30);
        for (int s = 0; s < r; s++) begin
          X[s][i] = rnd(-9, 9);
          for (int j = 0; j < M; j++) U[s][i][j] = rnd(-9, 9);
        end
      end
      for (int i = 0; i < M; i++) begin
        e[i] = d[i];
        for (int s = 0; s < r; s++)
          for (int k = 0; k < M; k++) e[i] += (trial % 2 == 0 ? -1 : 1) * U[s][i][k] * X[s][k];
      end
      @(negedge clk);
      sub = (trial % 2 == 0);
      for (int i = 0; i < M; i++) d_in[i] = word_t'(d[i] <<< FRAC);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      for (int s = 0; s < r; s++)
        for (int t = 0; t < M; t++) begin
          for (int i = 0; i < M; i++) u_col[i] = word_t'(U[s][i][t] <<< FRAC);
          x_elem   = word_t'(X[s][t] <<< FRAC);
          in_valid = 1'b1;
          in_last  = (s == r - 1) && (t == M - 1);
          @(negedge clk);
          cyc++;
        end
      in_valid = 1'b0; in_last = 1'b0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != M * r + 1) begin failures++; $display("FAIL latency %0d exp %0d", cyc, M * r + 1); end
      for (int i = 0; i < M; i++) begin
        checks++;
        if (d_out[i] !== word_t'(e[i] <<< FRAC)) begin
          failures++; $display("FAIL d[%0d]=%0d exp %0d", i, d_out[i], e[i] <<< FRAC);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
