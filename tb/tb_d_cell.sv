// tb_d_cell: checks both forms of the divide cell (a/b and -a/b) against a
// real-valued quotient (within one LSB of truncation), exact cases, and the
// zero-divisor rule.
module tb_d_cell;
  import fxp_pkg::*;

  word_t a, b, yp, yn;
  int checks = 0, failures = 0;

  d_cell #(.NEGATE(1'b0)) dut_p (.a(a), .b(b), .y(yp));
  d_cell #(.NEGATE(1'b1)) dut_n (.a(a), .b(b), .y(yn));

  task automatic check_exact(input word_t ta, input word_t tb_, input word_t e);
    a = ta; b = tb_;
    #1;
    checks += 2;
    if (yp !== e)  begin failures++; $display("FAIL a/b %0d/%0d = %0d exp %0d", ta, tb_, yp, e); end
    if (yn !== -e) begin failures++; $display("FAIL -a/b %0d/%0d = %0d exp %0d", ta, tb_, yn, -e); end
  endtask

  task automatic check_real(input word_t ta, input word_t tb_);
    real q;
    a = ta; b = tb_;
    #1;
    q = ($itor(ta) / $itor(tb_)) * 65536.0;
    checks += 2;
    if ($itor(yp) - q > 1.0 || q - $itor(yp) > 1.0) begin
      failures++; $display("FAIL a/b %0d/%0d = %0d exp~%f", ta, tb_, yp, q);
    end
    if ($itor(yn) + q > 1.0 || -q - $itor(yn) > 1.0) begin
      failures++; $display("FAIL -a/b %0d/%0d = %0d exp~%f", ta, tb_, yn, -q);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_exact(32'sd6 <<< 16, 32'sd3 <<< 16, 32'sd2 <<< 16);
    check_exact(32'sd1 <<< 16, 32'sd4 <<< 16, 32'sd1 <<< 14);
    check_exact(-(32'sd3 <<< 16), 32'sd2 <<< 16, -(32'sd3 <<< 15));
    check_exact(32'sd5 <<< 16, 32'sd0, 32'sd0);
    for (int n = 0; n < 500; n++) begin
      word_t bb;
      bb = word_t'($urandom) >>> 8;
      if (bb < 1024 && bb > -1024) bb = 1024;  // keep the quotient in range
      check_real(word_t'($urandom) >>> 8, bb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
