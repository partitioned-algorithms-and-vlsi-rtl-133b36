// tb_m_cell: checks both forms of the multiply cell (a - b*c and a + b*c)
// against a 64-bit reference of the Q15.16 product, on random operands and a
// few hand-picked values.
module tb_m_cell;
  import fxp_pkg::*;

  word_t a, b, c, ys, ya;
  int checks = 0, failures = 0;

  m_cell #(.SUBTRACT(1'b1)) dut_s (.a(a), .b(b), .c(c), .y(ys));
  m_cell #(.SUBTRACT(1'b0)) dut_a (.a(a), .b(b), .c(c), .y(ya));

  function automatic longint ref_prod(input word_t x, input word_t y);
    longint p;
    p = longint'(x) * longint'(y);
    // floor division by 2^16
    if (p >= 0) return p / 65536;
    return -((-p + 65535) / 65536);
  endfunction

  task automatic check(input word_t ta, input word_t tb_, input word_t tc);
    word_t es, ea;
    a = ta; b = tb_; c = tc;
    #1;
    es = word_t'(longint'(ta) - ref_prod(tb_, tc));
    ea = word_t'(longint'(ta) + ref_prod(tb_, tc));
    checks += 2;
    if (ys !== es) begin failures++; $display("FAIL sub a=%0d b=%0d c=%0d y=%0d exp=%0d", ta, tb_, tc, ys, es); end
    if (ya !== ea) begin failures++; $display("FAIL add a=%0d b=%0d c=%0d y=%0d exp=%0d", ta, tb_, tc, ya, ea); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'sd5 <<< 16, 32'sd2 <<< 16, 32'sd3 <<< 16);        // 5 - 2*3 = -1
    check(32'sd0, -(32'sd1 <<< 15), 32'sd3 <<< 16);             // -0.5*3
    check(32'sd7, 32'sd1, 32'sd1);                              // tiny product
    check(32'sd1 <<< 16, -(32'sd1), 32'sd1);                    // rounding of negative
    for (int n = 0; n < 500; n++)
      check(word_t'($urandom) >>> 4, word_t'($urandom) >>> 10, word_t'($urandom) >>> 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
