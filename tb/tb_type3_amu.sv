// tb_type3_amu: loads an accumulated multiply unit with a start value, steps
// it through random products in both subtract and add mode (with idle cycles
// in between) and compares the accumulator with an integer reference.
module tb_type3_amu;
  import fxp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0, sub = 1'b1;
  word_t a = '0, b = '0, c = '0, acc;
  int checks = 0, failures = 0;

  type3_amu dut (.clk(clk), .rst_n(rst_n), .load(load), .a(a), .step(step),
                 .sub(sub), .b(b), .c(c), .acc(acc));

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
    longint expv;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 60; trial++) begin
      int n;
      @(negedge clk);
      expv = rnd(-50, 50);
      a = word_t'(expv <<< FRAC);
      load = 1'b1;
      sub = trial[0];
      @(negedge clk);
      load = 1'b0;
      n = rnd(1, 8);
      for (int s = 0; s < n; s++) begin
        int x, y;
        x = rnd(-20, 20); y = rnd(-20, 20);
        b = word_t'(x <<< FRAC); c = word_t'(y <<< FRAC);
        step = 1'b1;
        expv = sub ? expv - x * y : expv + x * y;
        @(negedge clk);
        step = 1'b0;
        if (rnd(0, 2) == 0) begin
          b = word_t'($urandom); c = word_t'($urandom);   // ignored while idle
          @(negedge clk);
        end
      end
      checks++;
      if (acc !== word_t'(expv <<< FRAC)) begin
        failures++; $display("FAIL acc=%0d exp=%0d", acc, expv <<< FRAC);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
