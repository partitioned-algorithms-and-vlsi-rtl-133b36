// type3_mm: Type-III module, additive matrix multiplication of M x M blocks.
//
//   D = A - sum_{s=1..r} B(s) * C(s)      (sub = 1)
//   D = A + sum_{s=1..r} B(s) * C(s)      (sub = 0)
//
// M*M accumulated multiply units, unit (i,j) producing d_ij. At t1 (`start`)
// every unit latches a_ij. From t2 on the products are streamed in as outer
// products: each cycle with `in_valid` carries one column of a B block
// (`b_col`) and the matching row of the C block (`c_row`), so unit (i,j)
// folds in b_col[i]*c_row[j]. One term B(s)*C(s) takes M cycles and r terms
// take M*r cycles; D is ready after M*r+1 time units, the module delay.
// `in_last` marks the final product cycle; `done` pulses in the next cycle
// with `d_out` valid until the next start. Streaming whole columns/rows of
// the operand blocks, the `sub` selector and `in_last` are this design's
// interface choices. At least one product must follow each start.
module type3_mm
  import fxp_pkg::*;
#(
  parameter int unsigned M = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  sub,
  input  word_t a_in  [M][M],
  input  logic  in_valid,
  input  logic  in_last,
  input  word_t b_col [M],
  input  word_t c_row [M],
  output logic  busy,
  output logic  done,
  output word_t d_out [M][M]
);
  logic sub_r;

  for (genvar i = 0; i < M; i++) begin : g_r
    for (genvar j = 0; j < M; j++) begin : g_c
      type3_amu u_amu (
        .clk  (clk),
        .rst_n(rst_n),
        .load (start),
        .a    (a_in[i][j]),
        .step (busy && in_valid),
        .sub  (sub_r),
        .b    (b_col[i]),
        .c    (c_row[j]),
        .acc  (d_out[i][j])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      sub_r <= 1'b1;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        sub_r <= sub;
      end else if (busy && in_valid && in_last) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // A product offered while no job is open is a protocol error.
  a_stream_open : assert property (@(posedge clk) disable iff (!rst_n)
                                   in_valid |-> busy)
    else $error("type3_mm: product streamed with no open job");
endmodule
