// type3_mv: reduced Type-III module for matrix-vector products.
//
//   d_hat = d - sum_{s=1..r} U(s) * x(s)     (sub = 1)
//   d_hat = d + sum_{s=1..r} U(s) * x(s)     (sub = 0)
//
// The block-times-vector form of the Type-III module, used by the
// back-substitution of a triangular system: M accumulated multiply units
// instead of M*M. At `start` unit i latches d_i; each later cycle with
// `in_valid` carries one column of a U block (`u_col`) and the matching
// element of x (`x_elem`), and unit i folds in u_col[i]*x_elem. r terms take
// M*r cycles; `done` pulses the cycle after the one marked `in_last`, so the
// delay is M*r+1 time units as for the full module. The streaming interface
// is this design's choice.
module type3_mv
  import fxp_pkg::*;
#(
  parameter int unsigned M = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  sub,
  input  word_t d_in  [M],
  input  logic  in_valid,
  input  logic  in_last,
  input  word_t u_col [M],
  input  word_t x_elem,
  output logic  busy,
  output logic  done,
  output word_t d_out [M]
);
  logic sub_r;

  for (genvar i = 0; i < M; i++) begin : g_r
    type3_amu u_amu (
      .clk  (clk),
      .rst_n(rst_n),
      .load (start),
      .a    (d_in[i]),
      .step (busy && in_valid),
      .sub  (sub_r),
      .b    (u_col[i]),
      .c    (x_elem),
      .acc  (d_out[i])
    );
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

  a_stream_open : assert property (@(posedge clk) disable iff (!rst_n)
                                   in_valid |-> busy)
    else $error("type3_mv: product streamed with no open job");
endmodule
