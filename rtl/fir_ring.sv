// fir_ring - N-tap fixed-coefficient FIR filter over the integers modulo M,
//     y(n) = sum_{i=0}^{N-1} COEF[i] * x(n-i)  (mod M),
// built as one bit-level linear systolic array of N*B bipsp_cell stages.
//
// Tap i is an ipsp (B cells) with the fixed coefficient |COEF[i]|_M. The
// partial sum y moves one cell per clock; the x word moves with it through a
// tap, but the last cell of every tap holds x for one extra clock. Sample
// x(n) therefore reaches tap i one clock later than y(n) does for every tap it
// has passed, so the partial sum of output n meets x(n-i) at tap i: the word-
// level convolution slides over the bit-level inner products, with no
// broadcast and no second-dimension wiring.
//
// Interface: a new sample x_in is taken on every clock (the stream is
// continuous; in_valid only marks which outputs are meaningful). y_out and
// out_valid follow N*B clocks later, one output per clock. Samples before
// reset count as zero: rst clears every latch. COEF entries are reduced
// modulo M at elaboration.
module fir_ring
  import nt_pkg::*;
#(
  parameter int unsigned M        = 31,
  parameter int unsigned N        = 8,
  parameter int unsigned COEF [N] = '{3, 7, 12, 5, 9, 1, 4, 2},
  localparam int unsigned B       = res_bits(M)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [B-1:0] x_in,
  output logic         out_valid,
  output logic [B-1:0] y_out
);
  logic [B-1:0] y_c [N+1];
  logic [B-1:0] x_c [N+1];
  logic         v_c [N+1];

  always_comb begin
    y_c[0] = '0;
    x_c[0] = x_in;
    v_c[0] = in_valid;
  end

  for (genvar t = 0; t < N; t++) begin : g_tap
    ipsp #(
      .M(M), .A(COEF[t] % M), .X_EXTRA(1'b1)
    ) u_tap (
      .clk(clk), .rst(rst),
      .in_valid(v_c[t]),
      .y_in(y_c[t]), .x_in(x_c[t]),
      .out_valid(v_c[t+1]),
      .y_out(y_c[t+1]), .x_out(x_c[t+1])
    );
  end

  always_comb begin
    y_out     = y_c[N];
    out_valid = v_c[N];
  end
endmodule
