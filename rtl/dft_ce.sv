// dft_ce - computational element of a bit-level systolic 2-D FFT: one 2x2
// two-dimensional DFT with twiddle pre-multiplication, computed for one
// component (normal or conjugate) of a quadratic-residue-ring number over the
// prime field GF(M), M = 4k+1.
//
// In the ring, j^2 = -1, so the 2x2 transform with pre-multiplied twiddles
//     X[k][l] = sum_{n,m in {0,1}} x[n][m] * (-1)^(n*k + m*l) * alpha[n][m]
// (alpha[0][0] = 1) factors into two levels of fixed-coefficient IPSPs:
//     P  = x00 + a01*x01              Q  = x10 + (a11/a10)*x11
//     P' = x00 - a01*x01              Q' = x10 - (a11/a10)*x11
//     X00 = P  + a10*Q                X10 = P  - a10*Q
//     X01 = P' + a10*Q'               X11 = P' - a10*Q'
// which is two arrays of four ipsp modules each. The division by a10 is the
// multiplicative inverse in GF(M), taken at elaboration, so A10 must be
// nonzero. The P/Q words of each array are broadcast to its two lower
// modules (semi-systolic). Every multiplier is a fixed coefficient held in
// ROM, so the multiplications cost no extra hardware.
//
// Output naming follows the transform above (k indexes the first input
// index n, l the second index m).
//
// Interface: four residues in, four out, all B = ceil(log2 M) bits, one 2x2
// block per clock; outputs and out_valid 2*B clocks after the inputs.
module dft_ce
  import nt_pkg::*;
#(
  parameter int unsigned M     = 13,
  parameter int unsigned A01   = 5,
  parameter int unsigned A10   = 6,
  parameter int unsigned A11   = 9,
  localparam int unsigned B    = res_bits(M)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [B-1:0] x00, x01, x10, x11,
  output logic         out_valid,
  output logic [B-1:0] y00, y01, y10, y11
);
  localparam int unsigned C_A01  = A01 % M;
  localparam int unsigned C_NA01 = mod_red(-longint'(A01), M);
  localparam int unsigned C_R    = mod_mul(A11, mod_inv(A10, M), M);
  localparam int unsigned C_NR   = mod_red(-longint'(C_R), M);
  localparam int unsigned C_A10  = A10 % M;
  localparam int unsigned C_NA10 = mod_red(-longint'(A10), M);

  logic [B-1:0] p, q, pn, qn;
  logic [B-1:0] unused_x [8];
  logic [3:0]   v1;
  logic [3:0]   v2;

  // Upper level: left array uses +a01, +a11/a10; right array the negatives.
  ipsp #(.M(M), .A(C_A01))  u_p  (.clk, .rst, .in_valid, .y_in(x00), .x_in(x01),
                                  .out_valid(v1[0]), .y_out(p),  .x_out(unused_x[0]));
  ipsp #(.M(M), .A(C_R))    u_q  (.clk, .rst, .in_valid, .y_in(x10), .x_in(x11),
                                  .out_valid(v1[1]), .y_out(q),  .x_out(unused_x[1]));
  ipsp #(.M(M), .A(C_NA01)) u_pn (.clk, .rst, .in_valid, .y_in(x00), .x_in(x01),
                                  .out_valid(v1[2]), .y_out(pn), .x_out(unused_x[2]));
  ipsp #(.M(M), .A(C_NR))   u_qn (.clk, .rst, .in_valid, .y_in(x10), .x_in(x11),
                                  .out_valid(v1[3]), .y_out(qn), .x_out(unused_x[3]));

  // Lower level: +a10 and -a10 applied to the broadcast P/Q words.
  ipsp #(.M(M), .A(C_A10))  u_00 (.clk, .rst, .in_valid(v1[0] & v1[1]), .y_in(p),  .x_in(q),
                                  .out_valid(v2[0]), .y_out(y00), .x_out(unused_x[4]));
  ipsp #(.M(M), .A(C_NA10)) u_10 (.clk, .rst, .in_valid(v1[0] & v1[1]), .y_in(p),  .x_in(q),
                                  .out_valid(v2[1]), .y_out(y10), .x_out(unused_x[5]));
  ipsp #(.M(M), .A(C_A10))  u_01 (.clk, .rst, .in_valid(v1[2] & v1[3]), .y_in(pn), .x_in(qn),
                                  .out_valid(v2[2]), .y_out(y01), .x_out(unused_x[6]));
  ipsp #(.M(M), .A(C_NA10)) u_11 (.clk, .rst, .in_valid(v1[2] & v1[3]), .y_in(pn), .x_in(qn),
                                  .out_valid(v2[3]), .y_out(y11), .x_out(unused_x[7]));

  always_comb out_valid = &v2;

  initial assert (mod_inv(A10, M) != 0) else $error("dft_ce: A10 has no inverse modulo M");
endmodule
