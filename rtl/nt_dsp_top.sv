// nt_dsp_top - finite-ring signal processing built from one generic
// look-up-table cell, three techniques side by side, each with its own ports:
//
//  * ROM steering (bit-level systolic, fixed coefficients):
//      - rns_encoder + rns_fir: a binary sample is encoded into residues
//                     modulo FIR_MODULI by chains of the same cell, then
//                     filtered independently over each modulus, one narrow
//                     linear array per modulus;
//      - qrns_dft2x2: complex 2x2 2-D DFT element with twiddles, computed over
//                     quadratic residue rings (normal and conjugate component
//                     per modulus DFT_MODULI, each a prime 4q+1).
//  * Redundant pipelined adder: residue_adder, a five-stage carry-save adder
//    modulo ADD_M with carry-driven corrections.
//  * Neural-like network: crt_converter, Chinese Remainder Theorem conversion
//    of residues modulo CRT_MODULI to binary by iterating subnets.
//
// The blocks share only clk and rst. Their interfaces and timing are those of
// the instantiated modules (see their headers); the FIR path adds the
// encoder's FIR_W clocks to the filter's latency. fir_x must be below the
// product of FIR_MODULI. By default the CRT converter
// uses the FIR's moduli, so the FIR's residue outputs can be fed to it to
// obtain the filter output in binary.
module nt_dsp_top
  import nt_pkg::*;
#(
  parameter int unsigned L           = 3,
  parameter int unsigned FIR_MODULI [L] = '{31, 29, 27},
  parameter int unsigned FIR_N       = 8,
  parameter int unsigned FIR_COEF [FIR_N] = '{3, 7, 12, 5, 9, 1, 4, 2},
  parameter int unsigned DFT_MODULI [L] = '{13, 17, 29},
  parameter int          DFT_ALPHA_RE [3] = '{0, 1, -1},
  parameter int          DFT_ALPHA_IM [3] = '{1, 1, 1},
  parameter int unsigned ADD_M       = 17,
  parameter int unsigned CRT_MODULI [L] = '{31, 29, 27},
  parameter int unsigned BMAX        = 5,
  localparam int unsigned ADD_P      = res_bits(ADD_M),
  localparam int unsigned FIR_W      = res_bits(prod_moduli(FIR_MODULI)),
  localparam int unsigned CRT_BM     = res_bits(prod_moduli(CRT_MODULI))
) (
  input  logic                        clk,
  input  logic                        rst,
  // RNS FIR filter: binary sample in, output residues out
  input  logic                        fir_in_valid,
  input  logic [FIR_W-1:0]            fir_x,
  output logic                        fir_out_valid,
  output logic [L-1:0][BMAX-1:0]      fir_y_res,
  // QRNS 2x2 2-D DFT element
  input  logic                        dft_in_valid,
  input  logic [L-1:0][3:0][BMAX-1:0] dft_xn,
  input  logic [L-1:0][3:0][BMAX-1:0] dft_xc,
  output logic                        dft_out_valid,
  output logic [L-1:0][3:0][BMAX-1:0] dft_yn,
  output logic [L-1:0][3:0][BMAX-1:0] dft_yc,
  // Redundant systolic residue adder
  input  logic                        add_in_valid,
  input  logic [ADD_P-1:0]            add_a1,
  input  logic [ADD_P-1:0]            add_a2,
  input  logic [ADD_P-1:0]            add_r1,
  input  logic [ADD_P-1:0]            add_r2,
  output logic                        add_out_valid,
  output logic [ADD_P-1:0]            add_s,
  output logic [ADD_P-1:0]            add_c,
  output logic                        add_overflow,
  // Neural-like CRT converter
  input  logic                        crt_start,
  input  logic [L-1:0][BMAX-1:0]      crt_x_res,
  output logic                        crt_ready,
  output logic                        crt_done,
  output logic [CRT_BM-1:0]           crt_x
);
  function automatic int unsigned prod_moduli(input int unsigned m [L]);
    longint p;
    p = 1;
    for (int unsigned k = 0; k < L; k++) p *= longint'(m[k]);
    return int'(p);
  endfunction

  logic                   enc_valid;
  logic [L-1:0][BMAX-1:0] enc_res;

  rns_encoder #(
    .L(L), .MODULI(FIR_MODULI), .W(FIR_W), .BMAX(BMAX)
  ) u_enc (
    .clk, .rst,
    .in_valid(fir_in_valid), .x(fir_x),
    .out_valid(enc_valid), .x_res(enc_res)
  );

  rns_fir #(
    .L(L), .MODULI(FIR_MODULI), .N(FIR_N), .COEF(FIR_COEF), .BMAX(BMAX)
  ) u_fir (
    .clk, .rst,
    .in_valid(enc_valid), .x_res(enc_res),
    .out_valid(fir_out_valid), .y_res(fir_y_res)
  );

  qrns_dft2x2 #(
    .L(L), .MODULI(DFT_MODULI), .ALPHA_RE(DFT_ALPHA_RE), .ALPHA_IM(DFT_ALPHA_IM), .BMAX(BMAX)
  ) u_dft (
    .clk, .rst,
    .in_valid(dft_in_valid), .xn(dft_xn), .xc(dft_xc),
    .out_valid(dft_out_valid), .yn(dft_yn), .yc(dft_yc)
  );

  residue_adder #(.M(ADD_M)) u_add (
    .clk, .rst,
    .in_valid(add_in_valid),
    .a1(add_a1), .a2(add_a2), .r1(add_r1), .r2(add_r2),
    .out_valid(add_out_valid), .s_out(add_s), .c_out(add_c),
    .out_overflow(add_overflow)
  );

  crt_converter #(.L(L), .MODULI(CRT_MODULI), .BMAX(BMAX)) u_crt (
    .clk, .rst,
    .start(crt_start), .x_res(crt_x_res),
    .ready(crt_ready), .done(crt_done), .x_out(crt_x)
  );
endmodule
