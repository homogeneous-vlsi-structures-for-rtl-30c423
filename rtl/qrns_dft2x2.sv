// qrns_dft2x2 - complex 2x2 two-dimensional DFT computational element with
// twiddle pre-multiplication, computed over a direct sum of quadratic residue
// rings.
//
// A complex number a + jb is held, for each modulus m_k = 4q+1 (prime), as
// two independent residues: the normal component a + j_k*b and the conjugate
// component a - j_k*b (mod m_k), where j_k is a square root of -1 modulo m_k.
// In this form complex addition and multiplication act on each component
// separately, so the complex transform splits into 2L identical, fully
// isolated real processors: one dft_ce per component per modulus. The
// twiddles are given as complex integers (ALPHA_RE + j*ALPHA_IM for the
// positions 01, 10, 11; position 00 is always 1) and mapped into QRNS at
// elaboration: the normal-component processor gets |re + j_k*im|, the
// conjugate-component processor |re - j_k*im|.
//
// Interface: xn[k][p] / xc[k][p] are the normal / conjugate components over
// MODULI[k] of input p (p = 0:x00, 1:x01, 2:x10, 3:x11); yn/yc are the outputs
// in the same order (0:X00, 1:X01, 2:X10, 3:X11). Low res_bits(MODULI[k]) bits
// are used. One block per clock; outputs 2*B_k clocks later, the faster
// channels delayed so that out_valid covers all of them together.
module qrns_dft2x2
  import nt_pkg::*;
#(
  parameter int unsigned L          = 3,
  parameter int unsigned MODULI [L] = '{13, 17, 29},
  parameter int          ALPHA_RE [3] = '{0, 1, -1},
  parameter int          ALPHA_IM [3] = '{1, 1, 1},
  parameter int unsigned BMAX       = 5
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        in_valid,
  input  logic [L-1:0][3:0][BMAX-1:0] xn,
  input  logic [L-1:0][3:0][BMAX-1:0] xc,
  output logic                        out_valid,
  output logic [L-1:0][3:0][BMAX-1:0] yn,
  output logic [L-1:0][3:0][BMAX-1:0] yc
);
  function automatic int unsigned max_bits();
    int unsigned b;
    b = 0;
    for (int unsigned k = 0; k < L; k++)
      if (res_bits(MODULI[k]) > b) b = res_bits(MODULI[k]);
    return b;
  endfunction

  // QRNS component of a complex constant: re + s*j_m*im (mod m), s = +1 / -1.
  function automatic int unsigned qr_comp(input int re, input int im, input int s,
                                          input int unsigned m);
    longint jm;
    jm = longint'(sqrt_m1(m));
    return mod_red(longint'(re) + longint'(s) * jm * longint'(im), m);
  endfunction

  localparam int unsigned BTOP = max_bits();

  logic [2*L-1:0] ch_valid;

  for (genvar k = 0; k < L; k++) begin : g_mod
    localparam int unsigned MK  = MODULI[k];
    localparam int unsigned BK  = res_bits(MK);
    localparam int unsigned PAD = 2 * (BTOP - BK);

    for (genvar c = 0; c < 2; c++) begin : g_comp
      localparam int SGN = (c == 0) ? 1 : -1;
      logic [3:0][BK-1:0] xi;
      logic [3:0][BK-1:0] yo;
      logic               vo;

      always_comb
        for (int p = 0; p < 4; p++)
          xi[p] = (c == 0) ? xn[k][p][BK-1:0] : xc[k][p][BK-1:0];

      dft_ce #(
        .M(MK),
        .A01(qr_comp(ALPHA_RE[0], ALPHA_IM[0], SGN, MK)),
        .A10(qr_comp(ALPHA_RE[1], ALPHA_IM[1], SGN, MK)),
        .A11(qr_comp(ALPHA_RE[2], ALPHA_IM[2], SGN, MK))
      ) u_ce (
        .clk(clk), .rst(rst), .in_valid(in_valid),
        .x00(xi[0]), .x01(xi[1]), .x10(xi[2]), .x11(xi[3]),
        .out_valid(vo),
        .y00(yo[0]), .y01(yo[1]), .y10(yo[2]), .y11(yo[3])
      );

      logic [3:0][BK-1:0] ya;
      logic               va;
      if (PAD == 0) begin : g_nopad
        always_comb begin
          ya = yo;
          va = vo;
        end
      end else begin : g_pad
        logic [3:0][BK-1:0] yd [PAD];
        logic               vd [PAD];
        always_ff @(posedge clk) begin
          if (rst) begin
            for (int d = 0; d < PAD; d++) begin
              yd[d] <= '0;
              vd[d] <= 1'b0;
            end
          end else begin
            yd[0] <= yo;
            vd[0] <= vo;
            for (int d = 1; d < PAD; d++) begin
              yd[d] <= yd[d-1];
              vd[d] <= vd[d-1];
            end
          end
        end
        always_comb begin
          ya = yd[PAD-1];
          va = vd[PAD-1];
        end
      end

      always_comb begin
        ch_valid[2*k + c] = va;
        for (int p = 0; p < 4; p++)
          if (c == 0) yn[k][p] = BMAX'(ya[p]);
          else        yc[k][p] = BMAX'(ya[p]);
      end
    end
  end

  always_comb out_valid = &ch_valid;

  initial begin
    assert (BMAX >= BTOP) else $error("qrns_dft2x2: BMAX too small for the moduli");
    for (int k = 0; k < L; k++)
      assert (sqrt_m1(MODULI[k]) != 0) else $error("qrns_dft2x2: -1 has no square root modulo %0d", MODULI[k]);
  end
endmodule
