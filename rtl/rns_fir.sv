// rns_fir - fixed-coefficient FIR filter in a residue number system.
//
// The filter is computed independently over L small rings, one fir_ring per
// modulus MODULI[k], all driven by the same clock. Each channel is a narrow
// (B_k-bit) linear array, so no carry or data crosses from one channel to
// another; together they compute the filter exactly over the direct-sum ring
// of size prod(MODULI), provided the moduli are pairwise coprime. The result
// stays in residue form: conversion back to binary is done elsewhere (for
// example by crt_converter).
//
// Interface: residue k of the input sample on x_res[k] (low res_bits(MODULI[k])
// bits used, upper bits ignored), one sample per clock; y_res[k] holds
// residue k of the output, upper bits zero. Latency N*B_k clocks for channel
// k; out_valid follows the slowest channel and the faster channels are delayed
// to match, so all residues of one output appear together.
module rns_fir
  import nt_pkg::*;
#(
  parameter int unsigned L          = 3,
  parameter int unsigned MODULI [L] = '{31, 29, 27},
  parameter int unsigned N          = 8,
  parameter int unsigned COEF [N]   = '{3, 7, 12, 5, 9, 1, 4, 2},
  parameter int unsigned BMAX       = 5
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic [L-1:0][BMAX-1:0]   x_res,
  output logic                     out_valid,
  output logic [L-1:0][BMAX-1:0]   y_res
);
  function automatic int unsigned max_bits();
    int unsigned b;
    b = 0;
    for (int unsigned k = 0; k < L; k++)
      if (res_bits(MODULI[k]) > b) b = res_bits(MODULI[k]);
    return b;
  endfunction

  localparam int unsigned BTOP = max_bits();

  logic [L-1:0] ch_valid;

  for (genvar k = 0; k < L; k++) begin : g_ch
    localparam int unsigned BK  = res_bits(MODULI[k]);
    localparam int unsigned PAD = N * (BTOP - BK);
    logic [BK-1:0] y_k;
    logic          v_k;

    fir_ring #(.M(MODULI[k]), .N(N), .COEF(COEF)) u_fir (
      .clk(clk), .rst(rst),
      .in_valid(in_valid),
      .x_in(x_res[k][BK-1:0]),
      .out_valid(v_k),
      .y_out(y_k)
    );

    // Align narrower (shorter) channels with the widest one.
    if (PAD == 0) begin : g_nopad
      always_comb begin
        y_res[k]    = BMAX'(y_k);
        ch_valid[k] = v_k;
      end
    end else begin : g_pad
      logic [BK-1:0] yd [PAD];
      logic          vd [PAD];
      always_ff @(posedge clk) begin
        if (rst) begin
          for (int unsigned d = 0; d < PAD; d++) begin
            yd[d] <= '0;
            vd[d] <= 1'b0;
          end
        end else begin
          yd[0] <= y_k;
          vd[0] <= v_k;
          for (int unsigned d = 1; d < PAD; d++) begin
            yd[d] <= yd[d-1];
            vd[d] <= vd[d-1];
          end
        end
      end
      always_comb begin
        y_res[k]    = BMAX'(yd[PAD-1]);
        ch_valid[k] = vd[PAD-1];
      end
    end
  end

  always_comb out_valid = &ch_valid;

  initial assert (BMAX >= BTOP) else $error("rns_fir: BMAX too small for the moduli");
endmodule
