// rns_encoder - binary-to-residue encoder built from the same bit-sliced
// inner-product cell as the filters.
//
// For each modulus m_k a chain of W bipsp_cell stages with coefficient 1
// computes |X|_{m_k} = sum_i X[i] * |2^i|_{m_k}: stage i adds the stored
// constant |2^i|_{m_k} when bit i of the (rotated) binary word is set, and
// the partial sum starts at 0. The binary word rotates through the chain
// exactly as x does in an IPSP, so the encoder is an inner product step with
// a W-bit operand and no new cell type is needed.
//
// Interface: x (W bits unsigned) with in_valid, one word per clock; x_res[k]
// holds |x|_{MODULI[k]} in its low res_bits(MODULI[k]) bits (upper bits zero)
// with out_valid W clocks later, all channels together.
module rns_encoder
  import nt_pkg::*;
#(
  parameter int unsigned L          = 3,
  parameter int unsigned MODULI [L] = '{31, 29, 27},
  parameter int unsigned W          = 15,
  parameter int unsigned BMAX       = 5
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic [W-1:0]            x,
  output logic                    out_valid,
  output logic [L-1:0][BMAX-1:0]  x_res
);
  logic [W-1:0] vld;

  for (genvar k = 0; k < L; k++) begin : g_ch
    localparam int unsigned BK = res_bits(MODULI[k]);
    logic [BK-1:0] y_c [W+1];
    logic [W-1:0]  x_c [W+1];

    always_comb begin
      y_c[0] = '0;
      x_c[0] = x;
    end

    for (genvar i = 0; i < W; i++) begin : g_cell
      bipsp_cell #(.M(MODULI[k]), .A(1), .I(i), .XW(W)) u_cell (
        .clk(clk), .rst(rst),
        .y_in(y_c[i]), .x_in(x_c[i]),
        .y_out(y_c[i+1]), .x_out(x_c[i+1])
      );
    end

    always_comb x_res[k] = BMAX'(y_c[W]);
  end

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[W-2:0], in_valid};
  end

  always_comb out_valid = vld[W-1];
endmodule
