// ipsp - word-level fixed-coefficient inner product step processor over the
// integers modulo M:  y_out = y_in + A * x_in  (mod M).
//
// Writing x in binary, A*x = sum over i of x[i] * |2^i * A|_M, so the step is a
// linear systolic array of B = ceil(log2 M) bipsp_cell stages, stage i adding
// the stored constant |2^i*A|_M when bit i of x is set. Only one cell type is
// used; the coefficient lives entirely in the ROM contents.
//
// Timing: fully pipelined, one new (y_in, x_in) pair per clock, y_out and
// out_valid B clocks after the inputs. x_out is x_in restored to its original
// bit order after B rotations, B clocks later (B+1 with X_EXTRA = 1, which
// puts the extra x latch of the FIR filter into the last cell).
// rst clears the pipeline synchronously.
module ipsp
  import nt_pkg::*;
#(
  parameter int unsigned M       = 31,
  parameter int unsigned A       = 5,
  parameter bit          X_EXTRA = 1'b0,
  localparam int unsigned B      = res_bits(M)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [B-1:0] y_in,
  input  logic [B-1:0] x_in,
  output logic         out_valid,
  output logic [B-1:0] y_out,
  output logic [B-1:0] x_out
);
  logic [B-1:0] y_c [B+1];
  logic [B-1:0] x_c [B+1];
  logic [B-1:0] vld;

  always_comb begin
    y_c[0] = y_in;
    x_c[0] = x_in;
  end

  for (genvar i = 0; i < B; i++) begin : g_cell
    bipsp_cell #(
      .M(M), .A(A), .I(i),
      .X_EXTRA((i == B-1) ? X_EXTRA : 1'b0)
    ) u_cell (
      .clk(clk), .rst(rst),
      .y_in(y_c[i]), .x_in(x_c[i]),
      .y_out(y_c[i+1]), .x_out(x_c[i+1])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[B-2:0], in_valid};
  end

  always_comb begin
    y_out     = y_c[B];
    x_out     = x_c[B];
    out_valid = vld[B-1];
  end
endmodule
