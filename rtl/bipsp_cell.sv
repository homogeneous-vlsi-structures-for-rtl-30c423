// bipsp_cell - bit-sliced, fixed-multiplier inner product step cell over the
// ring of integers modulo M (one cell of the ROM-steering technique).
//
// Cell i of a B-cell array computes
//     y_out = y_in + |2^I * A|_M  (mod M)   when the steering bit is 1
//     y_out = y_in                          when it is 0
// The addition of the fixed constant |2^I*A|_M is a 2^B x B ROM addressed by
// y_in; a steering switch picks either the ROM output or the bypassed y_in,
// and a latch holds the result. The x operand travels alongside as a
// cyclically rotated word x~: bit 0 of x~ is the steering bit, and the cell
// passes x~ on rotated by one place (bit k+1 moves to bit k), so cell i sees
// bit i of the original x and, after B cells, x is back in its original order.
// Because the constant is stored in the ROM, multiplication by A costs no
// more hardware than an addition.
//
// XW is the width of the x word, normally B. A wider x word (with A = 1)
// turns a chain of XW cells into a binary-to-residue encoder: the same cell
// then adds |2^I|_M for every set bit of a wide binary input (rns_encoder).
//
// X_EXTRA = 1 adds a second latch in the x path. The FIR filter sets it in the
// last cell of each tap, which lets x fall one sample behind y per tap (the
// sliding action of the convolution). This placement is a choice of this
// design.
//
// Timing: y_out and x_out are registered, one clock from y_in/x_in (two
// clocks for x_out when X_EXTRA = 1). rst clears the latches synchronously.
// Residues y_in >= M (not produced by this design) are mapped into [0, M).
// M must be at least 3 (B >= 2, the smallest ROM with four columns).
module bipsp_cell
  import nt_pkg::*;
#(
  parameter int unsigned M       = 31,
  parameter int unsigned A       = 5,
  parameter int unsigned I       = 0,
  parameter bit          X_EXTRA = 1'b0,
  parameter int unsigned XW      = res_bits(M),
  localparam int unsigned B      = res_bits(M)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [B-1:0]  y_in,
  input  logic [XW-1:0] x_in,
  output logic [B-1:0]  y_out,
  output logic [XW-1:0] x_out
);
  // ROM word y holds (y + |2^I * A|_M) mod M.
  function automatic bit [(1 << B)*B-1:0] add_table();
    bit [(1 << B)*B-1:0] t;
    int unsigned c;
    c = mod_mul(mod_pow2(I, M), A, M);
    t = '0;
    for (int unsigned y = 0; y < (1 << B); y++)
      t[y*B +: B] = B'(mod_red(longint'(y) + longint'(c), M));
    return t;
  endfunction

  logic [B-1:0]   rom_data;
  logic [B-1:0]   y_next;
  logic [XW-1:0]  x_rot;

  lut_rom #(
    .AW(B), .DW(B),
    .CONTENT(add_table())
  ) u_rom (
    .addr(y_in),
    .data(rom_data)
  );

  // Steering switch and x rotation.
  always_comb begin
    y_next = x_in[0] ? rom_data : y_in;
    x_rot  = {x_in[0], x_in[XW-1:1]};
  end

  always_ff @(posedge clk) begin
    if (rst) y_out <= '0;
    else     y_out <= y_next;
  end

  if (X_EXTRA) begin : g_x2
    logic [XW-1:0] x_mid;
    always_ff @(posedge clk) begin
      if (rst) begin
        x_mid <= '0;
        x_out <= '0;
      end else begin
        x_mid <= x_rot;
        x_out <= x_mid;
      end
    end
  end else begin : g_x1
    always_ff @(posedge clk) begin
      if (rst) x_out <= '0;
      else     x_out <= x_rot;
    end
  end

  initial assert (M >= 3 && A < M && I < XW && XW >= 2) else $error("bipsp_cell: bad parameters");
endmodule
