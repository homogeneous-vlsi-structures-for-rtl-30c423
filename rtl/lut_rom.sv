// lut_rom - the small generic look-up table from which every cell in this
// design is built.
//
// Organisation: an AW-bit address is split into a column part (addr[1:0],
// four column-select lines CS0..CS3) and a row part (addr[AW-1:2], 2^(AW-2)
// row-select lines RS0..). Each data bit has its own storage plane; a plane is
// a grid of cross-points, one per (row, column). In the dynamic circuit the
// output line is pre-charged and then discharged through the selected
// cross-point if a transistor is present there; a ROM is programmed by removing
// transistors. Here a stored 1 stands for "transistor removed" (line stays
// high, reads 1) and a stored 0 for "transistor present" (line discharged).
// Four columns by 2^(AW-2) rows, with AW kept at 5 or below, is the
// organisation the cell is described with; the 2-phase pre-charge/evaluate
// pipeline latch is not part of this block - the cell that uses the ROM places
// its own latch after it (see bipsp_cell, residue_adder, nn_subnet).
//
// Interface: addr (AW bits) in, data (DW bits) out, purely combinational.
// CONTENT holds word w in bits [w*DW +: DW]. Every user passes the table it
// needs; the default (for AW = DW = 5) is the table of a bit-sliced IPSP
// cell over Z_31 adding the constant 5: word w = (w + 5) mod 31.
module lut_rom
  import nt_pkg::*;
#(
  parameter int unsigned AW = 5,
  parameter int unsigned DW = 5,
  parameter bit [(1 << AW)*DW-1:0] CONTENT = ((1 << AW)*DW)'(default_rom5())
) (
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);
  localparam int unsigned ROWS = 1 << (AW - 2);

  logic [3:0]      col_sel;
  logic [ROWS-1:0] row_sel;

  // Decoders: one-hot column and row select lines.
  always_comb begin
    col_sel = 4'b0001 << addr[1:0];
    row_sel = '0;
    row_sel[addr[AW-1:2]] = 1'b1;
  end

  // Storage planes: the output bit is 1 when the selected cross-point holds
  // no pull-down transistor.
  always_comb begin
    for (int unsigned d = 0; d < DW; d++) begin
      data[d] = 1'b0;
      for (int unsigned r = 0; r < ROWS; r++)
        for (int unsigned c = 0; c < 4; c++)
          if (row_sel[r] && col_sel[c] && CONTENT[(r*4 + c)*DW + d])
            data[d] = 1'b1;
    end
  end

  initial assert (AW >= 2) else $error("lut_rom needs at least two address bits");
endmodule
