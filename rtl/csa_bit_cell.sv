// csa_bit_cell - one bit position of a conditional carry-save adder,
// realised as a 16-word by 3-bit look-up table (a lut_rom with four address
// inputs), so that every row of the residue adder is made of one generic cell.
//
// Address {en, r, c, s}: s and c are the sum and carry bits of the redundant
// pair at this bit position, r is the operand bit, en the row's add enable.
//   en = 1: sum = s ^ c ^ r, carry_up = majority(s, c, r) (weight one place
//           higher, goes to the carry bit of the next position), carry_here = 0
//   en = 0: sum = s, carry_up = 0, carry_here = c (the pair passes unchanged)
// The row merges carry_up of position b-1 with carry_here of position b into
// its new carry bit b; at most one of the two is ever 1.
//
// Purely combinational; the row that uses it supplies the pipeline latch.
module csa_bit_cell (
  input  logic s,
  input  logic c,
  input  logic r,
  input  logic en,
  output logic sum,
  output logic carry_up,
  output logic carry_here
);
  function automatic bit [16*3-1:0] csa_table();
    bit [16*3-1:0] t;
    bit ts, tc, tr, te;
    for (int unsigned a = 0; a < 16; a++) begin
      {te, tr, tc, ts} = 4'(a);
      if (te) t[a*3 +: 3] = {1'b0, (ts & tc) | (ts & tr) | (tc & tr), ts ^ tc ^ tr};
      else    t[a*3 +: 3] = {tc, 1'b0, ts};
    end
    return t;
  endfunction

  logic [2:0] word;

  lut_rom #(.AW(4), .DW(3), .CONTENT(csa_table())) u_rom (
    .addr({en, r, c, s}),
    .data(word)
  );

  always_comb {carry_here, carry_up, sum} = word;
endmodule
