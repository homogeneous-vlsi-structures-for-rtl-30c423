// cond_csa_stage - a P-bit conditional carry-save adder row: one adder of
// the systolic residue adder.
//
// The row receives a redundant pair (s_in, c_in) whose value is s_in + c_in,
// a P-bit operand r_in and an enable. With en = 1 it performs a carry-save
// addition, (s_out, c_out) = CSA(s_in, c_in, r_in), and cp_out is the carry
// generated out of the most significant position (weight 2^P), which the row
// drops from the pair. With en = 0 the pair passes unchanged and cp_out = 0.
// There is no carry propagation along the row: each bit is one csa_bit_cell
// and the only horizontal signals are the enable and the carry into the
// neighbouring position.
//
// Purely combinational; residue_adder places the latches between stages.
module cond_csa_stage #(
  parameter int unsigned P = 5
) (
  input  logic         en,
  input  logic [P-1:0] s_in,
  input  logic [P-1:0] c_in,
  input  logic [P-1:0] r_in,
  output logic [P-1:0] s_out,
  output logic [P-1:0] c_out,
  output logic         cp_out
);
  logic [P-1:0] up, here;

  for (genvar b = 0; b < P; b++) begin : g_bit
    csa_bit_cell u_cell (
      .s(s_in[b]), .c(c_in[b]), .r(r_in[b]), .en(en),
      .sum(s_out[b]), .carry_up(up[b]), .carry_here(here[b])
    );
  end

  always_comb begin
    c_out  = here | {up[P-2:0], 1'b0};
    cp_out = up[P-1];
  end
endmodule
