// residue_adder - pipelined systolic adder modulo M for operands held in a
// redundant, carry-save form.
//
// Representation: with P = ceil(log2 M) (so M <= 2^P < 2M), a residue is a
// pair of P-bit numbers whose sum is congruent to it modulo M. Residues below
// 2^P - M have more than one form; no comparison with M is ever needed, only a
// correction whenever a carry leaves the most significant bit: that carry is
// worth 2^P = M + (2^P - M), so dropping it and adding K = 2^P - M keeps the
// value modulo M.
//
// Pipeline (one latch per stage, one operation per clock, latency 5 clocks):
//   stage 1: (R1,R2) + A1              carry out CP1
//   stage 2: + A2                      carry out CP2
//   stage 3: + K   if CP1 xor CP2,  then + 2K if CP1 and CP2
//            (two rows; CP3 is the carry out of whichever row added)
//   stage 4: + K   if CP3              carry out CP4
//   stage 5: + K   if CP4
// Each row is a cond_csa_stage. The depth of the correction does not depend
// on M. In stage 3 at most one row adds, so a pair that entered the stage
// never receives two corrections there. A carry out of stage 5 would be lost;
// out_overflow reports it (it does not occur for P-bit inputs).
//
// Interface: a1,a2 (first operand), r1,r2 (second operand), all P bits, with
// in_valid; result pair s_out,c_out with out_valid five clocks later. The
// result's value s_out + c_out (up to 2^(P+1)-2) is congruent to
// a1+a2+r1+r2 modulo M.
module residue_adder
  import nt_pkg::*;
#(
  parameter int unsigned M = 17,
  localparam int unsigned P = res_bits(M)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [P-1:0] a1,
  input  logic [P-1:0] a2,
  input  logic [P-1:0] r1,
  input  logic [P-1:0] r2,
  output logic         out_valid,
  output logic [P-1:0] s_out,
  output logic [P-1:0] c_out,
  output logic         out_overflow
);
  localparam logic [P-1:0] K  = P'((longint'(1) << P) - longint'(M));
  localparam logic [P-1:0] K2 = P'(2 * ((longint'(1) << P) - longint'(M)));

  typedef struct packed {
    logic         v;
    logic [P-1:0] s;
    logic [P-1:0] c;
  } pair_t;

  // Stage registers.
  pair_t        st1, st2, st3, st4, st5;
  logic [P-1:0] a2_d;
  logic         cp1_1, cp1_2, cp2_2, cp3_3, cp4_4, cp5_5;

  // Combinational rows.
  logic [P-1:0] s1, c1, s2, c2, s3a, c3a, s3b, c3b, s4, c4, s5, c5;
  logic         cp1, cp2, cp3a, cp3b, cp4, cp5;

  cond_csa_stage #(.P(P)) u_row1 (.en(1'b1), .s_in(r1), .c_in(r2), .r_in(a1),
                                  .s_out(s1), .c_out(c1), .cp_out(cp1));
  cond_csa_stage #(.P(P)) u_row2 (.en(1'b1), .s_in(st1.s), .c_in(st1.c), .r_in(a2_d),
                                  .s_out(s2), .c_out(c2), .cp_out(cp2));
  cond_csa_stage #(.P(P)) u_row3a (.en(cp1_2 ^ cp2_2), .s_in(st2.s), .c_in(st2.c), .r_in(K),
                                   .s_out(s3a), .c_out(c3a), .cp_out(cp3a));
  cond_csa_stage #(.P(P)) u_row3b (.en(cp1_2 & cp2_2), .s_in(s3a), .c_in(c3a), .r_in(K2),
                                   .s_out(s3b), .c_out(c3b), .cp_out(cp3b));
  cond_csa_stage #(.P(P)) u_row4 (.en(cp3_3), .s_in(st3.s), .c_in(st3.c), .r_in(K),
                                  .s_out(s4), .c_out(c4), .cp_out(cp4));
  cond_csa_stage #(.P(P)) u_row5 (.en(cp4_4), .s_in(st4.s), .c_in(st4.c), .r_in(K),
                                  .s_out(s5), .c_out(c5), .cp_out(cp5));

  always_ff @(posedge clk) begin
    if (rst) begin
      st1 <= '0; st2 <= '0; st3 <= '0; st4 <= '0; st5 <= '0;
      a2_d <= '0;
      cp1_1 <= 1'b0; cp1_2 <= 1'b0; cp2_2 <= 1'b0;
      cp3_3 <= 1'b0; cp4_4 <= 1'b0; cp5_5 <= 1'b0;
    end else begin
      st1   <= '{v: in_valid, s: s1, c: c1};
      a2_d  <= a2;
      cp1_1 <= cp1;
      st2   <= '{v: st1.v, s: s2, c: c2};
      cp1_2 <= cp1_1;
      cp2_2 <= cp2;
      st3   <= '{v: st2.v, s: s3b, c: c3b};
      cp3_3 <= cp3a | cp3b;
      st4   <= '{v: st3.v, s: s4, c: c4};
      cp4_4 <= cp4;
      st5   <= '{v: st4.v, s: s5, c: c5};
      cp5_5 <= cp5;
    end
  end

  always_comb begin
    out_valid    = st5.v;
    s_out        = st5.s;
    c_out        = st5.c;
    out_overflow = cp5_5 & st5.v;
  end

  initial assert (M >= 3 && (longint'(1) << P) < 2 * longint'(M) + 1)
    else $error("residue_adder: M must satisfy M <= 2^P < 2M");
endmodule
