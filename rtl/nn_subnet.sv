// nn_subnet - finite ring "neuron" operator: adds (or multiplies) its inputs
// and reduces the result modulo M by a convergent feedback iteration instead
// of a division.
//
// Any integer Z = sum_i 2^i * z[i] is congruent modulo M to
// sum_i |2^i|_M * z[i]. The subnet uses this in two layers:
//   layer 1 (collecting): gathers the input bits of equal weight 2^k into a
//            count c_k - for ADD the number of inputs with bit k set, for MUL
//            the number of partial products x[i]&y[j] with i+j = k;
//   layer 2 (computing): forms z = sum_k |2^k|_M * c_k, the synaptic weight
//            of position k being |2^k|_M.
// z is fed back as the sole input of layer 2 on the following clocks,
//     z(t+1) = sum_i |2^i|_M * z(t)[i].
// Each step keeps z modulo M and never increases it, and z stops changing
// exactly when no bit of weight >= M is set, i.e. when z < 2^ZB with
// ZB = ceil(log2 M). The settled value may lie in [M, 2^ZB) (a valid but
// non-unique form, fine as the input of a following subnet); CORRECT = 1
// subtracts M once to give the unique residue for a final result.
//
// Interface: pulse start with the inputs present; busy is high while the
// network iterates; done rises (and stays high until the next start) one
// clock after the state stopped changing, with the result on z_out.
// The number of iterations depends on the data. MUL multiplies in[0] by
// in[1] (NIN must then be 2); otherwise all NIN inputs are added.
module nn_subnet
  import nt_pkg::*;
#(
  parameter int unsigned M       = 24273,
  parameter int unsigned NIN     = 2,
  parameter bit          MUL     = 1'b0,
  parameter int unsigned IW      = 15,
  parameter bit          CORRECT = 1'b0,
  localparam int unsigned ZB     = res_bits(M)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic [NIN-1:0][IW-1:0]  in,
  output logic                    busy,
  output logic                    done,
  output logic [ZB-1:0]           z_out
);
  // Number of collecting-layer positions and the widest first-layer sum.
  localparam int unsigned NPOS = MUL ? 2*IW - 1 : IW;
  localparam longint      ZMAX = (longint'(M) - 1) * (MUL ? longint'(IW) * IW : longint'(NIN) * IW);
  localparam int unsigned SW0  = res_bits(int'(ZMAX + 1));
  localparam int unsigned SW   = (SW0 > ZB) ? SW0 : ZB;
  localparam int unsigned CW   = res_bits(((MUL ? IW : NIN) + 1));

  function automatic int unsigned w(input int unsigned k);
    return mod_pow2(k, M);
  endfunction

  logic [NPOS-1:0][CW-1:0] cnt;
  logic [SW-1:0]           z_first, z_fb, z;

  // Layer 1: collect bits of equal weight.
  always_comb begin
    cnt = '0;
    if (MUL) begin
      for (int unsigned i = 0; i < IW; i++)
        for (int unsigned j = 0; j < IW; j++)
          cnt[i+j] += CW'(in[0][i] & in[NIN-1][j]);
    end else begin
      for (int unsigned k = 0; k < IW; k++)
        for (int unsigned n = 0; n < NIN; n++)
          cnt[k] += CW'(in[n][k]);
    end
  end

  // Layer 2: weighted sums of the collected inputs and of the fed-back state.
  always_comb begin
    z_first = '0;
    for (int unsigned k = 0; k < NPOS; k++)
      z_first += SW'(w(k)) * SW'(cnt[k]);
    z_fb = '0;
    for (int unsigned i = 0; i < SW; i++)
      if (z[i]) z_fb += SW'(w(i));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      z    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else if (start) begin
      z    <= z_first;
      busy <= 1'b1;
      done <= 1'b0;
    end else if (busy) begin
      z <= z_fb;
      if (z_fb == z) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // Settled state fits in ZB bits; optional final correction into [0, M).
  always_comb begin
    if (CORRECT && z[ZB-1:0] >= ZB'(M)) z_out = z[ZB-1:0] - ZB'(M);
    else                                 z_out = z[ZB-1:0];
  end

  // Each feedback step keeps the value modulo M and never increases it.
  a_non_increasing: assert property (@(posedge clk) disable iff (rst)
    (busy && !start) |-> (z_fb <= z));

  initial assert (!MUL || NIN == 2) else $error("nn_subnet: MUL needs NIN = 2");
endmodule
