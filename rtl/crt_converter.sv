// crt_converter - residue-to-binary converter by the Chinese Remainder
// Theorem, built as a hierarchical network of nn_subnet operators.
//
// With Mt = prod(MODULI), m^_i = Mt / m_i and inv_i = (m^_i)^-1 mod m_i,
//     X = sum_i Z_i (mod Mt),  Z_i = m^_i * Q_i (mod Mt),  Q_i = x_i * inv_i (mod Mt).
// Level 1 has one multiplying subnet per residue (x_i times the constant
// inv_i), level 2 one multiplying subnet per residue (Q_i times m^_i), and a
// single L-input adding subnet sums the Z_i. Every subnet works modulo Mt;
// only the last one corrects its result into [0, Mt), the others hand on
// their possibly non-unique settled values. Taking Q_i modulo Mt rather than
// m_i does not change the result because m^_i * m_i = Mt. The constants are
// computed at elaboration.
//
// Each subnet iterates until its state is stable, so the latency depends on
// the data. A small sequencer starts each level when every subnet of the
// previous level is done.
//
// Interface: x_res[i] holds the residue modulo MODULI[i] (low bits used);
// pulse start while ready is high; done is high for one clock with the binary
// result on x_out, which holds until the next start; ready returns on the
// following clock. The moduli must be
// pairwise coprime and their product below 2^31.
module crt_converter
  import nt_pkg::*;
#(
  parameter int unsigned L          = 3,
  parameter int unsigned MODULI [L] = '{31, 29, 27},
  parameter int unsigned BMAX       = 5,
  localparam int unsigned MT        = prod_moduli(MODULI),
  localparam int unsigned BM        = res_bits(MT)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic [L-1:0][BMAX-1:0]  x_res,
  output logic                    ready,
  output logic                    done,
  output logic [BM-1:0]           x_out
);
  function automatic int unsigned prod_moduli(input int unsigned m [L]);
    longint p;
    p = 1;
    for (int unsigned k = 0; k < L; k++) p *= longint'(m[k]);
    return int'(p);
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_LVL1, S_LVL2, S_TOP} state_t;
  state_t state;

  logic [L-1:0]          busy1, done1, busy2, done2;
  logic [L-1:0][BM-1:0]  q, z;
  logic                  start1, start2, start3, busy3, done3;

  for (genvar i = 0; i < L; i++) begin : g_res
    localparam int unsigned MHAT = MT / MODULI[i];
    localparam int unsigned INV  = mod_inv(MHAT % MODULI[i], MODULI[i]);

    logic [1:0][BM-1:0] in1, in2;
    always_comb begin
      in1[0] = BM'(x_res[i]);
      in1[1] = BM'(INV);
      in2[0] = q[i];
      in2[1] = BM'(MHAT);
    end

    nn_subnet #(.M(MT), .NIN(2), .MUL(1'b1), .IW(BM), .CORRECT(1'b0)) u_q (
      .clk(clk), .rst(rst), .start(start1), .in(in1),
      .busy(busy1[i]), .done(done1[i]), .z_out(q[i])
    );
    nn_subnet #(.M(MT), .NIN(2), .MUL(1'b1), .IW(BM), .CORRECT(1'b0)) u_z (
      .clk(clk), .rst(rst), .start(start2), .in(in2),
      .busy(busy2[i]), .done(done2[i]), .z_out(z[i])
    );
  end

  nn_subnet #(.M(MT), .NIN(L), .MUL(1'b0), .IW(BM), .CORRECT(1'b1)) u_sum (
    .clk(clk), .rst(rst), .start(start3), .in(z),
    .busy(busy3), .done(done3), .z_out(x_out)
  );

  // Level sequencer.
  always_comb begin
    start1 = (state == S_IDLE) && start;
    start2 = (state == S_LVL1) && (&done1);
    start3 = (state == S_LVL2) && (&done2);
    ready  = (state == S_IDLE);
    done   = (state == S_TOP) && done3;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: if (start)  state <= S_LVL1;
        S_LVL1: if (&done1) state <= S_LVL2;
        S_LVL2: if (&done2) state <= S_TOP;
        S_TOP:  if (done3)  state <= S_IDLE;
        default:            state <= S_IDLE;
      endcase
    end
  end

  // No subnet may still be iterating when the sequencer returns to idle.
  a_idle_quiet: assert property (@(posedge clk) disable iff (rst)
    (state == S_IDLE) |-> !(|busy1 || |busy2 || busy3));

  initial begin
    assert (BMAX <= BM) else $error("crt_converter: BMAX wider than the result");
    for (int unsigned k = 0; k < L; k++)
      assert (mod_inv((MT / MODULI[k]) % MODULI[k], MODULI[k]) != 0)
        else $error("crt_converter: moduli are not pairwise coprime");
  end
endmodule
