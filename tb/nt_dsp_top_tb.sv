// nt_dsp_top_tb - end-to-end test of the whole design at its default sizes.
//
//  1. Encoder -> RNS filter -> CRT: random integers X in [0, 31*29*27) are
//     streamed in binary through the residue encoder and the 8-tap RNS FIR; each output residue triple is then
//     converted to binary by the neural-like CRT converter and compared with
//     the integer convolution sum COEF[i]*X(n-i) mod 24273.
//  2. QRNS DFT: random complex integer 2x2 blocks are encoded into QRNS form,
//     transformed, and all 24 output residues compared with the complex
//     integer result (twiddles j, 1+j, -1+j) encoded the same way.
//  3. Residue adder: random redundant operands modulo 17; (s + c) mod 17 is
//     compared with the sum.
// The mechanisms the design relies on are counted and each must occur:
// steering switches that add and that bypass, the extra x latch sliding the
// FIR window, the four carry-driven correction paths of the adder, subnet
// results settling in the non-unique range, and the final CRT correction.
module nt_dsp_top_tb;
  localparam int L = 3, BMAX = 5, N = 8, MT = 31 * 29 * 27;
  localparam int FMOD [L] = '{31, 29, 27};
  localparam int COEF [N] = '{3, 7, 12, 5, 9, 1, 4, 2};
  localparam int DMOD [L] = '{13, 17, 29};
  localparam int JM   [L] = '{5, 4, 12};
  localparam int ARE  [4] = '{1, 0, 1, -1};
  localparam int AIM  [4] = '{0, 1, 1, 1};
  localparam int AM = 17, AP = 5;
  localparam int NF = 120, ND = 100, NA = 2000;

  logic clk = 0, rst = 1;
  logic fir_in_valid = 0, fir_out_valid;
  logic [14:0] fir_x = '0;
  logic [L-1:0][BMAX-1:0] fir_y_res;
  logic dft_in_valid = 0, dft_out_valid;
  logic [L-1:0][3:0][BMAX-1:0] dft_xn = '0, dft_xc = '0, dft_yn, dft_yc;
  logic add_in_valid = 0, add_out_valid, add_overflow;
  logic [AP-1:0] add_a1 = 0, add_a2 = 0, add_r1 = 0, add_r2 = 0, add_s, add_c;
  logic crt_start = 0, crt_ready, crt_done;
  logic [L-1:0][BMAX-1:0] crt_x_res = '0;
  logic [14:0] crt_x;

  int checks = 0, failures = 0;
  int n_fir = 0, n_dft = 0, n_add = 0;
  int n_steer_add = 0, n_steer_bypass = 0, n_slide = 0;
  int n_c3x = 0, n_c3d = 0, n_c4 = 0, n_c5 = 0, n_nonunique = 0, n_crtcorr = 0;

  always #5 clk = ~clk;

  nt_dsp_top dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int md(input longint a, input int m);
    longint r = a % m;
    return int'((r < 0) ? r + m : r);
  endfunction

  // ---------------------------------------------------------- mechanism counters
  always @(posedge clk) if (!rst) begin
    // steering switch of the first cell of the first filter tap, channel 0
    if (fir_in_valid) begin
      if (dut.u_fir.g_ch[0].u_fir.g_tap[0].u_tap.g_cell[0].u_cell.x_in[0]) n_steer_add++;
      else                                                                n_steer_bypass++;
    end
    if (dut.u_fir.g_ch[0].u_fir.g_tap[0].u_tap.g_cell[4].u_cell.g_x2.x_mid !=
        dut.u_fir.g_ch[0].u_fir.g_tap[0].u_tap.g_cell[4].u_cell.x_out) n_slide++;
    if (dut.u_add.st2.v && (dut.u_add.cp1_2 ^ dut.u_add.cp2_2)) n_c3x++;
    if (dut.u_add.st2.v && (dut.u_add.cp1_2 & dut.u_add.cp2_2)) n_c3d++;
    if (dut.u_add.st3.v && dut.u_add.cp3_3) n_c4++;
    if (dut.u_add.st4.v && dut.u_add.cp4_4) n_c5++;
  end

  // ---------------------------------------------------------- 1. RNS FIR + CRT
  longint fx [NF];
  logic [L-1:0][BMAX-1:0] fy [NF];
  int nfo = 0;

  always @(posedge clk)
    if (!rst && fir_out_valid && nfo < NF) begin
      fy[nfo] <= fir_y_res;
      nfo <= nfo + 1;
    end

  task automatic run_fir();
    longint x, y;
    for (int n = 0; n < NF; n++) begin
      x = longint'($urandom_range(MT - 1));
      fx[n] = x;
      fir_x <= 15'(x);
      fir_in_valid <= 1;
      @(posedge clk);
    end
    fir_in_valid <= 0;
    wait (nfo == NF);
    @(posedge clk);
    #1;
    for (int n = 0; n < NF; n++) begin
      y = 0;
      for (int i = 0; i < N; i++) if (n - i >= 0) y += COEF[i] * fx[n-i];
      // residues straight from the filter
      for (int k = 0; k < L; k++) begin
        checks++;
        if (int'(fy[n][k]) != md(y, FMOD[k])) begin
          failures++; $display("FAIL FIR y(%0d) mod %0d", n, FMOD[k]);
        end
      end
      // binary via the CRT network
      while (!crt_ready) begin @(posedge clk); #1; end
      crt_x_res <= fy[n];
      crt_start <= 1;
      @(posedge clk);
      #1;
      crt_start <= 0;
      while (!crt_done) begin
        @(posedge clk);
        #1;
      end
      for (int k = 0; k < L; k++) begin
        if (int'(dut.u_crt.q[k]) >= MT) n_nonunique++;
        if (int'(dut.u_crt.z[k]) >= MT) n_nonunique++;
      end
      if (dut.u_crt.u_sum.z[14:0] >= 15'(MT)) n_crtcorr++;
      checks++;
      if (longint'(crt_x) != y % MT) begin
        failures++; $display("FAIL CRT of y(%0d): %0d, expected %0d", n, crt_x, y % MT);
      end
      n_fir++;
    end
  endtask

  // ---------------------------------------------------------- 2. QRNS DFT
  int dre [ND][4], dim [ND][4];
  int ndo = 0;

  always @(posedge clk)
    if (!rst && dft_out_valid && ndo < ND) begin
      for (int k = 0; k < 2; k++)
        for (int l = 0; l < 2; l++) begin
          int sre, sim, sg, p;
          sre = 0; sim = 0;
          for (int q = 0; q < 4; q++) begin
            sg = (((q >> 1) & k) ^ (q & 1 & l)) ? -1 : 1;
            sre += sg * (ARE[q] * dre[ndo][q] - AIM[q] * dim[ndo][q]);
            sim += sg * (ARE[q] * dim[ndo][q] + AIM[q] * dre[ndo][q]);
          end
          p = 2 * k + l;
          for (int r = 0; r < L; r++) begin
            checks++;
            if (int'(dft_yn[r][p]) != md(sre + JM[r] * sim, DMOD[r]) ||
                int'(dft_yc[r][p]) != md(sre - JM[r] * sim, DMOD[r])) begin
              failures++; $display("FAIL DFT block %0d X%0d%0d mod %0d", ndo, k, l, DMOD[r]);
            end
          end
        end
      n_dft++;
      ndo <= ndo + 1;
    end

  task automatic run_dft();
    int a, b;
    for (int n = 0; n < ND; n++) begin
      for (int q = 0; q < 4; q++) begin
        a = int'($urandom_range(60)) - 30;
        b = int'($urandom_range(60)) - 30;
        dre[n][q] = a; dim[n][q] = b;
        for (int r = 0; r < L; r++) begin
          dft_xn[r][q] <= BMAX'(md(a + JM[r] * b, DMOD[r]));
          dft_xc[r][q] <= BMAX'(md(a - JM[r] * b, DMOD[r]));
        end
      end
      dft_in_valid <= 1;
      @(posedge clk);
    end
    dft_in_valid <= 0;
    wait (ndo == ND);
  endtask

  // ---------------------------------------------------------- 3. residue adder
  int asum [NA];
  int nao = 0;

  always @(posedge clk)
    if (!rst && add_out_valid && nao < NA) begin
      checks++;
      if ((int'(add_s) + int'(add_c)) % AM != asum[nao] % AM || add_overflow) begin
        failures++; $display("FAIL adder %0d", nao);
      end
      n_add++;
      nao <= nao + 1;
    end

  task automatic run_add();
    for (int n = 0; n < NA; n++) begin
      add_a1 <= AP'($urandom); add_a2 <= AP'($urandom);
      add_r1 <= AP'($urandom); add_r2 <= AP'($urandom);
      add_in_valid <= 1;
      @(posedge clk);
      asum[n] = int'(add_a1) + int'(add_a2) + int'(add_r1) + int'(add_r2);
    end
    add_in_valid <= 0;
    wait (nao == NA);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    fork
      run_fir();
      run_dft();
      run_add();
    join
    $display("outputs checked: FIR+CRT %0d, DFT %0d, adder %0d", n_fir, n_dft, n_add);
    $display("steering add %0d bypass %0d, x slide %0d", n_steer_add, n_steer_bypass, n_slide);
    $display("adder corrections: stage3 single %0d double %0d, stage4 %0d, stage5 %0d", n_c3x, n_c3d, n_c4, n_c5);
    $display("subnet non-unique states %0d, final CRT corrections %0d", n_nonunique, n_crtcorr);
    checks++;
    if (n_fir != NF || n_dft != ND || n_add != NA) begin failures++; $display("FAIL missing outputs"); end
    checks++;
    if (n_steer_add == 0 || n_steer_bypass == 0 || n_slide == 0) begin failures++; $display("FAIL steering/slide never seen"); end
    checks++;
    if (n_c3x == 0 || n_c3d == 0 || n_c4 == 0 || n_c5 == 0) begin failures++; $display("FAIL a correction path never fired"); end
    checks++;
    if (n_nonunique == 0 || n_crtcorr == 0) begin failures++; $display("FAIL non-unique/corrected CRT values never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
