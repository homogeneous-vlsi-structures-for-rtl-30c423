// qrns_dft2x2_tb - complex end-to-end check of the QRNS 2x2 DFT element.
// Random complex integer blocks are encoded into QRNS form (normal a + j_m b,
// conjugate a - j_m b, with j_m = 5, 4, 12 the square roots of -1 modulo
// 13, 17, 29) and streamed in. The expected result is computed in ordinary
// complex integer arithmetic with the default twiddles alpha01 = j,
// alpha10 = 1+j, alpha11 = -1+j, then encoded the same way and compared with
// all 24 output residues. Latency must be 2*5 = 10 clocks.
module qrns_dft2x2_tb;
  localparam int L = 3, BMAX = 5, NS = 200, LAT = 10;
  localparam int MOD [L] = '{13, 17, 29};
  localparam int JM  [L] = '{5, 4, 12};
  localparam int ARE [4] = '{1, 0, 1, -1};
  localparam int AIM [4] = '{0, 1, 1, 1};

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [L-1:0][3:0][BMAX-1:0] xn = '0, xc = '0, yn, yc;
  int checks = 0, failures = 0, cyc = 0, nout = 0;
  int xre [NS][4], xim [NS][4];
  int in_cyc [NS];

  always #5 clk = ~clk;

  qrns_dft2x2 dut (.clk, .rst, .in_valid, .xn, .xc, .out_valid, .yn, .yc);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int md(input int a, input int m);
    int r = a % m;
    return (r < 0) ? r + m : r;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid) begin
      if (nout < NS) begin
        for (int k = 0; k < 2; k++)
          for (int l = 0; l < 2; l++) begin
            int sre, sim, p, sg;
            sre = 0; sim = 0;
            for (int q = 0; q < 4; q++) begin
              // position q = 2n + m; sign (-1)^(n*k + m*l)
              sg = (((q >> 1) & k) ^ (q & 1 & l)) ? -1 : 1;
              sre += sg * (ARE[q] * xre[nout][q] - AIM[q] * xim[nout][q]);
              sim += sg * (ARE[q] * xim[nout][q] + AIM[q] * xre[nout][q]);
            end
            p = 2 * k + l;
            for (int r = 0; r < L; r++) begin
              checks++;
              if (yn[r][p] !== BMAX'(md(sre + JM[r] * sim, MOD[r]))) begin
                failures++; $display("FAIL block %0d X%0d%0d normal mod %0d", nout, k, l, MOD[r]);
              end
              checks++;
              if (yc[r][p] !== BMAX'(md(sre - JM[r] * sim, MOD[r]))) begin
                failures++; $display("FAIL block %0d X%0d%0d conjugate mod %0d", nout, k, l, MOD[r]);
              end
            end
          end
        checks++;
        if (cyc - in_cyc[nout] != LAT) begin failures++; $display("FAIL latency %0d", cyc - in_cyc[nout]); end
      end
      nout <= nout + 1;
    end
  end

  initial begin
    int a, b;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < NS; n++) begin
      for (int q = 0; q < 4; q++) begin
        a = int'($urandom_range(40)) - 20;
        b = int'($urandom_range(40)) - 20;
        xre[n][q] = a; xim[n][q] = b;
        for (int r = 0; r < L; r++) begin
          xn[r][q] <= BMAX'(md(a + JM[r] * b, MOD[r]));
          xc[r][q] <= BMAX'(md(a - JM[r] * b, MOD[r]));
        end
      end
      in_valid <= 1;
      @(posedge clk);
      in_cyc[n] = cyc;
    end
    in_valid <= 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("FAIL got %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
