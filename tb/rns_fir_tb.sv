// rns_fir_tb - streams random integer samples X in [0, 24273) through the
// default three-channel RNS filter (moduli 31, 29, 27; 8 taps) as their
// residues and checks every output residue against the integer convolution
// sum COEF[i]*X(n-i) reduced modulo each channel's modulus. Also checks that
// all channels line up (one out_valid) and the 8*5 = 40 clock latency.
// A second filter with moduli 31, 13, 7 (5, 4 and 3 bits wide) checks that
// the shorter channels are delayed to line up with the longest one.
module rns_fir_tb;
  localparam int L = 3, N = 8, BMAX = 5, NS = 300, LAT = 40;
  localparam int MOD [L] = '{31, 29, 27};
  localparam int MOD2 [L] = '{31, 13, 7};
  localparam int COEF [N] = '{3, 7, 12, 5, 9, 1, 4, 2};

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [L-1:0][BMAX-1:0] x_res = '0, y_res, x2_res = '0, y2_res;
  logic out_valid2;
  int checks = 0, failures = 0, cyc = 0, nout = 0;
  longint xs [NS];
  int in_cyc [NS];

  always #5 clk = ~clk;

  rns_fir dut (.clk, .rst, .in_valid, .x_res, .out_valid, .y_res);
  rns_fir #(.MODULI(MOD2)) dut2 (.clk, .rst, .in_valid, .x_res(x2_res), .out_valid(out_valid2), .y_res(y2_res));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_y(input int n);
    longint s = 0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) s += COEF[i] * xs[n-i];
    return s;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid) begin
      if (nout < NS) begin
        for (int k = 0; k < L; k++) begin
          checks++;
          if (y_res[k] !== BMAX'(ref_y(nout) % MOD[k])) begin
            failures++;
            $display("FAIL y(%0d) mod %0d = %0d, expected %0d", nout, MOD[k], y_res[k], ref_y(nout) % MOD[k]);
          end
        end
        for (int k = 0; k < L; k++) begin
          checks++;
          if (!out_valid2 || y2_res[k] !== BMAX'(ref_y(nout) % MOD2[k])) begin
            failures++;
            $display("FAIL second filter y(%0d) mod %0d = %0d", nout, MOD2[k], y2_res[k]);
          end
        end
        checks++;
        if (cyc - in_cyc[nout] != LAT) begin
          failures++; $display("FAIL latency %0d", cyc - in_cyc[nout]);
        end
      end
      nout <= nout + 1;
    end
  end

  initial begin
    longint x;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < NS; n++) begin
      x = longint'($urandom_range(31*29*27 - 1));
      for (int k = 0; k < L; k++) begin
        x_res[k]  <= BMAX'(x % MOD[k]);
        x2_res[k] <= BMAX'(x % MOD2[k]);
      end
      in_valid <= 1;
      @(posedge clk);
      in_cyc[n] = cyc;
      xs[n] = x;
    end
    in_valid <= 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("FAIL got %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
