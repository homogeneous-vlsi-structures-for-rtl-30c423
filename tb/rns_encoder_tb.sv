// rns_encoder_tb - random 15-bit words (and the corner cases 0 and 32767)
// are encoded into residues modulo 31, 29, 27; each residue is compared with
// X mod m computed directly, and the latency must be W = 15 clocks.
module rns_encoder_tb;
  localparam int L = 3, W = 15, BMAX = 5, NS = 300;
  localparam int MOD [L] = '{31, 29, 27};

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [W-1:0] x = '0;
  logic [L-1:0][BMAX-1:0] x_res;
  int checks = 0, failures = 0, cyc = 0, nout = 0;
  int xs [NS];
  int in_cyc [NS];

  always #5 clk = ~clk;

  rns_encoder dut (.clk, .rst, .in_valid, .x, .out_valid, .x_res);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid) begin
      if (nout < NS) begin
        for (int k = 0; k < L; k++) begin
          checks++;
          if (int'(x_res[k]) != xs[nout] % MOD[k]) begin
            failures++; $display("FAIL %0d mod %0d: got %0d", xs[nout], MOD[k], x_res[k]);
          end
        end
        checks++;
        if (cyc - in_cyc[nout] != W) begin failures++; $display("FAIL latency %0d", cyc - in_cyc[nout]); end
      end
      nout <= nout + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < NS; n++) begin
      x <= (n == 0) ? '0 : (n == 1) ? '1 : W'($urandom);
      in_valid <= 1;
      @(posedge clk);
      in_cyc[n] = cyc;
      xs[n] = int'(x);
    end
    in_valid <= 0;
    repeat (W + 4) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("FAIL got %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
