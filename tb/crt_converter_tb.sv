// crt_converter_tb - random integers X in [0, 31*29*27) are split into their
// residues modulo 31, 29, 27 (plus the corner cases 0 and 24272), converted,
// and the result must equal X. Reports the longest conversion time.
module crt_converter_tb;
  localparam int L = 3, BMAX = 5, NS = 300, MT = 31 * 29 * 27;
  localparam int MOD [L] = '{31, 29, 27};

  logic clk = 0, rst = 1, start = 0, ready, done;
  logic [L-1:0][BMAX-1:0] x_res = '0;
  logic [14:0] x_out;
  int checks = 0, failures = 0, longest = 0;

  always #5 clk = ~clk;

  crt_converter dut (.clk, .rst, .start, .x_res, .ready, .done, .x_out);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, t;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 0; n < NS; n++) begin
      x = (n == 0) ? 0 : (n == 1) ? MT - 1 : int'($urandom_range(MT - 1));
      for (int k = 0; k < L; k++) x_res[k] <= BMAX'(x % MOD[k]);
      checks++;
      if (!ready) begin failures++; $display("FAIL not ready"); end
      start <= 1;
      @(posedge clk);
      #1;
      start <= 0;
      t = 0;
      while (!done) begin
        @(posedge clk);
        #1;
        t++;
      end
      if (t > longest) longest = t;
      @(posedge clk);
      #1;
      checks++;
      if (int'(x_out) != x) begin
        failures++; $display("FAIL X=%0d converted to %0d", x, x_out);
      end
    end
    $display("longest conversion %0d clocks", longest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
