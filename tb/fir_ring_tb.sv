// fir_ring_tb - feeds a continuous stream of random samples into the default
// 8-tap filter over Z_31 (coefficients 3 7 12 5 9 1 4 2) and compares every
// output with the direct convolution sum COEF[i]*x(n-i) mod 31, samples
// before reset counting as zero. Also checks the N*B = 40 clock latency.
module fir_ring_tb;
  localparam int M = 31, N = 8, B = 5, NS = 400;
  localparam int COEF [N] = '{3, 7, 12, 5, 9, 1, 4, 2};

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [B-1:0] x_in = 0, y_out;
  int checks = 0, failures = 0, cyc = 0, nout = 0;
  int xs [NS];
  int in_cyc [NS];

  always #5 clk = ~clk;

  fir_ring dut (.clk, .rst, .in_valid, .x_in, .out_valid, .y_out);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_y(input int n);
    int s = 0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) s += COEF[i] * xs[n-i];
    return s % M;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid) begin
      if (nout < NS) begin
        checks++;
        if (y_out !== B'(ref_y(nout))) begin
          failures++; $display("FAIL y(%0d) = %0d, expected %0d", nout, y_out, ref_y(nout));
        end
        checks++;
        if (cyc - in_cyc[nout] != N * B) begin
          failures++; $display("FAIL latency %0d", cyc - in_cyc[nout]);
        end
      end
      nout <= nout + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < NS; n++) begin
      x_in     <= B'($urandom_range(M-1));
      in_valid <= 1;
      @(posedge clk);
      in_cyc[n] = cyc;
      xs[n] = int'(x_in);
    end
    in_valid <= 0;
    repeat (N * B + 4) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("FAIL got %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
