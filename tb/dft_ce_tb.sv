// dft_ce_tb - random 2x2 blocks over GF(13) with twiddle components
// a01 = 5, a10 = 6, a11 = 9 (the defaults); each output is compared with
//   X[k][l] = x00 + (-1)^l a01 x01 + (-1)^k a10 x10 + (-1)^(k+l) a11 x11 mod 13,
// and the latency must be 2*B = 8 clocks.
module dft_ce_tb;
  localparam int M = 13, B = 4, NS = 300, LAT = 8;
  localparam int A01 = 5, A10 = 6, A11 = 9;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [B-1:0] x00 = 0, x01 = 0, x10 = 0, x11 = 0, y00, y01, y10, y11;
  int checks = 0, failures = 0, cyc = 0, nout = 0;
  int xs [NS][4];
  int in_cyc [NS];

  always #5 clk = ~clk;

  dft_ce dut (.clk, .rst, .in_valid, .x00, .x01, .x10, .x11, .out_valid, .y00, .y01, .y10, .y11);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_x(input int n, input int k, input int l);
    int s;
    s = xs[n][0]
      + (l ? -1 : 1) * A01 * xs[n][1]
      + (k ? -1 : 1) * A10 * xs[n][2]
      + ((k ^ l) ? -1 : 1) * A11 * xs[n][3];
    s = s % M;
    if (s < 0) s += M;
    return s;
  endfunction

  task automatic chk(input int n, input int k, input int l, input logic [B-1:0] got);
    checks++;
    if (got !== B'(ref_x(n, k, l))) begin
      failures++; $display("FAIL block %0d X%0d%0d = %0d, expected %0d", n, k, l, got, ref_x(n, k, l));
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid) begin
      if (nout < NS) begin
        chk(nout, 0, 0, y00); chk(nout, 0, 1, y01);
        chk(nout, 1, 0, y10); chk(nout, 1, 1, y11);
        checks++;
        if (cyc - in_cyc[nout] != LAT) begin failures++; $display("FAIL latency %0d", cyc - in_cyc[nout]); end
      end
      nout <= nout + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < NS; n++) begin
      x00 <= B'($urandom_range(M-1)); x01 <= B'($urandom_range(M-1));
      x10 <= B'($urandom_range(M-1)); x11 <= B'($urandom_range(M-1));
      in_valid <= 1;
      @(posedge clk);
      in_cyc[n] = cyc;
      xs[n][0] = int'(x00); xs[n][1] = int'(x01); xs[n][2] = int'(x10); xs[n][3] = int'(x11);
    end
    in_valid <= 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("FAIL got %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
