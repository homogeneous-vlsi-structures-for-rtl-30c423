// nn_subnet_tb - three subnets run side by side on random operands:
//   u_add : the default, adding two 15-bit inputs modulo 24273, no correction;
//   u_mul : multiplying two 15-bit inputs modulo 24273, no correction;
//   u_mulc: multiplying two 5-bit inputs modulo 29 with the final correction.
// Uncorrected results must be congruent to the exact sum/product and fit in
// ceil(log2 M) bits; the corrected one must equal the exact residue. The test
// counts results that settled in the non-unique range [M, 2^ZB) and fails if
// none did, and reports the longest iteration.
module nn_subnet_tb;
  localparam int M1 = 24273, IW1 = 15, M2 = 29, IW2 = 5, NS = 400;

  logic clk = 0, rst = 1, start = 0;
  logic [1:0][IW1-1:0] in1 = '0, in2 = '0;
  logic [1:0][IW2-1:0] in3 = '0;
  logic busy1, busy2, busy3, done1, done2, done3;
  logic [14:0] z1, z2;
  logic [4:0]  z3;
  int checks = 0, failures = 0, n_invalid = 0, longest = 0;

  always #5 clk = ~clk;

  nn_subnet u_add (.clk, .rst, .start, .in(in1), .busy(busy1), .done(done1), .z_out(z1));
  nn_subnet #(.M(M1), .NIN(2), .MUL(1), .IW(IW1)) u_mul (.clk, .rst, .start, .in(in2),
              .busy(busy2), .done(done2), .z_out(z2));
  nn_subnet #(.M(M2), .NIN(2), .MUL(1), .IW(IW2), .CORRECT(1)) u_mulc (.clk, .rst, .start, .in(in3),
              .busy(busy3), .done(done3), .z_out(z3));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a, b, c, d, e, f;
    int t;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 0; n < NS; n++) begin
      a = longint'($urandom_range(32767)); b = longint'($urandom_range(32767));
      c = longint'($urandom_range(32767)); d = longint'($urandom_range(32767));
      e = longint'($urandom_range(31));    f = longint'($urandom_range(31));
      if (n == 0) begin a = 32767; b = 32767; c = 32767; d = 32767; e = 31; f = 31; end
      in1 <= {IW1'(b), IW1'(a)};
      in2 <= {IW1'(d), IW1'(c)};
      in3 <= {IW2'(f), IW2'(e)};
      start <= 1;
      @(posedge clk);
      #1;
      start <= 0;
      t = 0;
      while (!(done1 && done2 && done3)) begin
        @(posedge clk);
        #1;
        t++;
      end
      if (t > longest) longest = t;
      checks++;
      if (longint'(z1) % M1 != (a + b) % M1) begin
        failures++; $display("FAIL add %0d+%0d: z=%0d", a, b, z1);
      end
      checks++;
      if (longint'(z2) % M1 != (c * d) % M1) begin
        failures++; $display("FAIL mul %0d*%0d: z=%0d", c, d, z2);
      end
      checks++;
      if (longint'(z3) != (e * f) % M2) begin
        failures++; $display("FAIL corrected mul %0d*%0d: z=%0d", e, f, z3);
      end
      if (z1 >= M1) n_invalid++;
      if (z2 >= M1) n_invalid++;
      @(posedge clk);
    end
    $display("settled in [M, 2^ZB): %0d times; longest run %0d clocks", n_invalid, longest);
    checks++;
    if (n_invalid == 0) begin failures++; $display("FAIL no non-unique settled value seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
