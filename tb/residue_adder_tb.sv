// residue_adder_tb - streams random redundant operands (all four 5-bit words
// uniform in [0, 32)) through the default modulo-17 adder, plus the all-ones corner
// case, and checks (s_out + c_out) mod 17 = (a1 + a2 + r1 + r2) mod 17, that
// no carry leaves the last stage, and the five-clock latency. It also counts
// how often each correction path of stages 3-5 fired and fails if one never
// did.
module residue_adder_tb;
  localparam int M = 17, P = 5, NS = 3000, LAT = 5;

  logic clk = 0, rst = 1, in_valid = 0, out_valid, out_overflow;
  logic [P-1:0] a1 = 0, a2 = 0, r1 = 0, r2 = 0, s_out, c_out;
  int checks = 0, failures = 0, cyc = 0, nout = 0;
  int sums [NS];
  int in_cyc [NS];
  int n_xor = 0, n_and = 0, n_cp3 = 0, n_cp4 = 0;

  always #5 clk = ~clk;

  residue_adder dut (.clk, .rst, .in_valid, .a1, .a2, .r1, .r2, .out_valid, .s_out, .c_out, .out_overflow);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (dut.st2.v && (dut.cp1_2 ^ dut.cp2_2)) n_xor++;
      if (dut.st2.v && (dut.cp1_2 & dut.cp2_2)) n_and++;
      if (dut.st3.v && dut.cp3_3) n_cp3++;
      if (dut.st4.v && dut.cp4_4) n_cp4++;
    end
    if (!rst && out_valid) begin
      if (nout < NS) begin
        checks++;
        if ((int'(s_out) + int'(c_out)) % M != sums[nout] % M) begin
          failures++; $display("FAIL %0d: got pair %0d+%0d, expected %0d mod %0d", nout, s_out, c_out, sums[nout], M);
        end
        checks++;
        if (out_overflow) begin failures++; $display("FAIL carry out of stage 5"); end
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
      if (n == 0) begin
        a1 <= '1; a2 <= '1; r1 <= '1; r2 <= '1;
      end else begin
        a1 <= P'($urandom); a2 <= P'($urandom); r1 <= P'($urandom); r2 <= P'($urandom);
      end
      in_valid <= 1;
      @(posedge clk);
      in_cyc[n] = cyc;
      sums[n] = int'(a1) + int'(a2) + int'(r1) + int'(r2);
    end
    in_valid <= 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("FAIL got %0d outputs", nout); end
    $display("corrections: stage3 single %0d, stage3 double %0d, stage4 %0d, stage5 %0d", n_xor, n_and, n_cp3, n_cp4);
    checks++;
    if (n_xor == 0 || n_and == 0 || n_cp3 == 0 || n_cp4 == 0) begin
      failures++; $display("FAIL a correction path never fired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
