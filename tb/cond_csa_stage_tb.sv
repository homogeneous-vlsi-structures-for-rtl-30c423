// cond_csa_stage_tb - random 5-bit pairs and operands. Enabled, the row must
// keep the arithmetic value: s_out + c_out + 32*cp_out = s_in + c_in + r_in,
// with s_out the bitwise three-input parity and c_out bit 0 clear. Disabled,
// the pair must pass unchanged with no carry out.
module cond_csa_stage_tb;
  localparam int P = 5;
  logic en;
  logic [P-1:0] s_in, c_in, r_in, s_out, c_out;
  logic cp_out;
  int checks = 0, failures = 0;

  cond_csa_stage #(.P(P)) dut (.en, .s_in, .c_in, .r_in, .s_out, .c_out, .cp_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      en = 1'($urandom);
      s_in = P'($urandom); c_in = P'($urandom); r_in = P'($urandom);
      #1;
      if (en) begin
        checks++;
        if (int'(s_out) + int'(c_out) + 32 * int'(cp_out) != int'(s_in) + int'(c_in) + int'(r_in)) begin
          failures++; $display("FAIL value s=%0d c=%0d r=%0d", s_in, c_in, r_in);
        end
        checks++;
        if (s_out !== (s_in ^ c_in ^ r_in) || c_out[0] !== 1'b0) begin
          failures++; $display("FAIL bits s=%0d c=%0d r=%0d", s_in, c_in, r_in);
        end
      end else begin
        checks++;
        if (s_out !== s_in || c_out !== c_in || cp_out !== 1'b0) begin
          failures++; $display("FAIL pass-through");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
