// csa_bit_cell_tb - exhaustive check of the 16-word carry-save bit cell:
// enabled, sum/carry_up are the full-adder sum and majority; disabled, the
// sum and carry bits pass straight through (carry_here).
module csa_bit_cell_tb;
  logic s, c, r, en, sum, carry_up, carry_here;
  int checks = 0, failures = 0;

  csa_bit_cell dut (.s, .c, .r, .en, .sum, .carry_up, .carry_here);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      {en, r, c, s} = 4'(a);
      #1;
      checks++;
      if (en) begin
        if ({carry_here, carry_up, sum} !== {1'b0, 2'(int'(s) + int'(c) + int'(r))}) begin
          failures++; $display("FAIL enabled s=%b c=%b r=%b", s, c, r);
        end
      end else begin
        if ({carry_here, carry_up, sum} !== {c, 1'b0, s}) begin
          failures++; $display("FAIL disabled s=%b c=%b r=%b", s, c, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
