// lut_rom_tb - reads every word of two ROMs (32x5, the organisation with 8
// row and 4 column selects, and 16x3) and compares with the programmed table
// word w = (7w + 3) mod 2^DW.
module lut_rom_tb;
  function automatic bit [32*5-1:0] tab5();
    for (int w = 0; w < 32; w++) tab5[w*5 +: 5] = 5'((7*w + 3) % 32);
  endfunction
  function automatic bit [16*3-1:0] tab3();
    for (int w = 0; w < 16; w++) tab3[w*3 +: 3] = 3'((7*w + 3) % 8);
  endfunction

  logic [4:0] a5, d5;
  logic [3:0] a4;
  logic [2:0] d3;
  int checks = 0, failures = 0;

  lut_rom #(.AW(5), .DW(5), .CONTENT(tab5())) u5 (.addr(a5), .data(d5));
  lut_rom #(.AW(4), .DW(3), .CONTENT(tab3())) u3 (.addr(a4), .data(d3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 32; w++) begin
      a5 = 5'(w);
      a4 = 4'(w % 16);
      #1;
      checks++;
      if (d5 !== 5'((7*w + 3) % 32)) begin
        failures++;
        $display("FAIL 32x5 addr %0d: got %0d", w, d5);
      end
      checks++;
      if (d3 !== 3'((7*(w % 16) + 3) % 8)) begin
        failures++;
        $display("FAIL 16x3 addr %0d: got %0d", w % 16, d3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
