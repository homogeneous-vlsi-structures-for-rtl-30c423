// bipsp_cell_tb - drives random residues through two cells over Z_29
// (A = 11, stage I = 2; one with the extra x latch) and checks the steered
// sum y + [x~ bit 0] * (4*11 mod 29), the one-place rotation of x~ and the
// one- and two-clock latencies.
module bipsp_cell_tb;
  localparam int M = 29, A = 11, I = 2, B = 5;
  localparam int C = (A << I) % M;

  logic clk = 0, rst = 1;
  logic [B-1:0] y_in, x_in, y_out, x_out, y_out2, x_out2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bipsp_cell #(.M(M), .A(A), .I(I))               dut  (.clk, .rst, .y_in, .x_in, .y_out, .x_out);
  bipsp_cell #(.M(M), .A(A), .I(I), .X_EXTRA(1))  dut2 (.clk, .rst, .y_in, .x_in, .y_out(y_out2), .x_out(x_out2));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [B-1:0] ey [$];
  logic [B-1:0] ex [$];

  initial begin
    logic [B-1:0] xp;
    y_in = 0; x_in = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    xp = 0;
    for (int n = 0; n < 400; n++) begin
      y_in <= B'($urandom_range(M-1));
      x_in <= B'($urandom);
      @(posedge clk);
      #1;
      // one clock later
      checks++;
      if (y_out !== (x_in[0] ? B'((y_in + C) % M) : y_in)) begin
        failures++; $display("FAIL y: y_in=%0d x=%b got %0d", y_in, x_in, y_out);
      end
      checks++;
      if (x_out !== {x_in[0], x_in[B-1:1]}) begin
        failures++; $display("FAIL x rotate: x=%b got %b", x_in, x_out);
      end
      checks++;
      if (y_out2 !== y_out) begin failures++; $display("FAIL y of extra-latch cell"); end
      if (n > 0) begin
        checks++;
        if (x_out2 !== {xp[0], xp[B-1:1]}) begin failures++; $display("FAIL extra x latch"); end
      end
      xp = x_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
