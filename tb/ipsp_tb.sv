// ipsp_tb - streams one random (y, x) pair per clock into a word-level IPSP
// over Z_31 with A = 19 and checks y_out = y + 19*x mod 31, the restored x,
// and that each result appears exactly B = 5 clocks after its inputs.
module ipsp_tb;
  localparam int M = 31, A = 19, B = 5, NS = 300;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [B-1:0] y_in = 0, x_in = 0, y_out, x_out;
  int checks = 0, failures = 0, cyc = 0, nout = 0;
  int in_cyc [NS];
  logic [B-1:0] ys [NS], xs [NS];

  always #5 clk = ~clk;

  ipsp #(.M(M), .A(A)) dut (.clk, .rst, .in_valid, .y_in, .x_in, .out_valid, .y_out, .x_out);

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
        checks++;
        if (y_out !== B'((ys[nout] + A * xs[nout]) % M)) begin
          failures++; $display("FAIL %0d: y=%0d x=%0d got %0d", nout, ys[nout], xs[nout], y_out);
        end
        checks++;
        if (x_out !== xs[nout]) begin failures++; $display("FAIL x_out %0d", nout); end
        checks++;
        if (cyc - in_cyc[nout] != B) begin
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
      y_in     <= B'($urandom_range(M-1));
      x_in     <= B'($urandom_range(M-1));
      in_valid <= 1;
      @(posedge clk);
      in_cyc[n] = cyc;
      ys[n] = y_in;
      xs[n] = x_in;
      // occasional bubble
      if (n % 17 == 16) begin
        in_valid <= 0;
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (B + 4) @(posedge clk);
    checks++;
    if (nout != NS) begin failures++; $display("FAIL got %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
