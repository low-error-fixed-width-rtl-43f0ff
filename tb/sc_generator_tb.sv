// sc_generator_tb: exhaustive self-checking test of sc_generator for the
// N = 8 multiplier (K = 4 digits, one alpha) and the N = 16 multiplier
// (K = 8 digits, three alphas), plus K = 6 (not a power of two).
//
// For every input pattern with R ones, alpha_k must be 1 exactly when
// R >= 2k+1, so that the alphas add up to floor((R-1)/2) (0 for R = 0).
module sc_generator_tb;

  logic [3:0] nz4;  logic [0:0] al4;
  logic [7:0] nz8;  logic [2:0] al8;
  logic [5:0] nz6;  logic [1:0] al6;
  int checks = 0, failures = 0;
  logic clk = 0;

  sc_generator #(.K(4)) dut4 (.nz(nz4), .alpha(al4));
  sc_generator #(.K(8)) dut8 (.nz(nz8), .alpha(al8));
  sc_generator #(.K(6)) dut6 (.nz(nz6), .alpha(al6));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_sum(input int r, input int m);
    int s;
    s = (r >= 1) ? (r - 1) / 2 : 0;
    return (s > m) ? m : s;
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      int r4, r8, r6, s;
      nz4 = 4'(v); nz8 = 8'(v); nz6 = 6'(v);
      @(posedge clk);
      r4 = $countones(nz4); r8 = $countones(nz8); r6 = $countones(nz6);
      checks++;
      if (al4[0] !== (r4 >= 3) || int'(al4) != expect_sum(r4, 1)) begin
        failures++; $display("FAIL K=4 nz=%b alpha=%b", nz4, al4);
      end
      for (int k = 1; k <= 3; k++) begin
        checks++;
        if (al8[k-1] !== (r8 >= 2 * k + 1)) begin
          failures++; $display("FAIL K=8 nz=%b alpha=%b", nz8, al8);
        end
      end
      s = int'(al8[0]) + int'(al8[1]) + int'(al8[2]);
      checks++;
      if (s != expect_sum(r8, 3)) begin
        failures++; $display("FAIL K=8 sum nz=%b alpha=%b", nz8, al8);
      end
      for (int k = 1; k <= 2; k++) begin
        checks++;
        if (al6[k-1] !== (r6 >= 2 * k + 1)) begin
          failures++; $display("FAIL K=6 nz=%b alpha=%b", nz6, al6);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
