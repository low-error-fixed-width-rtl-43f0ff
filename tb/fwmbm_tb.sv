// fwmbm_tb: end-to-end, full-size test of the 8x8 fixed-width multiplier
// at its default parameters.
//
// After a synchronous reset (the output must read 0), all 65536 signed
// operand pairs are applied back to back, one per clock. Each output is
// compared, one cycle later, with the bit-accurate reference model
// (fwmbm_ref_pkg::fixed_ref), which checks the throughput of one product
// per cycle and the one-cycle latency; between edges the output must not
// follow the new operands. Against the exact product x*y the
// error e = p*256 - x*y must stay within 1.5 output LSBs, and over the whole
// input space its sum and sum of squares must match the figures of this
// compensation scheme (mean -0.1328125 LSB, mean square
// 0.16638565063476562 LSB^2, i.e. sums -2228224 and 714620928 in units of
// 2^-8 LSB). The test also counts how often each mechanism occurred:
// every Booth digit value, the 111 "negative zero" group, the SC-generator
// adding 0 and 1 compensation units, negative products and reset; a
// mechanism that never occurs counts as a failure.
module fwmbm_tb;
  import fwmbm_ref_pkg::*;

  localparam int N = 8;

  logic         clk = 0;
  logic         rst_n;
  logic [N-1:0] x, y, p;
  int checks = 0, failures = 0;
  longint err_sum = 0, err_sq = 0;
  int n_digit[5];        // digit -2..+2
  int n_negzero = 0, n_alpha0 = 0, n_alpha1 = 0, n_negprod = 0, n_reset = 0;

  fwmbm dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(input int xp, input int yp);
    longint e, err;
    int r;
    e   = fixed_ref(xp, yp, N, 1);
    err = longint'(sx(longint'(p), N)) * 256 - longint'(sx(xp, N) * sx(yp, N));
    checks++;
    if (longint'(p) != e) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d p=%h expected %h", sx(xp, N), sx(yp, N), p, e);
    end
    checks++;
    if (err > 384 || err < -384) begin
      failures++;
      if (failures < 10) $display("FAIL error bound x=%0d y=%0d err=%0d", sx(xp, N), sx(yp, N), err);
    end
    err_sum += err;
    err_sq  += err * err;
    // mechanism counters
    for (int i = 0; i < N / 2; i++) begin
      int d;
      d = digit(xp, N, i);
      n_digit[d + 2]++;
      if (d == 0 && ((xp >> (2 * i)) & 3) == 3 && ((i == 0) ? 0 : (xp >> (2 * i - 1)) & 1) == 1)
        n_negzero++;
    end
    r = nonzero_digits(xp, N);
    if (r >= 3) n_alpha1++; else n_alpha0++;
    if (sx(longint'(p), N) < 0) n_negprod++;
  endtask

  initial begin
    logic [N-1:0] prev;
    foreach (n_digit[i]) n_digit[i] = 0;
    rst_n = 0; x = 8'h7f; y = 8'h7f;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (p !== '0) begin failures++; $display("FAIL reset p=%h", p); end
    else n_reset++;
    rst_n = 1;
    prev  = '0;
    // x, y are applied after one edge and sampled by the next one; p shows
    // their product right after that edge.
    for (int v = 0; v < 65536; v++) begin
      x = N'(v >> 8);
      y = N'(v & 255);
      #1;
      // the register must still hold the previous product
      checks++;
      if (p !== prev) begin
        failures++;
        if (failures < 10) $display("FAIL output changed before the clock edge");
      end
      @(posedge clk);
      #1;
      check_out(v >> 8, v & 255);
      prev = p;
    end
    checks++;
    if (err_sum != -64'sd2228224) begin
      failures++; $display("FAIL mean error sum %0d", err_sum);
    end
    checks++;
    if (err_sq != 64'sd714620928) begin
      failures++; $display("FAIL mean square error sum %0d", err_sq);
    end
    $display("mean error %f LSB, mean square error %f LSB^2",
             real'(err_sum) / 256.0 / 65536.0, real'(err_sq) / 65536.0 / 65536.0);
    $display("digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d, group 111:%0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4], n_negzero);
    $display("compensation 0:%0d 1:%0d, negative products:%0d, resets:%0d",
             n_alpha0, n_alpha1, n_negprod, n_reset);
    foreach (n_digit[i]) if (n_digit[i] == 0) failures++;
    if (n_negzero == 0 || n_alpha0 == 0 || n_alpha1 == 0 || n_negprod == 0 || n_reset == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
