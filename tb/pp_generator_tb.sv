// pp_generator_tb: exhaustive self-checking test of pp_generator (N = 8).
//
// For every 8-bit operand a and every Booth digit in {-2..+2} (and the
// "negative zero" group 111) the row must equal, as a 9-bit two's-complement
// number, digit * a for a non-negative digit and digit * a - 1 (the ones'
// complement of the magnitude) for a negative one; the zero digit gives 0.
// The digit controls are built here from the digit value.
module pp_generator_tb;
  import fwmbm_pkg::*;

  localparam int unsigned N = 8;

  logic [N-1:0] a;
  booth_digit_t d;
  logic [N:0]   p;
  int checks = 0, failures = 0;
  logic clk = 0;

  pp_generator #(.N(N)) dut (.a(a), .d(d), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // digit codes: -2,-1,0(+),1,2, and 0 with neg set (group 111)
    for (int dc = 0; dc < 6; dc++) begin
      int dv;
      logic negz;
      dv   = (dc == 5) ? 0 : dc - 2;
      negz = (dc == 5);
      for (int av = 0; av < (1 << N); av++) begin
        int sa, expv;
        logic [N:0] e;
        a      = N'(av);
        d.neg  = (dv < 0) || negz;
        d.one  = (dv == 1 || dv == -1);
        d.two  = (dv == 2 || dv == -2);
        d.zero = (dv == 0);
        d.cor  = (dv < 0);
        @(posedge clk);
        sa   = (av >= (1 << (N - 1))) ? av - (1 << N) : av;
        expv = (dv < 0) ? dv * sa - 1 : dv * sa;
        e    = (N + 1)'(expv);
        checks++;
        if (p !== e) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d digit=%0d got %b expected %b", sa, dv, p, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
