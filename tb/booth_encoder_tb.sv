// booth_encoder_tb: exhaustive self-checking test of booth_encoder.
//
// All eight 3-bit groups are applied. The expected digit comes from the
// radix-4 Booth table written out here as a case statement (000/111 -> 0,
// 001/010 -> +1, 011 -> +2, 100 -> -2, 101/110 -> -1); neg, one, two, zero
// and cor are derived from that digit value, not from the encoder's gate
// equations. cor must be 1 exactly for the negative nonzero digits.
module booth_encoder_tb;
  import fwmbm_pkg::*;

  logic [2:0]   grp;
  booth_digit_t d;
  int checks = 0, failures = 0;
  logic clk = 0;

  booth_encoder dut (.grp(grp), .d(d));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit_of(input logic [2:0] g);
    case (g)
      3'b000, 3'b111: return 0;
      3'b001, 3'b010: return 1;
      3'b011:         return 2;
      3'b100:         return -2;
      default:        return -1;   // 101, 110
    endcase
  endfunction

  initial begin
    for (int g = 0; g < 8; g++) begin
      int dv;
      booth_digit_t e;
      grp = 3'(g);
      @(posedge clk);
      dv     = digit_of(grp);
      e.neg  = grp[2];
      e.one  = (dv == 1 || dv == -1);
      e.two  = (dv == 2 || dv == -2);
      e.zero = (dv == 0);
      e.cor  = (dv < 0);
      checks++;
      if (d !== e) begin
        failures++;
        $display("FAIL grp=%b got %b expected %b", grp, d, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
