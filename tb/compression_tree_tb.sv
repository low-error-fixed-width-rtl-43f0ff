// compression_tree_tb: self-checking test of compression_tree.
//
// The partial-product rows and cor bits are built by the reference model
// (not by the RTL encoder and row generator) and fed to three instances:
//   full : N = 8, LO = 0, no compensation - the sum must be the exact 16-bit
//          product x*y for all 65536 operand pairs;
//   fw8  : N = 8, LO = 7 (fixed width), random alpha_1 and lambda_bar,
//          checked column-accurately against the reference window sum;
//   fw16 : N = 16, LO = 15, three alphas (two of them enter as tree rows),
//          random operands.
module compression_tree_tb;
  import fwmbm_ref_pkg::*;

  logic [3:0][8:0]   pp8;
  logic [3:0]        cor8;
  logic [15:0]       sum_full;
  logic [8:0]        sum_fw8;
  logic [0:0]        al8;
  logic              lb8;

  logic [7:0][16:0]  pp16;
  logic [7:0]        cor16;
  logic [2:0]        al16;
  logic              lb16;
  logic [16:0]       sum_fw16;

  int checks = 0, failures = 0;
  logic clk = 0;

  compression_tree #(.N(8), .LO(0), .M(1)) u_full (
    .pp(pp8), .cor(cor8), .alpha(1'b0), .lambda_bar(1'b0), .sum(sum_full));
  compression_tree #(.N(8)) u_fw8 (
    .pp(pp8), .cor(cor8), .alpha(al8), .lambda_bar(lb8), .sum(sum_fw8));
  compression_tree #(.N(16)) u_fw16 (
    .pp(pp16), .cor(cor16), .alpha(al16), .lambda_bar(lb16), .sum(sum_fw16));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      longint x, y, e;
      int comp;
      x = v >> 8; y = v & 255;
      for (int i = 0; i < 4; i++) begin
        int d;
        d = digit(x, 8, i);
        pp8[i]  = 9'(row(d, y, 8));
        cor8[i] = (d < 0);
      end
      al8 = 1'($urandom); lb8 = 1'($urandom);
      // 16-bit case: random operands
      x = longint'($urandom & 16'hffff); y = longint'($urandom & 16'hffff);
      for (int i = 0; i < 8; i++) begin
        int d;
        d = digit(x, 16, i);
        pp16[i]  = 17'(row(d, y, 16));
        cor16[i] = (d < 0);
      end
      al16 = 3'($urandom); lb16 = 1'($urandom);
      @(posedge clk);
      // full width: exact product
      e = longint'(sx(v >> 8, 8) * sx(v & 255, 8)) & 16'hffff;
      checks++;
      if (longint'(sum_full) != e) begin
        failures++;
        if (failures < 10) $display("FAIL full x=%0d y=%0d got %h exp %h", v >> 8, v & 255, sum_full, e);
      end
      // fixed width, N = 8
      comp = int'(al8) + int'(lb8);
      e = window_ref(v >> 8, v & 255, 8, 7, comp);
      checks++;
      if (longint'(sum_fw8) != e) begin
        failures++;
        if (failures < 10) $display("FAIL fw8 v=%h got %h exp %h", v, sum_fw8, e);
      end
      // fixed width, N = 16
      comp = int'(al16[0]) + int'(al16[1]) + int'(al16[2]) + int'(lb16);
      e = window_ref(x, y, 16, 15, comp);
      checks++;
      if (longint'(sum_fw16) != e) begin
        failures++;
        if (failures < 10) $display("FAIL fw16 x=%h y=%h got %h exp %h", x, y, sum_fw16, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
