// cla_adder_tb: self-checking test of cla_adder at the three widths the
// multiplier's tree uses in its full-width form (9, 12 and 16 bits).
// The 9-bit adder is tested exhaustively (all a, b, cin); the 12- and
// 16-bit adders with random operands plus all-ones/zero corner cases.
// Expected values come from the simulator's own integer addition.
module cla_adder_tb;

  logic [8:0]  a9,  b9,  s9;   logic c9,  co9;
  logic [11:0] a12, b12, s12;  logic c12, co12;
  logic [15:0] a16, b16, s16;  logic c16, co16;
  int checks = 0, failures = 0;
  logic clk = 0;

  cla_adder #(.W(9))  d9  (.a(a9),  .b(b9),  .cin(c9),  .sum(s9),  .cout(co9));
  cla_adder #(.W(12)) d12 (.a(a12), .b(b12), .cin(c12), .sum(s12), .cout(co12));
  cla_adder #(.W(16)) d16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_wide();
    logic [12:0] e12;
    logic [16:0] e16;
    #1;
    e12 = {1'b0, a12} + {1'b0, b12} + 13'(c12);
    e16 = {1'b0, a16} + {1'b0, b16} + 17'(c16);
    checks += 2;
    if ({co12, s12} !== e12) begin
      failures++; $display("FAIL W=12 %h+%h+%b got %h", a12, b12, c12, {co12, s12});
    end
    if ({co16, s16} !== e16) begin
      failures++; $display("FAIL W=16 %h+%h+%b got %h", a16, b16, c16, {co16, s16});
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << 19); v++) begin
      logic [9:0] e9;
      {c9, a9, b9} = 19'(v);
      a12 = 12'($urandom); b12 = 12'($urandom); c12 = 1'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom);
      @(posedge clk);
      e9 = {1'b0, a9} + {1'b0, b9} + 10'(c9);
      checks++;
      if ({co9, s9} !== e9) begin
        failures++;
        if (failures < 10) $display("FAIL W=9 %h+%h+%b got %h", a9, b9, c9, {co9, s9});
      end
      check_wide();
    end
    // carry-chain corner cases
    a12 = '1; b12 = '0; c12 = 1; a16 = '1; b16 = '0; c16 = 1; check_wide();
    a12 = '1; b12 = '1; c12 = 1; a16 = '1; b16 = '1; c16 = 1; check_wide();
    a12 = 12'h800; b12 = 12'h800; c12 = 0; a16 = 16'h8000; b16 = 16'h8000; c16 = 0; check_wide();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
