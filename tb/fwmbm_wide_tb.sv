// fwmbm_wide_tb: the fixed-width multiplier at larger operand widths,
// N = 16 (SC-generator with three alphas, two of them entering the adder
// tree as rows) and N = 32.
//
// Random signed operand pairs, plus the extreme values, are streamed one
// per clock into both instances. Each output is checked bit-accurately
// against the reference model one cycle later, and the error against the
// exact product must stay within 2 output LSBs (4 for N = 32, which
// truncates more columns). The mean and mean-square
// errors are printed; the mean must lie within +-0.25 LSB. Also counted:
// products with the compensation at 0 and at its maximum M units.
module fwmbm_wide_tb;
  import fwmbm_ref_pkg::*;

  localparam int NV = 20000;

  logic        clk = 0;
  logic        rst_n;
  logic [15:0] x16, y16, p16;
  logic [31:0] x32, y32, p32;
  int checks = 0, failures = 0;
  real esum16 = 0.0, esq16 = 0.0, esum32 = 0.0, esq32 = 0.0;
  int n_comp0 = 0, n_compmax = 0;

  fwmbm #(.N(16)) dut16 (.clk(clk), .rst_n(rst_n), .x(x16), .y(y16), .p(p16));
  fwmbm #(.N(32)) dut32 (.clk(clk), .rst_n(rst_n), .x(x32), .y(y32), .p(p32));

  always #5 clk = ~clk;

  initial begin
    repeat (NV + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // error of p against x*y, in output LSBs
  function automatic real err_lsb(input longint p, input longint x, input longint y, input int n);
    real exact;
    exact = real'(sx(x, n)) * real'(sx(y, n)) / (2.0 ** n);
    return real'(sx(p, n)) - exact;
  endfunction

  task automatic check(input int n, input longint p, input longint x, input longint y,
                       inout real esum, inout real esq);
    longint e;
    real er, bound;
    int r;
    e = fixed_ref(x, y, n, 1) & ((64'sd1 <<< n) - 1);
    checks++;
    if (p != e) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d x=%h y=%h p=%h expected %h", n, x, y, p, e);
    end
    er = err_lsb(p, x, y, n);
    bound = (n <= 16) ? 2.0 : 4.0;
    checks++;
    if (er > bound || er < -bound) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d error %f LSB", n, er);
    end
    esum += er;
    esq  += er * er;
    r = nonzero_digits(x, n);
    if (r <= 2) n_comp0++;
    if ((r - 1) / 2 == (n / 2 - 1) / 2) n_compmax++;
  endtask

  initial begin
    rst_n = 0; x16 = '0; y16 = '0; x32 = '0; y32 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int v = 0; v < NV; v++) begin
      case (v)
        0: begin x16 = 16'h8000; y16 = 16'h8000; x32 = 32'h8000_0000; y32 = 32'h8000_0000; end
        1: begin x16 = 16'h7fff; y16 = 16'h8000; x32 = 32'h7fff_ffff; y32 = 32'h8000_0000; end
        2: begin x16 = 16'h7fff; y16 = 16'h7fff; x32 = 32'h7fff_ffff; y32 = 32'h7fff_ffff; end
        3: begin x16 = 16'hffff; y16 = 16'hffff; x32 = 32'hffff_ffff; y32 = 32'hffff_ffff; end
        default: begin
          x16 = 16'($urandom); y16 = 16'($urandom);
          x32 = $urandom;      y32 = $urandom;
        end
      endcase
      @(posedge clk);
      #1;
      check(16, longint'(p16), longint'(x16), longint'(y16), esum16, esq16);
      check(32, longint'(p32), longint'(x32), longint'(y32), esum32, esq32);
    end
    $display("N=16 mean error %f LSB, mean square %f LSB^2", esum16 / NV, esq16 / NV);
    $display("N=32 mean error %f LSB, mean square %f LSB^2", esum32 / NV, esq32 / NV);
    $display("compensation 0: %0d, at maximum: %0d", n_comp0, n_compmax);
    checks += 2;
    if (esum16 / NV > 0.25 || esum16 / NV < -0.25) failures++;
    if (esum32 / NV > 0.25 || esum32 / NV < -0.25) failures++;
    if (n_comp0 == 0 || n_compmax == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
