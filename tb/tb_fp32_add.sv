// tb_fp32_add: self-checking testbench for the float32 adder.
//
// A new operand pair is applied every clock cycle and the sum is checked one
// rising edge later (latency 1). The expected sum is the double-precision sum
// rounded to float32. When the exponents differ by at most 29 the double sum
// is exact, so the result must match bit for bit; beyond that the double sum
// may itself be rounded and one unit in the last place is allowed. Covered:
// same-sign and opposite-sign operands over a range of exponent differences,
// heavy cancellation, exact cancellation, zeros, overflow, infinities, NaN.
module tb_fp32_add;
  import tb_fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp32_add dut (.clk(clk), .a(a), .b(b), .y(y));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] z, input logic [31:0] exp_w,
                       input int tol_ulp, input string what);
    logic [31:0] r;
    logic        ok;
    @(negedge clk);
    a = x; b = z;
    @(posedge clk);
    #1 r = y;
    checks++;
    if (exp_w[30:23] == 8'hFF && exp_w[22:0] != 0) ok = (r[30:23] == 8'hFF && r[22:0] != 0);
    else if (exp_w[30:0] == 0) ok = (r[30:0] == 0);
    else ok = (r[31] == exp_w[31]) && (ulp_diff(r, exp_w) <= tol_ulp);
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h + %h = %h, expected %h", what, x, z, r, exp_w);
    end
  endtask

  initial begin
    logic [31:0] x, z;
    int          ex, dz;
    a = 0; b = 0;
    for (int i = 0; i < 30000; i++) begin
      ex = 60 + int'($urandom % 120);
      dz = int'($urandom % 34);               // exponent difference 0..33
      x  = {1'($urandom), 8'(ex), 23'($urandom)};
      z  = {1'($urandom), 8'(ex - dz), 23'($urandom)};
      if ($urandom % 2 == 1) begin
        check(x, z, r2f(f2r(x) + f2r(z)), (dz > 29) ? 1 : 0, "random");
      end else begin
        check(z, x, r2f(f2r(x) + f2r(z)), (dz > 29) ? 1 : 0, "random swapped");
      end
    end
    // Heavy cancellation: nearly equal magnitudes, opposite signs.
    for (int i = 0; i < 5000; i++) begin
      x = {1'b0, 8'd130, 23'($urandom)};
      z = {1'b1, 8'd130, x[22:0] ^ 23'($urandom % 64)};
      check(x, z, r2f(f2r(x) + f2r(z)), 0, "cancel");
      z = {1'b1, 8'd129, 23'($urandom)};
      check(x, z, r2f(f2r(x) + f2r(z)), 0, "cancel1");
    end
    check(32'h3F800000, 32'h3F800000, 32'h40000000, 0, "1+1");
    check(32'h40500000, 32'hBF800000, 32'h40100000, 0, "3.25-1");
    check(32'h3F317218, 32'hBF317218, 32'h00000000, 0, "exact cancel");
    check(32'h00000000, 32'hC0490FDB, 32'hC0490FDB, 0, "zero+x");
    check(32'h00000000, 32'h00000000, 32'h00000000, 0, "zero+zero");
    check(32'h7F7FFFFF, 32'h7F7FFFFF, 32'h7F800000, 0, "overflow");
    check(32'h7F800000, 32'hC2000000, 32'h7F800000, 0, "inf");
    check(32'h7F800000, 32'hFF800000, 32'h7FC00000, 0, "inf-inf");
    check(32'h7FC00000, 32'h3F800000, 32'h7FC00000, 0, "nan");
    // Tiny addend far below the guard bits only sets the sticky bit.
    check(32'h3F800000, 32'h0B800000, 32'h3F800000, 0, "sticky only");
    check(32'h3F800000, 32'h8B800000, 32'h3F800000, 0, "sticky borrow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
