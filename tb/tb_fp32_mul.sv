// tb_fp32_mul: self-checking testbench for the float32 multiplier.
//
// A new operand pair is applied every clock cycle (throughput 1) and the
// product is checked one rising edge later (latency 1). Expected results are
// the exact double-precision product of the two operands rounded to float32,
// which is the correctly rounded single-precision product. Covered: random
// normal operands, products that carry into a new binade, rounding ties,
// zeros, underflow to zero, overflow to infinity, infinities and NaN.
module tb_fp32_mul;
  import tb_fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp32_mul dut (.clk(clk), .a(a), .b(b), .y(y));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_f(input int elo, input int ehi);
    return {1'($urandom), 8'(elo + int'($urandom % (ehi - elo + 1))), 23'($urandom)};
  endfunction

  // Apply one pair, return the product seen after exactly one edge.
  task automatic apply(input logic [31:0] x, input logic [31:0] z, output logic [31:0] r);
    @(negedge clk);
    a = x; b = z;
    @(posedge clk);
    #1 r = y;
  endtask

  task automatic check(input logic [31:0] x, input logic [31:0] z, input logic [31:0] exp_w,
                       input string what);
    logic [31:0] r;
    logic        ok;
    apply(x, z, r);
    checks++;
    if (exp_w[30:23] == 8'hFF && exp_w[22:0] != 0) ok = (r[30:23] == 8'hFF && r[22:0] != 0);
    else if (exp_w[30:0] == 0) ok = (r[30:0] == 0);
    else ok = (r == exp_w);
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h * %h = %h, expected %h", what, x, z, r, exp_w);
    end
  endtask

  initial begin
    logic [31:0] x, z;
    a = 0; b = 0;
    // Random normal operands, products well inside the range.
    for (int i = 0; i < 20000; i++) begin
      x = rand_f(70, 184);
      z = rand_f(70, 184);
      check(x, z, r2f(f2r(x) * f2r(z)), "random");
    end
    // Significands near 2.0 to force the carry and rounding carry paths.
    for (int i = 0; i < 2000; i++) begin
      x = {1'($urandom), 8'd127, 23'h7FF000 | 23'($urandom % 4096)};
      z = {1'($urandom), 8'd130, 23'h7FFF00 | 23'($urandom % 256)};
      check(x, z, r2f(f2r(x) * f2r(z)), "carry");
    end
    // Exact tie: (1 + 2^-23) * (1 + 2^-1) = 1.5 + 1.5*2^-23 -> ties to even.
    check(32'h3F800001, 32'h3FC00000, r2f(f2r(32'h3F800001) * 1.5), "tie");
    check(32'h3F800003, 32'h3FC00000, r2f(f2r(32'h3F800003) * 1.5), "tie2");
    // Paper's example value 3.25 = 0x40500000 times 2.
    check(32'h40500000, 32'h40000000, 32'h40D00000, "3.25*2");
    // Zeros, underflow, overflow, specials.
    check(32'h00000000, 32'h3F800000, 32'h00000000, "zero");
    check(32'h3F800000, 32'h80000000, 32'h80000000, "neg zero");
    check(32'h0DA24260, 32'h0DA24260, 32'h00000000, "underflow");
    check(32'h7E967699, 32'h7E967699, 32'h7F800000, "overflow");
    check(32'h7F800000, 32'h40000000, 32'h7F800000, "inf");
    check(32'h7F800000, 32'h00000000, 32'h7FC00000, "inf*0");
    check(32'h7FC00001, 32'h3F800000, 32'h7FC00000, "nan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
