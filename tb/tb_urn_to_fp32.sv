// tb_urn_to_fp32: self-checking testbench for the uniform-word to float32
// converter. Every input u must give the float32 nearest to u / 2^32 (ties to
// even), one rising edge after it is applied, with a new input every cycle.
// Covered: zero, one, every single-bit word, the top of the range that rounds
// to 1.0, exact ties around the rounding point, and random words.
module tb_urn_to_fp32;
  import tb_fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] u, x;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  urn_to_fp32 dut (.clk(clk), .urn(u), .x(x));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] v);
    logic [31:0] e;
    @(negedge clk);
    u = v;
    @(posedge clk);
    #1;
    e = r2f(real'(v) / 4294967296.0);
    checks++;
    if (x !== e) begin
      failures++;
      if (failures < 10) $display("FAIL urn %h: got %h expected %h", v, x, e);
    end
  endtask

  initial begin
    u = 0;
    check(32'h0000_0000);
    check(32'h8000_0000);           // 0.5 -> 3F000000
    check(32'hFFFF_FFFF);           // rounds to 1.0
    check(32'hFFFF_FF80);           // tie, odd LSB -> up to 1.0
    check(32'hFFFF_FE80);           // tie, even LSB -> stays
    check(32'h0056_7854);           // one of the document's example inputs
    for (int i = 0; i < 32; i++) check(32'd1 << i);
    for (int i = 0; i < 20000; i++) check($urandom >> ($urandom % 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
