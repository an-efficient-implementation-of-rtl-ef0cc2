// urn_to_fp32: converts a 32-bit uniform random word to the float32 number
// x = urn / 2^32, a fraction in [0,1).
//
// The generator reads its 32-bit input as a binary fraction with the point in
// front of the MSB, and evaluates the interval polynomial in floating point,
// so the word is converted once at the head of the pipeline. The conversion
// is exact up to rounding: the leading one is found (position p), the word is
// shifted so that bit becomes the hidden one, the exponent is p - 32 plus the
// bias, and the 23 fraction bits are rounded to nearest, ties to even, from
// the bits below them. A word of 2^32 - 1 rounds up to exactly 1.0. A zero
// word gives +0. The sign bit of 'x' is always 0, because the input is an
// unsigned fraction; it is kept so that 'x' is a complete float32 word.
//
// The conversion is done directly, as one combinational step, rather than as
// integer-to-float followed by a multiplication by 2^-32; the result is the
// same float32 value for every input.
//
// Interface and timing: 'urn' sampled on a rising edge of clk gives 'x' one
// cycle later (latency 1, one conversion per clock). No reset.
module urn_to_fp32
  import fp32_pkg::*;
(
  input  logic        clk,
  input  logic [31:0] urn,
  output fp32_t       x
);

  fp32_t       res;
  logic [4:0]  lz;
  logic [31:0] n;
  logic [24:0] rnd;
  logic [7:0]  e;

  always_comb begin
    lz = 5'd0;
    for (int i = 0; i <= 31; i++)
      if (urn[31-i] == 1'b0 && lz == 5'(i) && i < 31) lz = 5'(i + 1);
    n   = urn << lz;                         // n[31] is the leading one
    e   = 8'd126 - {3'd0, lz};               // 2^-1 for a set MSB
    rnd = {1'b0, n[31:8]};
    if (n[7] && ((|n[6:0]) || n[8])) rnd = rnd + 25'd1;
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 8'd1;
    end
    res.sign = 1'b0;
    res.exp  = e;
    res.man  = rnd[22:0];
    if (urn == 32'd0) res = FP_ZERO;
  end

  always_ff @(posedge clk) x <= res;

endmodule
