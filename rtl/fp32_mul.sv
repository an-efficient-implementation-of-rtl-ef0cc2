// fp32_mul: single-precision floating-point multiplier, one result per clock.
//
// How it works: the sign is the XOR of the input signs, the biased exponents
// are added and the bias removed, and the two 24-bit significands (hidden one
// included) are multiplied into a 48-bit product. A product of 2.0 or more is
// shifted right by one with the exponent raised by one, then the result is
// rounded to 24 bits, round-to-nearest-even, using a guard bit and a sticky
// OR of the bits below it; a carry out of the rounding renormalises again.
//
// Special values: an input with a zero exponent is zero (denormals are
// flushed), a result below the smallest normal is flushed to signed zero, an
// overflow gives signed infinity, infinity times zero and any NaN input give a
// quiet NaN. The generator itself only ever multiplies finite numbers.
//
// Interface and timing: 'a' and 'b' are sampled on a rising edge of clk and
// their product appears on 'y' one cycle later (latency 1, throughput 1 per
// clock), matching the one-operation-per-register-stage structure of the
// generator pipeline. No reset: the stage holds only data.
module fp32_mul
  import fp32_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  fp32_t       res;
  logic [47:0] prod;
  logic [23:0] sig;
  logic        guard, sticky;
  logic [24:0] rnd;
  logic signed [10:0] e;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    a_zero = (a.exp == 8'd0);
    b_zero = (b.exp == 8'd0);
    a_inf  = (a.exp == 8'hFF) && (a.man == 23'd0);
    b_inf  = (b.exp == 8'hFF) && (b.man == 23'd0);
    a_nan  = (a.exp == 8'hFF) && (a.man != 23'd0);
    b_nan  = (b.exp == 8'hFF) && (b.man != 23'd0);

    prod   = {1'b1, a.man} * {1'b1, b.man};
    e      = $signed({3'b000, a.exp}) + $signed({3'b000, b.exp}) - 11'sd127;
    if (prod[47]) begin
      sig    = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      e      = e + 11'sd1;
    end else begin
      sig    = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    rnd = {1'b0, sig};
    if (guard && (sticky || sig[0])) rnd = rnd + 25'd1;
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 11'sd1;
    end

    res.sign = a.sign ^ b.sign;
    res.exp  = e[7:0];
    res.man  = rnd[22:0];
    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      res = FP_QNAN;
    end else if (a_inf || b_inf) begin
      res.exp = 8'hFF;
      res.man = 23'd0;
    end else if (a_zero || b_zero || e <= 11'sd0) begin
      res.exp = 8'd0;
      res.man = 23'd0;
    end else if (e >= 11'sd255) begin
      res.exp = 8'hFF;
      res.man = 23'd0;
    end
  end

  always_ff @(posedge clk) y <= res;

endmodule
