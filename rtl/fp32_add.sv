// fp32_add: single-precision floating-point adder, one result per clock.
//
// How it works: the operand of larger magnitude is found, and the other one's
// significand is shifted right by the exponent difference so both share an
// exponent. Three extra bits below the significand (guard, round and a sticky
// bit that ORs everything shifted further out) keep enough of the shifted-out
// part for exact rounding. The significands are then added, or subtracted
// when the signs differ. A carry out shifts the sum right by one; a
// cancellation is normalised by shifting left by the leading-zero count. The
// result is rounded to nearest, ties to even, and renormalised if the
// rounding carries out.
//
// Special values: zero exponent means zero (denormals flushed), an exact
// cancellation gives +0, a result below the smallest normal flushes to zero,
// overflow gives infinity, a NaN input or infinity minus infinity gives a
// quiet NaN.
//
// Interface and timing: 'a' and 'b' are sampled on a rising edge of clk and
// 'y' = a + b appears one cycle later (latency 1, throughput 1 per clock).
// No reset: the stage holds only data.
module fp32_add
  import fp32_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  fp32_t       op_hi, op_lo, res;
  logic [26:0] mb, ms, ms_sh;
  logic [27:0] sum;
  logic [26:0] n;
  logic [7:0]  d;
  logic [4:0]  lz;
  logic        sticky, eff_sub, lo_zero;
  logic [24:0] rnd;
  logic signed [9:0] e;
  logic        a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    a_inf = (a.exp == 8'hFF) && (a.man == 23'd0);
    b_inf = (b.exp == 8'hFF) && (b.man == 23'd0);
    a_nan = (a.exp == 8'hFF) && (a.man != 23'd0);
    b_nan = (b.exp == 8'hFF) && (b.man != 23'd0);

    // Order the operands by magnitude; a zero-exponent operand counts as 0.
    if ({a.exp, a.man} >= {b.exp, b.man}) begin
      op_hi = a; op_lo = b;
    end else begin
      op_hi = b; op_lo = a;
    end
    if (op_hi.exp == 8'd0) op_hi = FP_ZERO;
    lo_zero = (op_lo.exp == 8'd0);
    eff_sub = op_hi.sign ^ op_lo.sign;
    d       = op_hi.exp - op_lo.exp;

    mb = {1'b1, op_hi.man, 3'b000};
    ms = lo_zero ? 27'd0 : {1'b1, op_lo.man, 3'b000};
    if (d >= 8'd27) begin
      ms_sh  = 27'd0;
      sticky = !lo_zero;
    end else begin
      ms_sh  = ms >> d;
      sticky = |(ms & ~(27'h7FFFFFF << d));
    end
    ms_sh[0] = ms_sh[0] | sticky;

    sum = eff_sub ? ({1'b0, mb} - {1'b0, ms_sh}) : ({1'b0, mb} + {1'b0, ms_sh});
    e   = $signed({2'b00, op_hi.exp});

    // Normalise.
    lz = 5'd0;
    if (sum[27]) begin
      n = {sum[27:2], sum[1] | sum[0]};
      e = e + 10'sd1;
    end else begin
      for (int i = 0; i <= 26; i++)
        if (sum[26-i] == 1'b0 && lz == 5'(i)) lz = 5'(i + 1);
      n = sum[26:0] << lz;
      e = e - $signed({5'd0, lz});
    end

    // Round to nearest even on guard / round+sticky.
    rnd = {1'b0, n[26:3]};
    if (n[2] && (n[1] || n[0] || n[3])) rnd = rnd + 25'd1;
    if (rnd[24]) begin
      rnd = rnd >> 1;
      e   = e + 10'sd1;
    end

    res.sign = op_hi.sign;
    res.exp  = e[7:0];
    res.man  = rnd[22:0];
    if (a_nan || b_nan || (a_inf && b_inf && eff_sub)) begin
      res = FP_QNAN;
    end else if (a_inf || b_inf) begin
      res = a_inf ? a : b;
    end else if (op_hi.exp == 8'd0) begin
      res = FP_ZERO;                    // both operands zero
    end else if (sum == 28'd0) begin
      res = FP_ZERO;                    // exact cancellation
    end else if (e <= 10'sd0) begin
      res.exp = 8'd0;
      res.man = 23'd0;
    end else if (e >= 10'sd255) begin
      res.exp = 8'hFF;
      res.man = 23'd0;
    end
  end

  always_ff @(posedge clk) y <= res;

endmodule
