// exp_rng: exponentially distributed random number generator by piecewise
// polynomial inverse CDF, one float32 result per clock.
//
// A uniform 32-bit word u is read as the fraction x = u / 2^32 in [0,1). The
// inverse CDF of the unit-rate exponential distribution, y = -ln(1 - x), turns
// it into an exponentially distributed number. Rather than store y for every
// input, [0,1) is split into 2^INDEX_BITS equal intervals selected by the top
// INDEX_BITS bits of u, and inside each interval y is approximated by a
// least-squares polynomial of order ORDER (1 linear, 2 quadratic, 3 cubic)
// whose coefficients sit in ORDER+1 look-up tables (coef_dlut). The
// polynomial is evaluated in single-precision floating point on the full
// 32-bit x, term by term, the way the design lays out its operators:
//
//   linear    : y = A1*x + B1
//   quadratic : y = (A2*x^2 + B2*x) + C2
//   cubic     : y = ((A3*x^3 + B3*x^2) + C3*x) + D3
//
// Powers of x are formed by multipliers (x^2 = x*x, x^3 = x*x^2). Every
// multiplier and adder is one register stage, and coefficients and partial
// products are delayed to meet them (pipe_delay), so a new input is accepted
// every clock cycle. Throughput is one number per clock; LATENCY = 2*ORDER+1
// clock edges from sampling 'urn' to 'rnd' (input register, conversion and table read, then
// two stages per order). Input 0 gives exactly 0 only if the first interval's
// constant term is 0; in general it gives that constant (close to 0).
//
// Following the design: the interval index is the top bits of the uniform
// word, 256 intervals by default, float32 arithmetic and coefficient words,
// one-per-clock pipelining, linear/quadratic/cubic structure. This design's
// own choices: the valid handshake (the original has a free-running datapath
// with no valid), the active-low reset on the valid chain only, the exact
// IEEE round-to-nearest-even arithmetic with denormals flushed, the default
// ORDER of 1, and computing the tables at elaboration time.
//
// Interface: 'urn'/'urn_valid' are sampled on every rising edge of clk; there
// is no back-pressure. 'rnd_valid' marks the cycles where 'rnd' holds the
// result of an accepted input, in input order.
module exp_rng
  import fp32_pkg::*;
#(
  parameter int unsigned ORDER      = 1,  // 1 linear, 2 quadratic, 3 cubic
  parameter int unsigned INDEX_BITS = 8   // 2^INDEX_BITS intervals / table entries
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        urn_valid,
  input  logic [31:0] urn,
  output logic        rnd_valid,
  output fp32_t       rnd
);

  localparam int unsigned LATENCY = 2 * ORDER + 1;

  // Stage 0: input register.
  logic [31:0] u_q;
  always_ff @(posedge clk) u_q <= urn;

  // Valid chain, the only state with a reset. vld[0] travels with u_q, so
  // vld[i] belongs to the word sampled i edges ago.
  logic [LATENCY:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-1:0], urn_valid};
  end
  assign rnd_valid = vld[LATENCY];

  // Stage 1: x = u/2^32 and the interval's coefficients, both one cycle on.
  fp32_t x;
  fp32_t c [ORDER+1];   // c[k] multiplies x^k

  urn_to_fp32 u_conv (.clk(clk), .urn(u_q), .x(x));

  for (genvar k = 0; k <= ORDER; k++) begin : g_dlut
    coef_dlut #(.INDEX_BITS(INDEX_BITS), .ORDER(ORDER), .POWER(k)) u_dlut (
      .clk (clk),
      .idx (u_q[31 -: INDEX_BITS]),
      .coef(c[k])
    );
  end

  // Polynomial evaluation, one operator per stage.
  if (ORDER == 1) begin : g_linear
    fp32_t ax, b_d;
    fp32_mul u_mul_a (.clk(clk), .a(c[1]), .b(x), .y(ax));
    pipe_delay #(.WIDTH(32), .DEPTH(1)) u_dly_b (.clk(clk), .d(c[0]), .q(b_d));
    fp32_add u_add (.clk(clk), .a(ax), .b(b_d), .y(rnd));
  end else if (ORDER == 2) begin : g_quadratic
    fp32_t xsq, bx, a_d, axx, bx_d, c_d, ab;
    fp32_mul u_mul_sq (.clk(clk), .a(x),    .b(x),   .y(xsq));
    fp32_mul u_mul_b  (.clk(clk), .a(c[1]), .b(x),   .y(bx));
    pipe_delay #(.WIDTH(32), .DEPTH(1)) u_dly_a (.clk(clk), .d(c[2]), .q(a_d));
    fp32_mul u_mul_a  (.clk(clk), .a(a_d),  .b(xsq), .y(axx));
    pipe_delay #(.WIDTH(32), .DEPTH(1)) u_dly_bx (.clk(clk), .d(bx), .q(bx_d));
    fp32_add u_add_ab (.clk(clk), .a(axx),  .b(bx_d), .y(ab));
    pipe_delay #(.WIDTH(32), .DEPTH(3)) u_dly_c (.clk(clk), .d(c[0]), .q(c_d));
    fp32_add u_add_c  (.clk(clk), .a(ab),   .b(c_d),  .y(rnd));
  end else begin : g_cubic
    fp32_t xsq, cx, x_d, b_d, a_d2, xcu, bxx, axxx, bxx_d, cx_d, ab, abc, d_d;
    // stage 2
    fp32_mul u_mul_sq (.clk(clk), .a(x),    .b(x),    .y(xsq));
    fp32_mul u_mul_c  (.clk(clk), .a(c[1]), .b(x),    .y(cx));
    pipe_delay #(.WIDTH(32), .DEPTH(1)) u_dly_x (.clk(clk), .d(x),    .q(x_d));
    pipe_delay #(.WIDTH(32), .DEPTH(1)) u_dly_b (.clk(clk), .d(c[2]), .q(b_d));
    pipe_delay #(.WIDTH(32), .DEPTH(2)) u_dly_a (.clk(clk), .d(c[3]), .q(a_d2));
    // stage 3
    fp32_mul u_mul_cu (.clk(clk), .a(x_d),  .b(xsq),  .y(xcu));
    fp32_mul u_mul_b  (.clk(clk), .a(b_d),  .b(xsq),  .y(bxx));
    // stage 4
    fp32_mul u_mul_a  (.clk(clk), .a(a_d2), .b(xcu),  .y(axxx));
    pipe_delay #(.WIDTH(32), .DEPTH(1)) u_dly_bxx (.clk(clk), .d(bxx), .q(bxx_d));
    // stage 5
    fp32_add u_add_ab (.clk(clk), .a(axxx), .b(bxx_d), .y(ab));
    pipe_delay #(.WIDTH(32), .DEPTH(3)) u_dly_cx (.clk(clk), .d(cx), .q(cx_d));
    // stage 6
    fp32_add u_add_c  (.clk(clk), .a(ab),   .b(cx_d),  .y(abc));
    pipe_delay #(.WIDTH(32), .DEPTH(5)) u_dly_d (.clk(clk), .d(c[0]), .q(d_d));
    // stage 7
    fp32_add u_add_d  (.clk(clk), .a(abc),  .b(d_d),   .y(rnd));
  end

  initial assert (ORDER >= 1 && ORDER <= MAX_ORDER && INDEX_BITS >= 1 && INDEX_BITS <= 16)
    else $error("exp_rng: ORDER must be 1..3 and INDEX_BITS 1..16");

endmodule
