// fp32_pkg: types and elaboration-time helpers shared by the exponential
// random number generator.
//
// The datapath works on IEEE-754 single-precision numbers (1 sign bit, 8-bit
// biased exponent, 23-bit fraction with a hidden leading one). Denormals are
// not produced: any result below the smallest normal number is flushed to
// zero, and a zero exponent on an input is read as zero.
//
// The coefficient look-up tables are computed here, at elaboration time, with
// constant functions, so that no table file is needed. For interval j of
// 2^INDEX_BITS equal intervals of [0,1), the inverse CDF y = -ln(1-x) of the
// unit-rate exponential distribution is least-squares fitted by a polynomial
// of order ORDER. The fit samples the interval at FIT_SAMPLES midpoints
// (a close stand-in for a fit over every 32-bit input in the interval), is
// solved in a local variable t = (x-a)/h for good conditioning, and is then
// re-expanded into powers of x, because the hardware evaluates
// sum_k c_k * x^k on the absolute input x. The coefficients are rounded to
// float32 with round-to-nearest-even.
package fp32_pkg;

  // One float32 word, fields in IEEE order.
  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } fp32_t;

  localparam int unsigned FP_BIAS     = 127;
  localparam int unsigned MAX_ORDER   = 3;   // cubic is the highest order built
  localparam int unsigned FIT_SAMPLES = 64;  // sample points per interval for the fit
  localparam int FIT_NC = MAX_ORDER + 2;      // columns of the fit's augmented matrix

  localparam fp32_t FP_ZERO = '{sign: 1'b0, exp: 8'd0,   man: 23'd0};
  localparam fp32_t FP_QNAN = '{sign: 1'b0, exp: 8'd255, man: 23'h400000};

  // Round a real to the nearest float32 (ties to even), via its double bits.
  function automatic fp32_t real_to_fp32(input real r);
    logic [63:0] d;
    logic [52:0] m;       // double significand with hidden one
    logic [24:0] keep;    // hidden one + 23 fraction bits + one guard
    logic        sticky;
    logic [24:0] rounded;
    int          e;
    fp32_t       f;
    d = $realtobits(r);
    f.sign = d[63];
    e = int'(d[62:52]) - 1023 + int'(FP_BIAS);
    if (d[62:52] == 11'd0 || e <= 0) begin
      f.exp = 8'd0; f.man = 23'd0;
      return f;
    end
    m       = {1'b1, d[51:0]};
    keep    = {1'b0, m[52:29]};
    sticky  = |m[27:0];
    rounded = keep;
    if (m[28] && (sticky || m[29])) rounded = keep + 25'd1;
    if (rounded[24]) begin
      rounded = rounded >> 1;
      e = e + 1;
    end
    if (e >= 255) return '{sign: d[63], exp: 8'd255, man: 23'd0};
    f.exp = 8'(e);
    f.man = rounded[22:0];
    return f;
  endfunction

  // Least-squares fit of -ln(1-x) over interval j of n_int, order 'order'.
  // Returns the coefficient of x^power of the fitted polynomial.
  function automatic real fit_interval(input int j, input int n_int, input int order,
                                       input int power);
    real mat [(MAX_ORDER+1)*(MAX_ORDER+2)];  // row-major, NC columns
    real ct [MAX_ORDER+1];
    real tp [2*MAX_ORDER+1];
    real a = 0.0, h = 0.0, t = 0.0, x = 0.0, y = 0.0, f = 0.0, s = 0.0;
    real binom = 0.0, apow = 0.0;
    real cx;
    int n;
    n = order + 1;
    for (int k = 0; k <= MAX_ORDER; k++) ct[k] = 0.0;
    for (int k = 0; k <= 2*MAX_ORDER; k++) tp[k] = 0.0;
    a = real'(j) / real'(n_int);
    h = 1.0 / real'(n_int);
    for (int r = 0; r <= MAX_ORDER; r++)
      for (int c = 0; c <= MAX_ORDER + 1; c++) mat[r * FIT_NC + c] = 0.0;
    // Normal equations in t = (x-a)/h.
    for (int i = 0; i < int'(FIT_SAMPLES); i++) begin
      t = (real'(i) + 0.5) / real'(FIT_SAMPLES);
      x = a + h * t;
      y = -$ln(1.0 - x);
      tp[0] = 1.0;
      for (int k = 1; k <= 2 * MAX_ORDER; k++) tp[k] = tp[k-1] * t;
      for (int r = 0; r < n; r++) begin
        for (int c = 0; c < n; c++) mat[r * FIT_NC + c] = mat[r * FIT_NC + c] + tp[r+c];
        mat[r * FIT_NC + n] = mat[r * FIT_NC + n] + tp[r] * y;
      end
    end
    // Gaussian elimination; the Gram matrix is positive definite.
    for (int p = 0; p < n; p++)
      for (int r = p + 1; r < n; r++) begin
        f = mat[r * FIT_NC + p] / mat[p * FIT_NC + p];
        for (int c = p; c <= n; c++) mat[r * FIT_NC + c] = mat[r * FIT_NC + c] - f * mat[p * FIT_NC + c];
      end
    for (int r = n - 1; r >= 0; r--) begin
      s = mat[r * FIT_NC + n];
      for (int c = r + 1; c < n; c++) s -= mat[r * FIT_NC + c] * ct[c];
      ct[r] = s / mat[r * FIT_NC + r];
    end
    // Re-expand sum_k ct[k] ((x-a)/h)^k in powers of x and keep the x^power
    // term: cx = sum_{k>=power} ct[k] * C(k,power) * (-a)^(k-power) / h^k.
    cx = 0.0;
    for (int k = power; k < n; k++) begin
      binom = 1.0;
      for (int q = 0; q < power; q++) binom = binom * real'(k - q) / real'(q + 1);
      apow = 1.0;
      for (int q = 0; q < k - power; q++) apow = apow * (-a);
      f = 1.0;
      for (int q = 0; q < k; q++) f = f / h;
      cx += ct[k] * binom * apow * f;
    end
    return cx;
  endfunction

endpackage
