// tb_fp_ref_pkg: reference arithmetic for the testbenches, written apart from
// the design's own code.
//
// Float32 words are turned into reals by their defining formula, and reals
// into float32 words by scaling into [2^23, 2^24) and rounding to nearest,
// ties to even, with $floor. The least-squares reference fit uses modified
// Gram-Schmidt on the sample points instead of normal equations, so that the
// coefficient tables are checked against a different computation.
package tb_fp_ref_pkg;

  // Value of a float32 word; zero exponent reads as zero (no denormals).
  function automatic real f2r(input logic [31:0] w);
    real m;
    int  e;
    if (w[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(w[22:0]) / 8388608.0;
    e = int'(w[30:23]) - 127;
    m = m * (2.0 ** e);
    return w[31] ? -m : m;
  endfunction

  // Nearest float32 (ties to even) of a real. Flushes below 2^-126 to zero
  // and saturates at or above 2^128 to infinity.
  function automatic logic [31:0] r2f(input real r);
    logic s;
    real  a, sc, fl, fr;
    int   e;
    s = (r < 0.0);
    a = s ? -r : r;
    if (a == 0.0) return {s, 31'd0};
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    sc = a * 8388608.0;               // in [2^23, 2^24), exact
    fl = $floor(sc);
    fr = sc - fl;
    if (fr > 0.5 || (fr == 0.5 && ($rtoi(fl) % 2 == 1))) fl = fl + 1.0;
    if (fl >= 16777216.0) begin fl = fl / 2.0; e++; end
    if (e < -126) return {s, 31'd0};
    if (e > 127)  return {s, 8'hFF, 23'd0};
    return {s, 8'(e + 127), 23'($rtoi(fl) - 8388608)};
  endfunction

  // Distance in units of the last place between two finite float32 words of
  // equal sign.
  function automatic int ulp_diff(input logic [31:0] a, input logic [31:0] b);
    int d;
    d = int'(a[30:0]) - int'(b[30:0]);
    return (d < 0) ? -d : d;
  endfunction

  localparam int NS = 64;   // sample points per interval

  // Least-squares fitted values of -ln(1-x) at the NS midpoints of interval j
  // of n_int, polynomial order 'order', by modified Gram-Schmidt.
  typedef real samp_t [NS];
  function automatic samp_t ref_fit_values(input int j, input int n_int, input int order);
    real q [4][NS];
    real y [NS];
    real fitv [NS];
    real t, nrm, dot;
    for (int i = 0; i < NS; i++) begin
      t = (real'(i) + 0.5) / real'(NS);
      y[i] = -$ln(1.0 - (real'(j) + t) / real'(n_int));
      for (int k = 0; k <= order; k++) q[k][i] = t ** k;
      fitv[i] = 0.0;
    end
    for (int k = 0; k <= order; k++) begin
      for (int p = 0; p < k; p++) begin
        dot = 0.0;
        for (int i = 0; i < NS; i++) dot += q[k][i] * q[p][i];
        for (int i = 0; i < NS; i++) q[k][i] -= dot * q[p][i];
      end
      nrm = 0.0;
      for (int i = 0; i < NS; i++) nrm += q[k][i] * q[k][i];
      nrm = $sqrt(nrm);
      for (int i = 0; i < NS; i++) q[k][i] /= nrm;
      dot = 0.0;
      for (int i = 0; i < NS; i++) dot += y[i] * q[k][i];
      for (int i = 0; i < NS; i++) fitv[i] += dot * q[k][i];
    end
    return fitv;
  endfunction

endpackage
