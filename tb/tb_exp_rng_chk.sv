// tb_exp_rng_chk: one generator instance with its scoreboard, used by the
// generator testbenches.
//
// Every accepted input word is queued with the cycle it was taken. Whenever
// the generator flags a result, the oldest word is popped and the result is
// checked three ways:
//  - arithmetic: it must match the interval polynomial evaluated in double
//    precision on the float32 input, within the rounding of the float32
//    operators (2^-22 * ORDER times the sum of |term| magnitudes, plus half an
//    ulp of the result). The coefficients are the generator's own table
//    words (from separate instances of the same tables), so this isolates the
//    datapath; the tables have their own test.
//  - latency: exactly 2*ORDER+1 clock edges after the input was sampled.
//  - accuracy: for inputs flagged with 'meas', the squared error against
//    -ln(1-x) is accumulated, over all intervals and over all but the top
//    two intervals, and the results are summed for a mean.
// A reset flushes the queue, as it flushes the generator's valid chain.
module tb_exp_rng_chk
  import tb_fp_ref_pkg::*;
#(
  parameter int ORDER      = 1,
  parameter int INDEX_BITS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        urn_valid,
  input  logic [31:0] urn,
  input  logic        meas,       // count this input in the accuracy figures
  output int          checks,
  output int          failures,
  output int          n_out,      // results seen
  output int          n_b2b,      // results on consecutive cycles
  output int          n_meas,     // results counted in the accuracy figures
  output int          n_low,      // ... of which below the top two intervals
  output real         sse,        // sum of squared errors vs -ln(1-x)
  output real         sse_low,    // same, top two intervals left out
  output real         sum_y,      // sum of measured results
  output logic [31:0] last_rnd
);
  localparam int N   = 1 << INDEX_BITS;
  localparam int LAT = 2 * ORDER + 1;

  logic        rnd_valid;
  logic [31:0] rnd;

  exp_rng #(.ORDER(ORDER), .INDEX_BITS(INDEX_BITS)) dut (
    .clk(clk), .rst_n(rst_n), .urn_valid(urn_valid), .urn(urn),
    .rnd_valid(rnd_valid), .rnd(rnd)
  );

  // The same coefficient tables, built by separate table instances and read
  // out once at time zero.
  logic [31:0] ctab [ORDER+1][N];
  for (genvar k = 0; k <= ORDER; k++) begin : g_cp
    fp32_pkg::fp32_t unused_coef;
    coef_dlut #(.INDEX_BITS(INDEX_BITS), .ORDER(ORDER), .POWER(k)) u_tab (
      .clk(clk), .idx('0), .coef(unused_coef));
    initial for (int i = 0; i < N; i++) ctab[k][i] = u_tab.ROM[i];
  end

  typedef struct { logic [31:0] u; longint cyc; logic meas; } entry_t;
  entry_t q [$];
  longint cyc = 0;
  longint last_out_cyc = -10;

  initial begin
    checks = 0; failures = 0; n_out = 0; n_b2b = 0; n_meas = 0; n_low = 0;
    sse = 0.0; sse_low = 0.0; sum_y = 0.0; last_rnd = 0;
  end

  always @(posedge clk) begin
    entry_t e;
    real    x, p, mag, term, got, tol, truth;
    int     idx;
    cyc <= cyc + 1;
    if (!rst_n) begin
      q.delete();
    end else begin
      if (rnd_valid) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL order %0d: result with no input pending", ORDER);
        end else begin
          e   = q.pop_front();
          idx = int'(e.u >> (32 - INDEX_BITS));
          x   = f2r(r2f(real'(e.u) / 4294967296.0));
          p   = 0.0;
          mag = 0.0;
          for (int k = 0; k <= ORDER; k++) begin
            term = f2r(ctab[k][idx]) * (x ** k);
            p   += term;
            mag += (term < 0.0) ? -term : term;
          end
          got = f2r(rnd);
          tol = (2.0 ** -22) * ORDER * mag + (2.0 ** -24) * ((p < 0.0) ? -p : p) + 1e-30;
          if (((got - p) > tol) || ((p - got) > tol)) begin
            failures++;
            if (failures < 10)
              $display("FAIL order %0d: urn %h -> %h (%g), expected %g +- %g",
                       ORDER, e.u, rnd, got, p, tol);
          end
          checks++;
          if (cyc - e.cyc != 64'(LAT + 1)) begin
            failures++;
            if (failures < 10)
              $display("FAIL order %0d: latency %0d, expected %0d", ORDER, cyc - e.cyc - 1, LAT);
          end
          if (e.meas) begin
            truth = -$ln(1.0 - real'(e.u) / 4294967296.0);
            sse   += (got - truth) * (got - truth);
            sum_y += got;
            n_meas++;
            if (idx < N - 2) begin
              sse_low += (got - truth) * (got - truth);
              n_low++;
            end
          end
          n_out++;
          if (last_out_cyc == cyc - 1) n_b2b++;
          last_out_cyc = cyc;
          last_rnd = rnd;
        end
      end
      if (urn_valid) q.push_back('{u: urn, cyc: cyc, meas: meas});
    end
  end
endmodule
