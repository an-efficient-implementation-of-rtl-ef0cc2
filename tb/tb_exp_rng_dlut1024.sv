// tb_exp_rng_dlut1024: the generator with 1024-entry coefficient tables
// (INDEX_BITS = 10), linear fit. This is the table size used when the
// generator was fed from a true random number generator. That source is not
// modelled: a fixed xorshift32 sequence stands in for it, and a stratified
// sweep (8 evenly spaced points in each of the 1024 intervals) measures
// accuracy. Quadratic and cubic at this size are not run here, because
// elaborating their extra tables together takes more memory than a small
// build machine has.
//
// Checks:
//  - latency 3 edges for every result, results in input order;
//  - one result per clock: every back-to-back input gives a back-to-back
//    result;
//  - value (intervals below 1022): each result within 1/(4 (1023-j)^2) + 1e-6
//    of -ln(1-x), the interpolation error bound of a straight line over an
//    interval of width 1/1024 where the curvature is at most 1/(1-x)^2;
//  - MSE of the sweep at most 2.44e-4, the figure quoted for a linear fit
//    with 1024 intervals;
//  - the worked examples 0x80000000 and 0x00567854 within 1e-5 of exact.
module tb_exp_rng_dlut1024;
  import tb_fp_ref_pkg::*;

  localparam int IB    = 10;
  localparam int NINT  = 1 << IB;
  localparam int PTS   = 8;            // sweep points per interval
  localparam int NRAND = 4000;
  localparam int LAT   = 3;

  typedef struct {
    logic [31:0] u;
    logic        m;
    longint      c;
  } ent_t;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        urn_valid = 1'b0;
  logic [31:0] urn = '0;
  logic        meas = 1'b0;           // input belongs to the MSE sweep
  logic        rnd_valid;
  logic [31:0] rnd;
  int          checks = 0, failures = 0;
  longint      cyc = 0, last_cyc = -10;
  int          n_out = 0, n_b2b = 0, n_meas = 0;
  real         sse = 0.0;
  ent_t        q [$];

  always #5 clk = ~clk;

  exp_rng #(.ORDER(1), .INDEX_BITS(IB)) dut (
    .clk(clk), .rst_n(rst_n), .urn_valid(urn_valid), .urn(urn),
    .rnd_valid(rnd_valid), .rnd(rnd));

  initial begin
    repeat (NINT * PTS + NRAND + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    ent_t e;
    real  truth, got, tol;
    int   j;
    cyc <= cyc + 1;
    if (rst_n && rnd_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL result with no input");
      end else begin
        e     = q.pop_front();
        j     = int'(e.u[31 -: IB]);
        truth = -$ln(1.0 - real'(e.u) / 4294967296.0);
        got   = f2r(rnd);
        // The result leaves the DUT LAT edges after its input edge and is
        // sampled here on the edge after that.
        if (cyc - e.c != 64'(LAT + 1)) begin
          failures++;
          $display("FAIL latency %0d", cyc - e.c);
        end
        if (j < NINT - 2) begin
          tol = 1.0 / (4.0 * real'(NINT - 1 - j) * real'(NINT - 1 - j)) + 1e-6;
          checks++;
          if (got - truth > tol || truth - got > tol) begin
            failures++;
            if (failures < 10) $display("FAIL urn %h -> %g, expected %g", e.u, got, truth);
          end
        end
        if (e.m) begin
          sse += (got - truth) * (got - truth);
          n_meas++;
        end
        if (last_cyc == cyc - 1) n_b2b++;
        last_cyc = cyc;
        n_out++;
      end
    end
    if (rst_n && urn_valid) q.push_back('{u: urn, m: meas, c: cyc});
  end

  function automatic logic [31:0] next_word(input logic [31:0] v);
    v = v ^ (v << 13);
    v = v ^ (v >> 17);
    v = v ^ (v << 5);
    return v;
  endfunction

  task automatic example(input logic [31:0] w);
    real expect_y;
    expect_y  = -$ln(1.0 - real'(w) / 4294967296.0);
    urn_valid = 1'b1;
    urn       = w;
    @(negedge clk);
    urn_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (f2r(rnd) - expect_y > 1e-5 || expect_y - f2r(rnd) > 1e-5) begin
      failures++;
      $display("FAIL example %h -> %h", w, rnd);
    end
    $display("example %h -> %h (%g, exact %g)", w, rnd, f2r(rnd), expect_y);
  endtask

  initial begin
    logic [31:0] xs = 32'h1357_9BDF;
    real mse;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    example(32'h8000_0000);
    example(32'h0056_7854);
    n_out = 0; n_b2b = 0;
    // Stratified sweep, back to back.
    for (int j = 0; j < NINT; j++)
      for (int k = 0; k < PTS; k++) begin
        urn_valid = 1'b1;
        meas      = 1'b1;
        urn       = {j[IB-1:0], {(32 - IB){1'b0}}} + 32'((2 * k + 1) << (32 - IB - 4));
        @(negedge clk);
      end
    // Words from the stand-in source, back to back.
    meas = 1'b0;
    for (int i = 0; i < NRAND; i++) begin
      xs  = next_word(xs);
      urn = xs;
      @(negedge clk);
    end
    urn_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    mse = sse / real'(n_meas);
    $display("%0d results, %0d back to back, sweep MSE %g over %0d points (limit 2.44e-4)",
             n_out, n_b2b, mse, n_meas);
    checks += 3;
    if (n_out != NINT * PTS + NRAND) failures++;
    if (n_b2b != NINT * PTS + NRAND - 1) failures++;
    if (mse > 2.44e-4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
