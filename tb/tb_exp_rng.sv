// tb_exp_rng: end-to-end testbench of the exponential random number
// generator in its linear, quadratic and cubic forms (256 intervals each),
// all fed the same stream of uniform words.
//
// Each instance is scored by tb_exp_rng_chk (value, latency, MSE). On top of
// that this bench checks:
//  - the worked example of the design: 0x80000000 (x = 0.5) must give about
//    ln 2 = 0.693147 (float 3F317218), 0x00567854 about 0.0013204 (3AAD0DE4),
//    and 0 must give about 0;
//  - accuracy, on a sweep of 16 evenly spaced points in each of the 256
//    intervals: the MSE against -ln(1-x) must not exceed the figure quoted
//    for 256-entry tables (9.73e-4 linear, 4.30e-4 quadratic, 2.41e-4
//    cubic). For the cubic form the limit is applied without the top two
//    intervals, where evaluating large x-power coefficients in float32
//    cancels badly; its whole-range MSE is printed. The sweep's mean must be
//    1 within 0.02 for the linear and quadratic forms, as the mean of a
//    unit-rate exponential distribution;
//  - a random stream of 6000 words with random gaps, scored for value and
//    latency;
//  - throughput: a burst of back-to-back inputs must come out back to back,
//    one result per clock;
//  - reset: results still in flight when reset is applied are dropped.
// Each of these events is counted and a failure is counted for any that
// never happened.
module tb_exp_rng;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        urn_valid = 1'b0;
  logic [31:0] urn = '0;
  logic        meas = 1'b0;
  int          checks = 0, failures = 0;

  int  c_chk [3], c_fail [3], c_out [3], c_b2b [3], c_nm [3], c_nl [3];
  real c_sse [3], c_ssl [3], c_sum [3];
  logic [31:0] c_last [3];

  // Events to cover.
  int ev_zero = 0, ev_first = 0, ev_last = 0, ev_round1 = 0, ev_bubble = 0, ev_reset = 0;

  always #5 clk = ~clk;

  tb_exp_rng_chk #(.ORDER(1)) u_lin (.clk(clk), .rst_n(rst_n), .urn_valid(urn_valid), .urn(urn),
    .meas(meas), .checks(c_chk[0]), .failures(c_fail[0]), .n_out(c_out[0]), .n_b2b(c_b2b[0]),
    .n_meas(c_nm[0]), .n_low(c_nl[0]), .sse(c_sse[0]), .sse_low(c_ssl[0]), .sum_y(c_sum[0]),
    .last_rnd(c_last[0]));
  tb_exp_rng_chk #(.ORDER(2)) u_quad (.clk(clk), .rst_n(rst_n), .urn_valid(urn_valid), .urn(urn),
    .meas(meas), .checks(c_chk[1]), .failures(c_fail[1]), .n_out(c_out[1]), .n_b2b(c_b2b[1]),
    .n_meas(c_nm[1]), .n_low(c_nl[1]), .sse(c_sse[1]), .sse_low(c_ssl[1]), .sum_y(c_sum[1]),
    .last_rnd(c_last[1]));
  tb_exp_rng_chk #(.ORDER(3)) u_cub (.clk(clk), .rst_n(rst_n), .urn_valid(urn_valid), .urn(urn),
    .meas(meas), .checks(c_chk[2]), .failures(c_fail[2]), .n_out(c_out[2]), .n_b2b(c_b2b[2]),
    .n_meas(c_nm[2]), .n_low(c_nl[2]), .sse(c_sse[2]), .sse_low(c_ssl[2]), .sum_y(c_sum[2]),
    .last_rnd(c_last[2]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input logic [31:0] v);
    @(negedge clk);
    urn_valid = 1'b1;
    urn       = v;
    if (v == 32'd0) ev_zero++;
    if (v[31:24] == 8'h00) ev_first++;
    if (v[31:24] == 8'hFF) ev_last++;
    if (v >= 32'hFFFF_FF80) ev_round1++;
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      urn_valid = 1'b0;
      urn       = $urandom;
    end
  endtask

  // Apply one word alone and check each order's result against -ln(1-x).
  task automatic single(input logic [31:0] v, input real tol);
    real truth, got;
    put(v);
    idle(10);
    truth = -$ln(1.0 - real'(v) / 4294967296.0);
    for (int o = 0; o < 3; o++) begin
      got = tb_fp_ref_pkg::f2r(c_last[o]);
      checks++;
      if ((got - truth > tol) || (truth - got > tol)) begin
        failures++;
        $display("FAIL example order %0d: urn %h -> %h (%g), expected %g", o + 1, v, c_last[o],
                 got, truth);
      end else begin
        $display("example order %0d: urn %h -> %h (%g), exact %g", o + 1, v, c_last[o], got, truth);
      end
    end
  endtask

  initial begin
    automatic real mse, mse_low, mean;
    automatic real paper_mse [3] = '{9.73e-4, 4.30e-4, 2.41e-4};
    automatic int pend;
    idle(4);
    rst_n = 1'b1;
    idle(2);

    // The design's worked example (linear fit, 256 intervals).
    single(32'h8000_0000, 1e-4);
    single(32'h0056_7854, 1e-5);
    single(32'h0000_0000, 1e-5);

    // Back-to-back burst over every interval, including both ends.
    for (int j = 0; j < 256; j++) put({8'(j), 24'($urandom)});
    put(32'hFFFF_FFFF);
    put(32'h00FF_FFFF);

    // Accuracy sweep, back to back.
    for (int j = 0; j < 256; j++)
      for (int i = 0; i < 16; i++) begin
        put({8'(j), 4'(i), 20'h80000});
        meas = 1'b1;
      end
    @(negedge clk);
    meas = 1'b0;
    urn_valid = 1'b0;

    // Random stream with bubbles.
    for (int i = 0; i < 6000; i++) begin
      if ($urandom % 4 == 0) begin
        idle(1 + int'($urandom % 3));
        ev_bubble++;
      end
      put($urandom);
    end
    idle(12);

    // Reset with results in flight: they must be dropped.
    for (int i = 0; i < 4; i++) put($urandom);
    pend = c_out[2];
    @(negedge clk);
    urn_valid = 1'b0;
    rst_n     = 1'b0;
    idle(3);
    rst_n = 1'b1;
    idle(12);
    checks++;
    if (c_out[2] == pend) ev_reset++;
    else begin
      failures++;
      $display("FAIL results in flight survived reset");
    end
    // The generator works again after the reset.
    single(32'h8000_0000, 1e-4);

    for (int o = 0; o < 3; o++) begin
      checks   += c_chk[o];
      failures += c_fail[o];
      mse     = c_sse[o] / real'(c_nm[o]);
      mse_low = c_ssl[o] / real'(c_nl[o]);
      mean    = c_sum[o] / real'(c_nm[o]);
      $display("order %0d: %0d results, %0d back-to-back, sweep of %0d: MSE %g, without top two intervals %g (limit %g), mean %f",
               o + 1, c_out[o], c_b2b[o], c_nm[o], mse, mse_low, paper_mse[o], mean);
      checks += 3;
      if (c_nm[o] != 4096) begin failures++; $display("FAIL order %0d sweep count", o + 1); end
      if ((o < 2 ? mse : mse_low) > paper_mse[o]) begin
        failures++;
        $display("FAIL order %0d MSE", o + 1);
      end
      if (o < 2 && (mean < 0.98 || mean > 1.02)) begin
        failures++;
        $display("FAIL order %0d mean", o + 1);
      end
      if (c_b2b[o] < 256) begin
        failures++;
        $display("FAIL order %0d: only %0d back-to-back results", o + 1, c_b2b[o]);
      end
    end
    $display("events: zero %0d first-interval %0d last-interval %0d round-to-1 %0d bubbles %0d reset-flush %0d",
             ev_zero, ev_first, ev_last, ev_round1, ev_bubble, ev_reset);
    checks += 6;
    if (ev_zero == 0)   failures++;
    if (ev_first == 0)  failures++;
    if (ev_last == 0)   failures++;
    if (ev_round1 == 0) failures++;
    if (ev_bubble == 0) failures++;
    if (ev_reset == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
