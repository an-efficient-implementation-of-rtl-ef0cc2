// tb_exp_rng_full: the generator at its default configuration (linear fit,
// 256 intervals) through the throughput run of the design: 2^16 uniform
// words applied back to back, one per clock.
//
// Checks:
//  - rate: the 2^16 results come out on 2^16 consecutive cycles, and the
//    whole run from the first input edge to the last result takes
//    2^16 + LATENCY cycles (LATENCY = 3), i.e. one number per clock, which
//    at 100 MHz is 10^8 numbers per second;
//  - value: each result lies within the linear fit's error bound of
//    -ln(1-x), 1/(4 (255-j)^2) + 1e-6 for interval j below 254 (the
//    interpolation error of a straight line over an interval of width 1/256
//    whose curvature is at most 1/(1-x)^2);
//  - accuracy: the inputs are a fixed xorshift32 sequence; the MSE over the run is at most 9.73e-4, the figure quoted
//    for a linear fit with 256 intervals, and the mean is 1 within 0.03;
//  - the worked example 0x80000000 -> about ln 2.
module tb_exp_rng_full;
  import tb_fp_ref_pkg::*;

  localparam int NUM = 1 << 16;
  localparam int LAT = 3;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        urn_valid = 1'b0;
  logic [31:0] urn = '0;
  logic        rnd_valid;
  logic [31:0] rnd;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  exp_rng dut (.clk(clk), .rst_n(rst_n), .urn_valid(urn_valid), .urn(urn),
               .rnd_valid(rnd_valid), .rnd(rnd));

  initial begin
    repeat (NUM + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] inq [$];
  longint      cyc = 0, first_in = -1, last_out = -1, first_out = -1;
  int          n_out = 0, n_b2b = 0;
  real         sse = 0.0, sum = 0.0;

  always @(posedge clk) begin
    real    truth, got, tol;
    logic [31:0] u;
    int     j;
    cyc <= cyc + 1;
    if (rst_n && rnd_valid) begin
      u     = inq.pop_front();
      j     = int'(u[31:24]);
      truth = -$ln(1.0 - real'(u) / 4294967296.0);
      got   = f2r(rnd);
      if (u < 32'hFFFF_FF80) begin
        sse += (got - truth) * (got - truth);
        sum += got;
      end
      if (j < 254) begin
        tol = 1.0 / (4.0 * real'(255 - j) * real'(255 - j)) + 1e-6;
        checks++;
        if ((got - truth > tol) || (truth - got > tol)) begin
          failures++;
          if (failures < 10) $display("FAIL urn %h -> %g, expected %g", u, got, truth);
        end
      end
      if (first_out < 0) first_out = cyc;
      if (last_out == cyc - 1) n_b2b++;
      last_out = cyc;
      n_out++;
    end
    if (rst_n && urn_valid) begin
      inq.push_back(urn);
      if (first_in < 0) first_in = cyc;
    end
  end

  // Fixed xorshift32 sequence, so the run does not depend on the seed.
  logic [31:0] xs = 32'h2545_F491;
  function automatic logic [31:0] next_word(input logic [31:0] v);
    v = v ^ (v << 13);
    v = v ^ (v >> 17);
    v = v ^ (v << 5);
    return v;
  endfunction

  initial begin
    real mse, mean;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Worked example.
    urn_valid = 1'b1;
    urn       = 32'h8000_0000;
    @(negedge clk);
    urn_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (f2r(rnd) - 0.693147 > 1e-4 || 0.693147 - f2r(rnd) > 1e-4) begin
      failures++;
      $display("FAIL example: 0x80000000 -> %h", rnd);
    end
    $display("example: 0x80000000 -> %h (%f)", rnd, f2r(rnd));
    n_out = 0; n_b2b = 0; sse = 0.0; sum = 0.0; first_in = -1; first_out = -1;
    // The throughput run.
    for (int i = 0; i < NUM; i++) begin
      urn_valid = 1'b1;
      xs        = next_word(xs);
      urn       = xs;
      @(negedge clk);
    end
    urn_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    mse  = sse / real'(n_out);
    mean = sum / real'(n_out);
    $display("%0d results, %0d back to back, %0d cycles from first input to last result",
             n_out, n_b2b, last_out - first_in);
    $display("MSE %g (limit 9.73e-4), mean %f", mse, mean);
    checks += 5;
    if (n_out != NUM) failures++;
    if (n_b2b != NUM - 1) failures++;
    if (last_out - first_in != 64'(NUM + LAT)) failures++;
    if (mse > 9.73e-4) failures++;
    if (mean < 0.97 || mean > 1.03) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
