// tb_coef_dlut: self-checking testbench for the coefficient look-up tables.
//
// For the 256-interval configuration, all tables of a linear, a quadratic and
// a cubic fit are instantiated (2 + 3 + 4 ROMs). Every entry is read through
// the synchronous port, one address per cycle, and each value must appear one
// rising edge after its address. For every interval the polynomial built from
// the table words is evaluated in double precision at the 64 sample points
// and compared with an independent least-squares fit (modified Gram-Schmidt)
// of -ln(1-x) at the same points. The allowed gap is the effect of storing
// each coefficient as float32: 2^-23 times the sum of |c_k x^k|, plus 1e-9.
module tb_coef_dlut;
  import tb_fp_ref_pkg::*;

  localparam int IB = 8;
  localparam int N  = 1 << IB;

  logic          clk = 1'b0;
  logic [IB-1:0] idx;
  logic [31:0]   c1 [2];
  logic [31:0]   c2 [3];
  logic [31:0]   c3 [4];
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar k = 0; k < 2; k++) begin : g_l
    coef_dlut #(.INDEX_BITS(IB), .ORDER(1), .POWER(k)) u (.clk(clk), .idx(idx), .coef(c1[k]));
  end
  for (genvar k = 0; k < 3; k++) begin : g_q
    coef_dlut #(.INDEX_BITS(IB), .ORDER(2), .POWER(k)) u (.clk(clk), .idx(idx), .coef(c2[k]));
  end
  for (genvar k = 0; k < 4; k++) begin : g_c
    coef_dlut #(.INDEX_BITS(IB), .ORDER(3), .POWER(k)) u (.clk(clk), .idx(idx), .coef(c3[k]));
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare one interval's table words with the reference fit.
  task automatic check_interval(input int j, input int order, input real cw [4]);
    samp_t fv;
    real   x, p, mag, term, err, worst;
    fv    = ref_fit_values(j, N, order);
    worst = 0.0;
    checks++;
    for (int i = 0; i < NS; i++) begin
      x   = (real'(j) + (real'(i) + 0.5) / real'(NS)) / real'(N);
      p   = 0.0;
      mag = 0.0;
      for (int k = 0; k <= order; k++) begin
        term = cw[k] * (x ** k);
        p   += term;
        mag += (term < 0.0) ? -term : term;
      end
      err = p - fv[i];
      if (err < 0.0) err = -err;
      if (err > mag * (2.0 ** -23) + 1e-9) begin
        if (err > worst) worst = err;
      end
    end
    if (worst > 0.0) begin
      failures++;
      if (failures < 10) $display("FAIL order %0d interval %0d: gap %g", order, j, worst);
    end
  endtask

  initial begin
    real w1 [4], w2 [4], w3 [4];
    idx = '0;
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      idx = IB'(j);
      @(posedge clk);
      #1;
      w1 = '{0.0, 0.0, 0.0, 0.0};
      w2 = '{0.0, 0.0, 0.0, 0.0};
      w3 = '{0.0, 0.0, 0.0, 0.0};
      for (int k = 0; k < 2; k++) w1[k] = f2r(c1[k]);
      for (int k = 0; k < 3; k++) w2[k] = f2r(c2[k]);
      for (int k = 0; k < 4; k++) w3[k] = f2r(c3[k]);
      check_interval(j, 1, w1);
      check_interval(j, 2, w2);
      check_interval(j, 3, w3);
      if (j == 0 || j == 128 || j == N - 1)
        $display("interval %0d linear A=%h B=%h", j, c1[1], c1[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
