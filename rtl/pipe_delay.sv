// pipe_delay: a chain of DEPTH registers that delays a WIDTH-bit word by DEPTH
// clock cycles (DEPTH = 0 is a plain wire). The generator pipeline uses it to
// keep coefficients and partial products aligned with the multiplier and
// adder stages they meet later. No reset: it carries data only.
module pipe_delay #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
    end
    assign q = stage[DEPTH-1];
  end

endmodule
