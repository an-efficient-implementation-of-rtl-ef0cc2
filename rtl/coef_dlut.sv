// coef_dlut: data look-up table (DLUT) for one polynomial coefficient.
//
// The inverse CDF on [0,1) is cut into 2^INDEX_BITS equal intervals, one per
// value of the top INDEX_BITS bits of the uniform input. This ROM holds, for
// every interval, the float32 coefficient of x^POWER in that interval's
// least-squares polynomial of order ORDER (see fp32_pkg::fit_interval). A
// generator of order N uses N+1 of these tables, one per coefficient, exactly
// as the table-per-coefficient organisation of the design. Storing the words
// already in float32 form means no conversion is needed at run time.
//
// The contents are computed by a constant function while the design is
// elaborated, so the table follows the parameters and needs no file.
//
// Interface and timing: synchronous read, like a block RAM. 'idx' sampled on
// a rising edge of clk appears on 'coef' one cycle later. No reset (ROM).
module coef_dlut
  import fp32_pkg::*;
#(
  parameter int unsigned INDEX_BITS = 8,  // 2^8 = 256 entries
  parameter int unsigned ORDER      = 1,  // polynomial order of the fit
  parameter int unsigned POWER      = 0   // which coefficient: the one of x^POWER
) (
  input  logic                  clk,
  input  logic [INDEX_BITS-1:0] idx,
  output fp32_t                 coef
);

  localparam int unsigned DEPTH = 1 << INDEX_BITS;

  typedef logic [31:0] rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t r;
    for (int j = 0; j < int'(DEPTH); j++)
      r[j] = real_to_fp32(fit_interval(j, int'(DEPTH), int'(ORDER), int'(POWER)));
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk) coef <= ROM[idx];

  initial begin
    assert (ORDER >= 1 && ORDER <= MAX_ORDER)
      else $error("coef_dlut: ORDER must be 1..%0d", MAX_ORDER);
    assert (POWER <= ORDER) else $error("coef_dlut: POWER must not exceed ORDER");
  end

endmodule
