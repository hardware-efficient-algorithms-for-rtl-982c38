// ghm_cmul_frac: multiplier by a fixed fractional constant.
//
// Computes y = round(x * COEF.mant / 2**COEF.shift), rounding half up
// (add 2**(shift-1), then arithmetic shift right). Input and output carry the
// same binary point, so the block is a pure scaling by a constant below one in
// magnitude. It is purely combinational; the kernels register around it.
// These are the "multipliers by fractional numbers" (the circles of the data
// flow graphs); the fixed-point format and the rounding rule are this
// design's choices.
//
// Parameters: IN_W / OUT_W widths of x and y (OUT_W >= IN_W is safe because
// |constant| < 1), COEF the constant (ghm_pkg::coef_t).
module ghm_cmul_frac
  import ghm_pkg::*;
#(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 16,
  parameter coef_t       COEF  = C_1_R2
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);

  localparam int unsigned PW = IN_W + COEF_W;

  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] rounded;

  always_comb begin
    prod    = PW'(x) * PW'($signed(COEF.mant));
    rounded = (prod + (PW'(1) <<< (COEF.shift - 1))) >>> COEF.shift;
    y       = OUT_W'(rounded);
  end

endmodule
