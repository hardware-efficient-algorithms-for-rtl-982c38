// ghm_pkg: shared constants of the GHM multiwavelet kernels.
//
// The kernels multiply by six distinct non-trivial fractional constants
// (3/(5*sqrt2), 4/5, 3/10, 1/20, 1/(10*sqrt2), 1/sqrt2) and by the integer 9.
// Each fractional constant is held as an 18-bit signed integer
// C = round(c * 2**F), where the shift F is chosen per constant so that
// 2**16 <= C < 2**17, i.e. every constant uses the full precision of an
// 18x18 embedded multiplier. The constant values come from the GHM filter
// matrices; the 18-bit width and the per-constant scaling are this design's
// choices.
package ghm_pkg;

  localparam int unsigned COEF_W = 18;

  // A fractional constant: value = mant / 2**shift.
  typedef struct packed {
    logic signed [COEF_W-1:0] mant;
    logic [7:0]               shift;
  } coef_t;

  // round(3/(5*sqrt(2)) * 2**18) = 111218
  localparam coef_t C_3_5R2  = '{mant: 18'sd111218, shift: 8'd18};
  // round(4/5 * 2**17) = 104858
  localparam coef_t C_4_5    = '{mant: 18'sd104858, shift: 8'd17};
  // round(3/10 * 2**18) = 78643
  localparam coef_t C_3_10   = '{mant: 18'sd78643,  shift: 8'd18};
  // round(1/20 * 2**21) = 104858
  localparam coef_t C_1_20   = '{mant: 18'sd104858, shift: 8'd21};
  // round(1/(10*sqrt(2)) * 2**20) = 74146
  localparam coef_t C_1_10R2 = '{mant: 18'sd74146,  shift: 8'd20};
  // round(1/sqrt(2) * 2**17) = 92682
  localparam coef_t C_1_R2   = '{mant: 18'sd92682,  shift: 8'd17};

  // Pipeline depth of both kernels: input-to-output latency in clock cycles.
  localparam int unsigned KERNEL_LATENCY = 3;

endpackage
