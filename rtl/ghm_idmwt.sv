// ghm_idmwt: fully parallel GHM inverse multiwavelet kernel (basic operation).
//
// Computes the eight outputs x = F^T * y of one GHM inverse basic operation
// from four coefficients y0..y3, where F is the 4x8 forward matrix (see
// ghm_fdmwt). x7 is identically zero (F has a zero column there) and is
// driven as 0. The direct product needs 23 multiplications and 16 additions;
// this block uses the factorisation x = W8x9 * D9 * W9x6 * D6 * W6x4 * y with
// the same two diagonal factors as the forward kernel:
//   W6x4 (1 adder):   n = {y0, y1+y2, y3, y1, -y2, y3}
//   D6  (4 mult.):    p = n .* {1, 1/20, 1/(10r2), 1/r2, 1/r2, 1}
//   W9x6 (4 adders):  u = p1+p2, v = p1-p2,
//                     q = {p0, p0, -v, -u, u, v, p3+p4, p4-p3, p5}
//   D9  (6 mult.):    r = q .* {3/(5r2), 4/5, 1, 1, 9, 9, 1, 3/10, 3/10}
//   W8x9 (5 adders):  x = {r0+r2, r1+r7+r8, r0+r5, r6, r4, r7-r8, r3, 0}
// i.e. 8 fractional-constant multipliers, 2 multipliers by 9 and 10 adders
// (r2 = sqrt(2); sign changes are free). Taking the sum and difference
// of the two D6 outputs p1, p2 before the two x9 multipliers (rather than
// the plain transpose of the forward graph, which needs 12 adders) is what
// brings the count to 10.
//
// Number format (this design's choice): y are DATA_W-bit two's complement
// integers, internal values carry GUARD extra fraction bits, outputs are
// rounded half up to integers, DATA_W+1 bits wide (largest row gain of F^T
// is 1.96). GUARD must be at least 1.
//
// Timing (this design's choice): three register stages (after D6, after D9,
// at the output); one vector per clock when in_valid is high; out_valid/x
// follow exactly KERNEL_LATENCY = 3 cycles later; no back-pressure. rst_n
// (asynchronous, active low) clears only the valid pipeline.
module ghm_idmwt
  import ghm_pkg::*;
#(
  parameter int unsigned DATA_W = 18,
  parameter int unsigned GUARD  = 4,
  localparam int unsigned OUT_W = DATA_W + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] y [4],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  x [8]
);

  localparam int unsigned IW = DATA_W + GUARD + 6;

  typedef logic signed [IW-1:0] word_t;

  // ---------------- stage A: W6x4 and D6 ----------------
  word_t ys [4];
  word_t n  [6];
  word_t pc [6];
  word_t p_q [6];

  always_comb begin
    for (int i = 0; i < 4; i++) ys[i] = word_t'(y[i]) <<< GUARD;
    n[0] = ys[0];
    n[1] = ys[1] + ys[2];
    n[2] = ys[3];
    n[3] = ys[1];
    n[4] = -ys[2];
    n[5] = ys[3];
    pc[0] = n[0];
    pc[5] = n[5];
  end

  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_1_20))   u_d6_1 (.x(n[1]), .y(pc[1]));
  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_1_10R2)) u_d6_2 (.x(n[2]), .y(pc[2]));
  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_1_R2))   u_d6_3 (.x(n[3]), .y(pc[3]));
  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_1_R2))   u_d6_4 (.x(n[4]), .y(pc[4]));

  always_ff @(posedge clk) p_q <= pc;

  // ---------------- stage B: W9x6 and D9 ----------------
  word_t u, v;
  word_t q  [9];
  word_t rc [9];
  word_t r_q [9];

  always_comb begin
    u    = p_q[1] + p_q[2];
    v    = p_q[1] - p_q[2];
    q[0] = p_q[0];
    q[1] = p_q[0];
    q[2] = -v;
    q[3] = -u;
    q[4] = u;
    q[5] = v;
    q[6] = p_q[3] + p_q[4];
    q[7] = p_q[4] - p_q[3];
    q[8] = p_q[5];
    rc[2] = q[2];
    rc[3] = q[3];
    rc[6] = q[6];
  end

  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_3_5R2)) u_d9_0 (.x(q[0]), .y(rc[0]));
  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_4_5))   u_d9_1 (.x(q[1]), .y(rc[1]));
  ghm_mul9      #(.IN_W(IW), .OUT_W(IW))                 u_d9_4 (.x(q[4]), .y(rc[4]));
  ghm_mul9      #(.IN_W(IW), .OUT_W(IW))                 u_d9_5 (.x(q[5]), .y(rc[5]));
  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_3_10))  u_d9_7 (.x(q[7]), .y(rc[7]));
  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_3_10))  u_d9_8 (.x(q[8]), .y(rc[8]));

  always_ff @(posedge clk) r_q <= rc;

  // ---------------- stage C: W8x9 and output rounding ----------------
  word_t xc [8];
  word_t xr [8];

  always_comb begin
    xc[0] = r_q[0] + r_q[2];
    xc[1] = r_q[1] + r_q[7] + r_q[8];
    xc[2] = r_q[0] + r_q[5];
    xc[3] = r_q[6];
    xc[4] = r_q[4];
    xc[5] = r_q[7] - r_q[8];
    xc[6] = r_q[3];
    xc[7] = '0;
    for (int i = 0; i < 8; i++)
      xr[i] = (xc[i] + (word_t'(1) <<< (GUARD - 1))) >>> GUARD;
  end

  always_ff @(posedge clk)
    for (int i = 0; i < 8; i++) x[i] <= OUT_W'(xr[i]);

  // ---------------- valid pipeline ----------------
  logic [KERNEL_LATENCY-1:0] vld_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[KERNEL_LATENCY-2:0], in_valid};

  assign out_valid = vld_q[KERNEL_LATENCY-1];

endmodule
