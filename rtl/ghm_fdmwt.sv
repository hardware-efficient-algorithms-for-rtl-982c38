// ghm_fdmwt: fully parallel GHM forward multiwavelet kernel (basic operation).
//
// Computes the four outputs y = F * x of one GHM forward basic operation from
// eight input samples x0..x7 (x7 has a zero column in F and is not used):
//
//   y0 =  3/(5r2) x0 + 4/5 x1 + 3/(5r2) x2
//   y1 = -1/20 x0 - 3/(10r2) x1 + 9/20 x2 + 1/r2 x3 + 9/20 x4 - 3/(10r2) x5 - 1/20 x6
//   y2 =  same as y1 but with -1/r2 x3
//   y3 =  1/(10r2) x0 + 3/10 x1 - 9/(10r2) x2 + 9/(10r2) x4 - 3/10 x5 - 1/(10r2) x6
//   (r2 = sqrt(2))
//
// Instead of 23 multiplications and 19 additions it uses the factorisation
// y = W4x6 * D6 * W6x9 * D9 * W9x8 * x:
//   W9x8 (7 adders):  a = {x0+x2, x1, x0+x6, x0-x6, x2+x4, x2-x4, x3, x1+x5, x1-x5}
//   D9  (6 mult.):    m = a .* {3/(5r2), 4/5, 1, 1, 9, 9, 1, 3/10, 3/10}
//   W6x9 (5 adders):  b = {m0+m1, m4-m2, m3-m5, m6-m7, m6+m7, m8}
//   D6  (4 mult.):    n = b .* {1, 1/20, 1/(10r2), 1/r2, 1/r2, 1}
//   W4x6 (3 adders):  y = {n0, n1+n3, n1-n4, n2+n5}
// i.e. 8 fractional-constant multipliers, 2 multipliers by 9 and 15 adders.
// The diagonal factors, the operation counts and the overall structure follow
// the GHM algorithm this design implements; the exact signs in the three
// adder matrices were fixed here so that the product equals F exactly.
//
// Number format (this design's choice): x are DATA_W-bit two's complement
// integers. Inside, values carry GUARD extra fraction bits; every fractional
// multiplier rounds back to that grid; the outputs are rounded half up to
// integers and are DATA_W+2 bits wide (largest row gain of F is 2.13).
//
// Timing (this design's choice): three register stages (after D9, after D6,
// at the output). One vector per clock is accepted whenever in_valid is high;
// out_valid/y follow exactly KERNEL_LATENCY = 3 cycles later. There is no
// back-pressure. rst_n (asynchronous, active low) clears only the valid
// pipeline.
module ghm_fdmwt
  import ghm_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned GUARD  = 4,
  localparam int unsigned OUT_W = DATA_W + 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x [8],
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y [4]
);

  // Internal width: input, guard fraction bits and 6 bits of growth
  // (x9 and the adders around it).
  localparam int unsigned IW = DATA_W + GUARD + 6;

  typedef logic signed [IW-1:0] word_t;

  // ---------------- stage A: W9x8 and D9 ----------------
  word_t xs [8];
  word_t a  [9];
  word_t mc [9];
  word_t m_q [9];

  always_comb begin
    for (int i = 0; i < 8; i++) xs[i] = word_t'(x[i]) <<< GUARD;
    a[0] = xs[0] + xs[2];
    a[1] = xs[1];
    a[2] = xs[0] + xs[6];
    a[3] = xs[0] - xs[6];
    a[4] = xs[2] + xs[4];
    a[5] = xs[2] - xs[4];
    a[6] = xs[3];
    a[7] = xs[1] + xs[5];
    a[8] = xs[1] - xs[5];
    mc[2] = a[2];
    mc[3] = a[3];
    mc[6] = a[6];
  end

  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_3_5R2)) u_d9_0 (.x(a[0]), .y(mc[0]));
  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_4_5))   u_d9_1 (.x(a[1]), .y(mc[1]));
  ghm_mul9      #(.IN_W(IW), .OUT_W(IW))                 u_d9_4 (.x(a[4]), .y(mc[4]));
  ghm_mul9      #(.IN_W(IW), .OUT_W(IW))                 u_d9_5 (.x(a[5]), .y(mc[5]));
  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_3_10))  u_d9_7 (.x(a[7]), .y(mc[7]));
  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_3_10))  u_d9_8 (.x(a[8]), .y(mc[8]));

  always_ff @(posedge clk) m_q <= mc;

  // ---------------- stage B: W6x9 and D6 ----------------
  word_t b  [6];
  word_t nc [6];
  word_t n_q [6];

  always_comb begin
    b[0] = m_q[0] + m_q[1];
    b[1] = m_q[4] - m_q[2];
    b[2] = m_q[3] - m_q[5];
    b[3] = m_q[6] - m_q[7];
    b[4] = m_q[6] + m_q[7];
    b[5] = m_q[8];
    nc[0] = b[0];
    nc[5] = b[5];
  end

  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_1_20))   u_d6_1 (.x(b[1]), .y(nc[1]));
  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_1_10R2)) u_d6_2 (.x(b[2]), .y(nc[2]));
  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_1_R2))   u_d6_3 (.x(b[3]), .y(nc[3]));
  ghm_cmul_frac #(.IN_W(IW), .OUT_W(IW), .COEF(C_1_R2))   u_d6_4 (.x(b[4]), .y(nc[4]));

  always_ff @(posedge clk) n_q <= nc;

  // ---------------- stage C: W4x6 and output rounding ----------------
  word_t yc [4];
  word_t yr [4];

  always_comb begin
    yc[0] = n_q[0];
    yc[1] = n_q[1] + n_q[3];
    yc[2] = n_q[1] - n_q[4];
    yc[3] = n_q[2] + n_q[5];
    for (int i = 0; i < 4; i++)
      yr[i] = (yc[i] + (word_t'(1) <<< (GUARD - 1))) >>> GUARD;
  end

  always_ff @(posedge clk)
    for (int i = 0; i < 4; i++) y[i] <= OUT_W'(yr[i]);

  // ---------------- valid pipeline ----------------
  logic [KERNEL_LATENCY-1:0] vld_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[KERNEL_LATENCY-2:0], in_valid};

  assign out_valid = vld_q[KERNEL_LATENCY-1];

endmodule
