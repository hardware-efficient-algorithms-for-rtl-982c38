// ghm_dmwt_top: the GHM forward and inverse multiwavelet kernels side by side.
//
// The forward kernel (ghm_fdmwt) maps a window of eight DATA_W-bit samples to
// four DATA_W+2-bit coefficients; the inverse kernel (ghm_idmwt) maps four
// DATA_W+2-bit coefficients back to eight DATA_W+3-bit samples, so the
// forward outputs can be fed straight to the inverse input. The two kernels
// are independent: each has its own valid strobe and a fixed latency of
// ghm_pkg::KERNEL_LATENCY = 3 cycles. Windowing of a sample stream (windows of
// eight samples advancing by four) and overlap-add of the inverse outputs are
// left to the surrounding system. Widths and handshake are this design's
// choices.
module ghm_dmwt_top #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned GUARD  = 4,
  localparam int unsigned COEF_OUT_W = DATA_W + 2,
  localparam int unsigned REC_W      = COEF_OUT_W + 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // forward kernel
  input  logic                          fwd_in_valid,
  input  logic signed [DATA_W-1:0]      fwd_x [8],
  output logic                          fwd_out_valid,
  output logic signed [COEF_OUT_W-1:0]  fwd_y [4],
  // inverse kernel
  input  logic                          inv_in_valid,
  input  logic signed [COEF_OUT_W-1:0]  inv_y [4],
  output logic                          inv_out_valid,
  output logic signed [REC_W-1:0]       inv_x [8]
);

  ghm_fdmwt #(.DATA_W(DATA_W), .GUARD(GUARD)) u_fwd (
    .clk, .rst_n,
    .in_valid (fwd_in_valid),
    .x        (fwd_x),
    .out_valid(fwd_out_valid),
    .y        (fwd_y)
  );

  ghm_idmwt #(.DATA_W(COEF_OUT_W), .GUARD(GUARD)) u_inv (
    .clk, .rst_n,
    .in_valid (inv_in_valid),
    .y        (inv_y),
    .out_valid(inv_out_valid),
    .x        (inv_x)
  );

endmodule
