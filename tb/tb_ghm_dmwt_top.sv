// tb_ghm_dmwt_top: end-to-end testbench of the GHM forward/inverse kernels.
//
// Runs the top level at its default parameters (16-bit samples). Each test
// signal is a periodic block of N samples (the two interleaved components of
// a vector signal). It is cut into N/4 windows of eight samples advancing by
// four (wrapping around at the end), every window goes through the forward
// kernel, and the four coefficients of every window go through the inverse
// kernel; overlap-adding the eight inverse outputs of every window at the
// window's position must give back the original signal, because the GHM
// analysis matrix built from F in this way is orthogonal. While the inverse
// kernel reconstructs signal i, the forward kernel already analyses signal
// i+1, so both kernels run at the same time.
//
// Checks: every forward output against F*x and every inverse output against
// F^T*y in real arithmetic, every reconstructed sample against the input,
// and the 3-cycle latency of both kernels. Counted mechanisms, each of which
// must occur: idle cycles between inputs, back-to-back inputs, and cycles in
// which both kernels accept data.
module tb_ghm_dmwt_top;
  localparam int DATA_W  = 16;
  localparam int COEF_W  = DATA_W + 2;
  localparam int REC_W   = COEF_W + 1;
  localparam int N       = 64;          // samples per test signal
  localparam int K       = N / 4;       // windows per test signal
  localparam int NSIG    = 40;          // test signals
  localparam int LAT     = 3;
  localparam real TOL_F  = 1.0;
  localparam real TOL_I  = 2.0;
  localparam real TOL_R  = 3.0;

  logic clk = 0, rst_n = 0;
  logic fwd_in_valid = 0, fwd_out_valid, inv_in_valid = 0, inv_out_valid;
  logic signed [DATA_W-1:0] fwd_x [8];
  logic signed [COEF_W-1:0] fwd_y [4];
  logic signed [COEF_W-1:0] inv_y [4];
  logic signed [REC_W-1:0]  inv_x [8];

  ghm_dmwt_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_bubble = 0, n_b2b = 0, n_both = 0;
  real max_err_f = 0, max_err_i = 0, max_err_r = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic real fmat(int r, int c);
    real s2 = $sqrt(2.0);
    real m [4][8] = '{
      '{ 3.0/(5*s2),  0.8,          3.0/(5*s2),  0.0,     0.0,         0.0,          0.0,         0.0},
      '{-0.05,       -3.0/(10*s2),  0.45,        1.0/s2,  0.45,       -3.0/(10*s2), -0.05,        0.0},
      '{-0.05,       -3.0/(10*s2),  0.45,       -1.0/s2,  0.45,       -3.0/(10*s2), -0.05,        0.0},
      '{ 1.0/(10*s2), 0.3,         -9.0/(10*s2), 0.0,     9.0/(10*s2),-0.3,         -1.0/(10*s2), 0.0}};
    return m[r][c];
  endfunction

  task automatic check_err(input real got, input real want, input real tol,
                           ref real max_err, input string what);
    real err = got - want;
    if (err < 0) err = -err;
    if (err > max_err) max_err = err;
    checks++;
    if (err > tol) begin
      failures++;
      if (failures < 10) $display("FAIL: %s got %f expected %f", what, got, want);
    end
  endtask

  // Signals (two slots: the one being analysed, the one being reconstructed),
  // their forward coefficients, and the overlap-add accumulators.
  logic signed [DATA_W-1:0] sig [2][N];
  logic signed [COEF_W-1:0] coef [2][K][4];
  real rec [2][N];

  typedef struct { int slot; int k; longint t; } tag_t;
  tag_t fq [$];
  tag_t iq [$];

  // Output monitors.
  always @(posedge clk) if (rst_n) begin
    if (fwd_out_valid) begin
      automatic tag_t tg;
      checks++;
      if (fq.size() == 0) begin
        failures++;
        $display("FAIL: forward output without input");
      end else begin
        tg = fq.pop_front();
        if (cyc - tg.t != longint'(LAT)) begin
          failures++;
          $display("FAIL: forward latency %0d", cyc - tg.t);
        end
        for (int r = 0; r < 4; r++) begin
          automatic real e = 0.0;
          for (int c = 0; c < 8; c++) e += fmat(r, c) * real'(sig[tg.slot][(4 * tg.k + c) % N]);
          check_err(real'(fwd_y[r]), e, TOL_F, max_err_f, "forward");
          coef[tg.slot][tg.k][r] = fwd_y[r];
        end
      end
    end
    if (inv_out_valid) begin
      automatic tag_t tg;
      checks++;
      if (iq.size() == 0) begin
        failures++;
        $display("FAIL: inverse output without input");
      end else begin
        tg = iq.pop_front();
        if (cyc - tg.t != longint'(LAT)) begin
          failures++;
          $display("FAIL: inverse latency %0d", cyc - tg.t);
        end
        for (int c = 0; c < 8; c++) begin
          automatic real e = 0.0;
          for (int r = 0; r < 4; r++) e += fmat(r, c) * real'(coef[tg.slot][tg.k][r]);
          check_err(real'(inv_x[c]), e, TOL_I, max_err_i, "inverse");
          rec[tg.slot][(4 * tg.k + c) % N] += real'(inv_x[c]);
        end
      end
    end
  end

  // Input-side bookkeeping: tags and mechanism counters.
  logic fwd_prev = 0;
  always @(posedge clk) if (rst_n) begin
    if (fwd_in_valid) fq.push_back('{fslot, fk, cyc});
    if (inv_in_valid) iq.push_back('{islot, ik, cyc});
    if (fwd_in_valid && fwd_prev) n_b2b++;
    if (!fwd_in_valid && fwd_prev) n_bubble++;
    if (fwd_in_valid && inv_in_valid) n_both++;
    fwd_prev <= fwd_in_valid;
  end

  int fslot, fk, islot, ik;

  task automatic make_signal(int slot, int i);
    for (int j = 0; j < N; j++) begin
      if (i == 0)      sig[slot][j] = (j % 2 == 0) ? 16'sh7fff : 16'sh8000;
      else if (i == 1) sig[slot][j] = 16'sh8000;
      else if (i == 2) sig[slot][j] = DATA_W'($rtoi(20000.0 * $sin(6.2831853 * j / 16.0)));
      else             sig[slot][j] = DATA_W'($urandom);
      rec[slot][j] = 0.0;
    end
  endtask

  // Feeds the windows of signal 'fs' (slot fsl) to the forward kernel while
  // feeding the coefficients of signal 'is' (slot isl) to the inverse kernel.
  task automatic run_pair(input bit do_f, input int fsl, input bit do_i, input int isl);
    int nf = 0, ni = 0;
    fslot = fsl; islot = isl;
    while ((do_f && nf < K) || (do_i && ni < K)) begin
      @(negedge clk);
      fwd_in_valid = 0;
      inv_in_valid = 0;
      if (do_f && nf < K && $urandom_range(0, 3) != 0) begin
        for (int c = 0; c < 8; c++) fwd_x[c] = sig[fsl][(4 * nf + c) % N];
        fk = nf;
        fwd_in_valid = 1;
        nf++;
      end
      if (do_i && ni < K && $urandom_range(0, 3) != 0) begin
        for (int r = 0; r < 4; r++) inv_y[r] = coef[isl][ni][r];
        ik = ni;
        inv_in_valid = 1;
        ni++;
      end
    end
    @(negedge clk);
    fwd_in_valid = 0;
    inv_in_valid = 0;
    repeat (LAT + 1) @(negedge clk);
  endtask

  task automatic check_rec(int slot);
    for (int j = 0; j < N; j++)
      check_err(rec[slot][j], real'(sig[slot][j]), TOL_R, max_err_r, "reconstruction");
  endtask

  initial begin
    foreach (fwd_x[i]) fwd_x[i] = '0;
    foreach (inv_y[i]) inv_y[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    make_signal(0, 0);
    run_pair(1, 0, 0, 0);
    for (int i = 1; i < NSIG; i++) begin
      make_signal(i % 2, i);
      run_pair(1, i % 2, 1, (i - 1) % 2);
      check_rec((i - 1) % 2);
    end
    run_pair(0, 0, 1, (NSIG - 1) % 2);
    check_rec((NSIG - 1) % 2);

    checks += 3;
    if (n_bubble == 0) begin failures++; $display("FAIL: no idle cycle between inputs"); end
    if (n_b2b == 0)    begin failures++; $display("FAIL: no back-to-back inputs"); end
    if (n_both == 0)   begin failures++; $display("FAIL: kernels never ran together"); end
    checks++;
    if (fq.size() != 0 || iq.size() != 0) begin
      failures++;
      $display("FAIL: results missing");
    end
    $display("idle gaps=%0d back-to-back=%0d both-kernels=%0d", n_bubble, n_b2b, n_both);
    $display("max |error|: forward %f, inverse %f, reconstruction %f LSB",
             max_err_f, max_err_i, max_err_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSIG * K * 4 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
