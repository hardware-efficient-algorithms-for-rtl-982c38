// tb_ghm_fdmwt: self-checking testbench of the forward GHM kernel.
//
// Drives random and worst-case input windows, with random idle cycles in
// between, and compares every output vector with y = F*x evaluated in real
// arithmetic straight from the 4x8 GHM matrix (not from the factorised
// algorithm). An output passes when it is within TOL of the exact value. It
// also checks that each result appears exactly 3 cycles after its input.
module tb_ghm_fdmwt;
  localparam int DATA_W = 16;
  localparam int OUT_W  = DATA_W + 2;
  localparam int NVEC   = 4000;
  localparam int LAT    = 3;
  localparam real TOL   = 1.0;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [DATA_W-1:0] x [8];
  logic signed [OUT_W-1:0]  y [4];
  int checks = 0, failures = 0;
  real max_err = 0.0;

  ghm_fdmwt #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  // The forward GHM matrix F (rows y0..y3, columns x0..x7).
  function automatic real fmat(int r, int c);
    real s2 = $sqrt(2.0);
    real m [4][8] = '{
      '{ 3.0/(5*s2),  0.8,          3.0/(5*s2),  0.0,     0.0,         0.0,          0.0,         0.0},
      '{-0.05,       -3.0/(10*s2),  0.45,        1.0/s2,  0.45,       -3.0/(10*s2), -0.05,        0.0},
      '{-0.05,       -3.0/(10*s2),  0.45,       -1.0/s2,  0.45,       -3.0/(10*s2), -0.05,        0.0},
      '{ 1.0/(10*s2), 0.3,         -9.0/(10*s2), 0.0,     9.0/(10*s2),-0.3,         -1.0/(10*s2), 0.0}};
    return m[r][c];
  endfunction

  typedef struct { real v [4]; longint t; } exp_t;
  exp_t q [$];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Scoreboard: push on accepted input, pop and compare on out_valid.
  always @(posedge clk) if (rst_n) begin
    if (in_valid) begin
      automatic exp_t e;
      for (int r = 0; r < 4; r++) begin
        e.v[r] = 0.0;
        for (int c = 0; c < 8; c++) e.v[r] += fmat(r, c) * real'(x[c]);
      end
      e.t = cyc;
      q.push_back(e);
    end
    if (out_valid) begin
      if (q.size() == 0) begin
        failures++; checks++;
        $display("FAIL: output without input at cycle %0d", cyc);
      end else begin
        automatic exp_t e = q.pop_front();
        checks++;
        if (cyc - e.t != longint'(LAT)) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cyc - e.t, LAT);
        end
        for (int r = 0; r < 4; r++) begin
          automatic real err = real'(y[r]) - e.v[r];
          if (err < 0) err = -err;
          if (err > max_err) max_err = err;
          checks++;
          if (err > TOL) begin
            failures++;
            if (failures < 10) $display("FAIL: y%0d = %0d, expected %f", r, y[r], e.v[r]);
          end
        end
      end
    end
  end

  task automatic drive(input logic signed [DATA_W-1:0] v [8]);
    @(negedge clk);
    x = v; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    logic signed [DATA_W-1:0] v [8];
    localparam logic signed [DATA_W-1:0] MAXV = {1'b0, {(DATA_W-1){1'b1}}};
    localparam logic signed [DATA_W-1:0] MINV = {1'b1, {(DATA_W-1){1'b0}}};
    foreach (x[i]) x[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Worst cases: each row's sign pattern, at full scale, both polarities.
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 8; c++) v[c] = (fmat(r, c) >= 0) ? MAXV : MINV;
      drive(v);
      for (int c = 0; c < 8; c++) v[c] = (fmat(r, c) >= 0) ? MINV : MAXV;
      drive(v);
    end
    // Unit vectors: each column of F on its own.
    for (int c = 0; c < 8; c++) begin
      foreach (v[i]) v[i] = '0;
      v[c] = 1000;
      drive(v);
    end
    // Random vectors, back to back or with random gaps.
    for (int n = 0; n < NVEC; n++) begin
      @(negedge clk);
      for (int c = 0; c < 8; c++) x[c] = DATA_W'($urandom);
      in_valid = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results never appeared", q.size());
    end
    $display("max |error| = %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
