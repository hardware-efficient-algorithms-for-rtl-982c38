// tb_ghm_cmul_frac: self-checking testbench of the fractional-constant
// multiplier.
//
// Instantiates the multiplier with each of the six constants the GHM kernels
// use and, for random and edge-case inputs, compares the output with
// floor(x*c_q + 1/2) computed in real arithmetic, where c_q = mant/2**shift
// is the quantised constant. It also checks that c_q lies within 2**-17
// (relative) of the exact constant, e.g. 3/(5*sqrt(2)).
module tb_ghm_cmul_frac;
  import ghm_pkg::*;
  localparam int IN_W  = 20;
  localparam int OUT_W = 20;
  localparam int NC    = 6;
  localparam coef_t CS [NC] = '{C_3_5R2, C_4_5, C_3_10, C_1_20, C_1_10R2, C_1_R2};

  logic signed [IN_W-1:0]  x;
  logic signed [OUT_W-1:0] y [NC];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NC; k++) begin : g_mul
    ghm_cmul_frac #(.IN_W(IN_W), .OUT_W(OUT_W), .COEF(CS[k])) dut (.x(x), .y(y[k]));
  end

  function automatic real exact_c(int k);
    real s2 = $sqrt(2.0);
    case (k)
      0: return 3.0 / (5.0 * s2);
      1: return 0.8;
      2: return 0.3;
      3: return 0.05;
      4: return 1.0 / (10.0 * s2);
      default: return 1.0 / s2;
    endcase
  endfunction

  task automatic check_one(input logic signed [IN_W-1:0] v);
    x = v;
    #1;
    for (int k = 0; k < NC; k++) begin
      automatic real cq  = real'(CS[k].mant) / (2.0 ** real'(CS[k].shift));
      automatic real ref_v = $floor(real'(v) * cq + 0.5);
      checks++;
      if (real'(y[k]) != ref_v) begin
        failures++;
        if (failures < 10) $display("FAIL: k=%0d x=%0d y=%0d expected %f", k, v, y[k], ref_v);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < NC; k++) begin
      automatic real cq  = real'(CS[k].mant) / (2.0 ** real'(CS[k].shift));
      automatic real rel = (cq - exact_c(k)) / exact_c(k);
      checks++;
      if (rel > 2.0 ** -17 || rel < -(2.0 ** -17)) begin
        failures++;
        $display("FAIL: constant %0d off by %e", k, rel);
      end
    end
    check_one('0);
    check_one(1);
    check_one(-1);
    check_one({1'b0, {(IN_W-1){1'b1}}});
    check_one({1'b1, {(IN_W-1){1'b0}}});
    for (int n = 0; n < 20000; n++) check_one(IN_W'($urandom));
    for (int n = -300; n <= 300; n++) check_one(IN_W'(n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
