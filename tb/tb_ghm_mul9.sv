// tb_ghm_mul9: self-checking testbench of the multiplier by 9.
//
// Applies every value of a 12-bit signed input and compares the output with
// the integer product 9*x.
module tb_ghm_mul9;
  localparam int IN_W  = 12;
  localparam int OUT_W = 16;

  logic signed [IN_W-1:0]  x;
  logic signed [OUT_W-1:0] y;
  int checks = 0, failures = 0;

  ghm_mul9 #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.x, .y);

  initial begin
    for (int v = -(2 ** (IN_W - 1)); v < 2 ** (IN_W - 1); v++) begin
      x = IN_W'(v);
      #1;
      checks++;
      if (int'(y) != 9 * v) begin
        failures++;
        if (failures < 10) $display("FAIL: x=%0d y=%0d expected %0d", v, y, 9 * v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
