// ghm_mul9: multiplier by the integer constant 9.
//
// y = 9*x, built as one shift and one add: (x << 3) + x. These are the two
// "multipliers by integer numbers" of each kernel (entries 9 of the diagonal
// matrix D9); they need no embedded multiplier. Combinational.
// OUT_W must be at least IN_W + 4 for the result to be exact.
module ghm_mul9 #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 20
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);

  logic signed [OUT_W-1:0] xe;

  always_comb begin
    xe = OUT_W'(x);
    y  = (xe <<< 3) + xe;
  end

endmodule
