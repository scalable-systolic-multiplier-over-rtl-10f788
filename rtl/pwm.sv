// pwm: point-wise multiplication (PWM) circuit of the one-step d-term
// Karatsuba multiplier.  Multiplies two evaluation-point vectors bit by bit
// over GF(2), i.e. one AND gate per bit: D_i = a_i b_i and
// D_ij = (a_i + a_j)(b_i + b_j).  Combinational, one AND delay.
module pwm #(
  parameter  int unsigned DIG = 10,
  localparam int unsigned SO  = DIG * (DIG + 1) / 2
) (
  input  logic [SO-1:0] pa,
  input  logic [SO-1:0] pb,
  output logic [SO-1:0] q
);
  assign q = pa & pb;
endmodule
