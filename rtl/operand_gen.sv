// operand_gen: decomposed operand generation circuit of the outer three-way
// Karatsuba level.  From the three NW-bit subwords X0, X1, X2 of an operand
// it forms
//   Y = (s0[0] X0 + s0[1] X1 + s0[2] X2) + (s1[0] X0 + s1[1] X1 + s1[2] X2),
// i.e. one subword or the sum of two, as selected by the control vectors S0
// and S1 (each one-hot or zero).  Two selectors and one XOR row;
// combinational.  One instance serves A, another B.
module operand_gen #(
  parameter int unsigned NW = 408
) (
  input  logic [2:0][NW-1:0] x,
  input  logic [2:0]         s0,
  input  logic [2:0]         s1,
  output logic [NW-1:0]      y
);
  logic [NW-1:0] m0, m1;

  always_comb begin
    m0 = '0;
    m1 = '0;
    for (int unsigned k = 0; k < 3; k++) begin
      if (s0[k]) m0 = m0 ^ x[k];
      if (s1[k]) m1 = m1 ^ x[k];
    end
    y = m0 ^ m1;
  end
endmodule
