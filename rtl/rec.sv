// rec: reconstruction (R) circuit of the one-step d-term Karatsuba
// multiplier.  From the S = d(d+1)/2 point-wise products D_i, D_ij it forms
// the 2d-1 coefficients of the digit product:
//   c_k = sum over i<j, i+j=k of (D_ij + D_i + D_j)  (+ D_(k/2) for even k),
// since D_ij + D_i + D_j = a_i b_j + a_j b_i.  R is linear over GF(2), so it
// can be applied once to a sum of PWM results (recombination).  Combinational
// XOR network; the grouping of the sums is left to synthesis.
module rec #(
  parameter  int unsigned DIG = 10,
  localparam int unsigned SO  = DIG * (DIG + 1) / 2
) (
  input  logic [SO-1:0]      dv,
  output logic [2*DIG-2:0]   c
);
  always_comb begin
    c = '0;
    for (int unsigned k = 0; k < 2 * DIG - 1; k++) begin
      if (k % 2 == 0) c[k] = dv[k/2];
      for (int unsigned i = 0; i < DIG; i++)
        for (int unsigned j = i + 1; j < DIG; j++)
          if (i + j == k)
            c[k] = c[k] ^ dv[gf_pkg::pair_idx(DIG, i, j)] ^ dv[i] ^ dv[j];
    end
  end
endmodule
