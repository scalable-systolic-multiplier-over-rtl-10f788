// ep: evaluation-point (EP) circuit of the one-step d-term Karatsuba
// multiplier.  It expands a d-bit digit a into the S = d(d+1)/2 bit vector
// (a_0 .. a_(d-1), a_i + a_j for all i < j) in the order of gf_pkg::pair_idx.
// Purely combinational: d(d-1)/2 XOR gates, one XOR delay, as the method
// states.  The bit ordering inside the vector is this design's choice.
module ep #(
  parameter  int unsigned DIG = 10,
  localparam int unsigned SO  = DIG * (DIG + 1) / 2
) (
  input  logic [DIG-1:0] a,
  output logic [SO-1:0]  e
);
  always_comb begin
    e = '0;
    for (int unsigned i = 0; i < DIG; i++) begin
      e[i] = a[i];
      for (int unsigned j = i + 1; j < DIG; j++)
        e[gf_pkg::pair_idx(DIG, i, j)] = a[i] ^ a[j];
    end
  end
endmodule
