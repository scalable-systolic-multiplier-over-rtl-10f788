// fpr: final polynomial reduction for a trinomial F(x) = x^M + x^K + 1 in the
// shifted polynomial basis.  Input: the (2M-1)-bit unreduced product D.
// Output: C = x^-V D mod F with V = K - 1, the shift for which every term of
// x^-V D falls at most one step outside degrees 0..M-1:
//   degree e = i - V in [0, M-1]  : kept,
//   e = -j < 0 (j <= V)           : x^-j = x^(M-j) + x^(K-j),
//   e >= M                         : x^e  = x^(e-M+K) + x^(e-M).
// That is 2M-2 XOR inputs and two XOR levels, as for the trinomial row of
// the reduction cost table.  Combinational.  V = K - 1 is the usual
// shifted-basis choice for trinomials; the method does not print V.
module fpr #(
  parameter int unsigned M = 1223,
  parameter int unsigned K = 255
) (
  input  logic [2*M-2:0] d,
  output logic [M-1:0]   c
);
  localparam int V = int'(K) - 1;

  initial assert (K >= 1 && K < M) else $error("fpr: need 1 <= K < M");

  always_comb begin
    c = '0;
    for (int i = 0; i <= 2 * int'(M) - 2; i++) begin
      if (i - V < 0) begin
        c[int'(M) - (V - i)] = c[int'(M) - (V - i)] ^ d[i];
        c[int'(K) - (V - i)] = c[int'(K) - (V - i)] ^ d[i];
      end else if (i - V < int'(M)) begin
        c[i - V] = c[i - V] ^ d[i];
      end else begin
        c[i - V - int'(M) + int'(K)] = c[i - V - int'(M) + int'(K)] ^ d[i];
        c[i - V - int'(M)]           = c[i - V - int'(M)] ^ d[i];
      end
    end
  end
endmodule
