// degree_align: degree-alignment circuit with the accumulation register D.
// A partial product Cp (2NW-1 bits) is multiplied by the sparse polynomial
//   P = s2[0] + s2[1] x^NW + s2[2] x^2NW + s2[3] x^3NW + s2[4] x^4NW
// (one of x^n, x^2n, x^3n, 1+x^n+x^2n, x^n+x^2n+x^3n, x^2n+x^3n+x^4n for
// the six outer Karatsuba products) and added into D, which holds the
// (2M-1)-bit unreduced product.  Bits of a shifted copy above 2M-2 are
// dropped: they cancel in the complete sum because A and B have degree < M.
// Timing: D <= 0 on clr, D <= D + P*Cp at a clock edge with acc_en; clr
// wins.  Forming P*Cp as a sum of gated shifted copies is equivalent to
// selecting one of the six precomputed terms; this design uses the sum.
module degree_align #(
  parameter  int unsigned NW = 408,
  parameter  int unsigned M  = 1223,
  localparam int unsigned DW = 2 * M - 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            acc_en,
  input  logic [4:0]      s2,
  input  logic [2*NW-2:0] cp,
  output logic [DW-1:0]   d
);
  localparam int unsigned FW = 6 * NW - 1;  // degree of P*Cp is at most 6NW-2

  logic [FW-1:0] term;
  logic [DW-1:0] term_t;

  always_comb begin
    term = '0;
    for (int unsigned j = 0; j < 5; j++)
      if (s2[j]) term[j*NW +: 2*NW-1] = term[j*NW +: 2*NW-1] ^ cp;
  end

  if (FW >= DW) begin : g_trunc
    assign term_t = term[DW-1:0];
  end else begin : g_pad
    assign term_t = {{(DW-FW){1'b0}}, term};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      d <= '0;
    else if (clr)    d <= '0;
    else if (acc_en) d <= d ^ term_t;
  end
endmodule
