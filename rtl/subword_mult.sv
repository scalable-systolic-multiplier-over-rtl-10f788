// subword_mult: parallel systolic multiplier for two NW-bit subword
// polynomials over GF(2) (no reduction), built from the inner one-step
// d-term Karatsuba scheme.
//   * A is cut into p = ceil(NW/d) digits; EP-A turns them into P_A.
//   * B is cut into words B~ of l digits, l = 2^(ceil(log2(1.5d)) - 2).
//     k = ceil(p/l) words are spread over W = ceil(k/T) parallel systolic
//     arrays (PSA) of T processing elements each; B is zero-padded to W*T*l
//     digits.
//   * Every PE adds PWM(P_A, P_B~) into a running evaluation-domain sum; the
//     pipelined adder tree (PAT) adds the W row sums at their digit offsets,
//     and the final reconstruction (FR) turns the total into the product.
// Timing: fully pipelined, one new operand pair per clock; the product of the
// pair presented in cycle c is on `c` after T + ceil(log2 W) clocks.
// Interface: plain vectors, bit i = coefficient of x^i.  Zero padding, the
// input skew of B~ and the register placement in the PAT are this design's
// choices; the EP/PWM/R structure, l, and the PSA/PAT/FR organisation follow
// the method.
module subword_mult #(
  parameter  int unsigned NW  = 408,
  parameter  int unsigned DIG = 10,
  parameter  int unsigned T   = 3,
  localparam int unsigned P   = gf_pkg::ceil_div(NW, DIG),
  localparam int unsigned L   = gf_pkg::l_of(DIG),
  localparam int unsigned KK  = gf_pkg::ceil_div(P, L),
  localparam int unsigned W   = gf_pkg::ceil_div(KK, T)
) (
  input  logic            clk,
  input  logic [NW-1:0]   a,
  input  logic [NW-1:0]   b,
  output logic [2*NW-2:0] c
);
  localparam int unsigned SO  = DIG * (DIG + 1) / 2;
  localparam int unsigned RWD = T * L * DIG;      // B digits per row, in bits
  localparam int unsigned CW  = P + T * L - 1;    // slots per row sum
  localparam int unsigned NS  = P + W * T * L - 1; // slots of the total

  logic [P*DIG-1:0]   a_pad;
  logic [W*RWD-1:0]   b_pad;
  logic [P*SO-1:0]    pa;
  logic [CW*SO-1:0]   row_sum [W];
  logic [NS*SO-1:0]   total;

  assign a_pad = {{(P*DIG-NW){1'b0}}, a};
  assign b_pad = {{(W*RWD-NW){1'b0}}, b};

  ep_vec #(.DIG(DIG), .CNT(P)) u_epa (.a(a_pad), .e(pa));

  for (genvar g = 0; g < W; g++) begin : g_row
    psa #(.DIG(DIG), .P(P), .L(L), .T(T)) u_psa (
      .clk  (clk),
      .pa_in(pa),
      .bt_in(b_pad[g*RWD +: RWD]),
      .c_out(row_sum[g])
    );
  end

  pat #(.W(W), .RW(CW*SO), .STRIDE(T*L*SO)) u_pat (.clk(clk), .rows(row_sum), .sum(total));

  fr #(.DIG(DIG), .NS(NS), .OUTW(2*NW-1)) u_fr (.dsum(total), .c(c));
endmodule
