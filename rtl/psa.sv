// psa: one parallel systolic array (a row of the subword multiplier).  T
// processing elements are chained: P_A and the running sum move one PE per
// clock.  PE r handles the B~ word r of this row (l digits of B) and adds its
// result at slot offset r*l.  The row's B~ words arrive together, in the same
// cycle as P_A; a skew register chain delays word r by r cycles so that it
// meets P_A in PE r.  The first PE starts from a zero sum.
// Output: CW = p + T*l - 1 slots of evaluation-domain sums, T cycles after
// the inputs.  The input skew chain is this design's choice; the method's
// figure leaves how B~ reaches each PE open.
module psa #(
  parameter  int unsigned DIG = 10,
  parameter  int unsigned P   = 41,
  parameter  int unsigned L   = 4,
  parameter  int unsigned T   = 3,
  localparam int unsigned SO  = DIG * (DIG + 1) / 2,
  localparam int unsigned CW  = P + T * L - 1
) (
  input  logic                 clk,
  input  logic [P*SO-1:0]      pa_in,
  input  logic [T*L*DIG-1:0]   bt_in,
  output logic [CW*SO-1:0]     c_out
);
  logic [P*SO-1:0]  pa [T+1];
  logic [CW*SO-1:0] cs [T+1];

  assign pa[0] = pa_in;
  assign cs[0] = '0;

  for (genvar r = 0; r < T; r++) begin : g_pe
    logic [L*DIG-1:0] bt_d [r+1];   // bt_d[k] = word r delayed by k cycles
    assign bt_d[0] = bt_in[r*L*DIG +: L*DIG];
    if (r > 0) begin : g_skew
      always_ff @(posedge clk)
        for (int unsigned k = 1; k <= r; k++) bt_d[k] <= bt_d[k-1];
    end
    pe #(.DIG(DIG), .P(P), .L(L), .CW(CW), .OFS(r*L)) u_pe (
      .clk   (clk),
      .pa_in (pa[r]),
      .bt_in (bt_d[r]),
      .c_in  (cs[r]),
      .pa_out(pa[r+1]),
      .c_out (cs[r+1])
    );
  end

  assign c_out = cs[T];
endmodule
