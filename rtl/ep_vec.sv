// ep_vec: a row of CNT evaluation-point circuits, one per d-bit digit.
// Used as EP-A (CNT = p digits of the subword operand A, giving P_A) and as
// EP-B inside each processing element (CNT = l digits of B~_i).  Digit c of
// the input occupies bits [c*d +: d]; its EP vector occupies [c*S +: S].
// Combinational, one XOR delay.
module ep_vec #(
  parameter  int unsigned DIG = 10,
  parameter  int unsigned CNT = 41,
  localparam int unsigned SO  = DIG * (DIG + 1) / 2
) (
  input  logic [CNT*DIG-1:0] a,
  output logic [CNT*SO-1:0]  e
);
  for (genvar c = 0; c < CNT; c++) begin : g_ep
    ep #(.DIG(DIG)) u_ep (.a(a[c*DIG +: DIG]), .e(e[c*SO +: SO]));
  end
endmodule
