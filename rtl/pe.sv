// pe: processing element of a parallel systolic array.  It takes the
// evaluation points P_A of the whole subword A, a B~ word of l digits and the
// running sum C_in.  EP-B expands B~ into its evaluation points, the PWM
// multiplier core forms the (p+l-1)-slot partial result, and the adder adds
// it to C_in at slot offset OFS (the digit position of this PE's B~ word
// inside its row).  Two registers (the latches L) pass P_A and the new sum on
// to the next PE, so a PE is one pipeline stage.  The sum bus has CW slots of
// S = d(d+1)/2 bits.  Timing: outputs appear one clock after the inputs;
// bt_in must be presented in the same cycle as the matching pa_in.
// No reset: the registers only carry data, validity is tracked by the
// controller.  OFS and a fixed-width sum bus are this design's choices.
module pe #(
  parameter  int unsigned DIG = 10,
  parameter  int unsigned P   = 41,
  parameter  int unsigned L   = 4,
  parameter  int unsigned CW  = P + 3 * L - 1,
  parameter  int unsigned OFS = 0,
  localparam int unsigned SO  = DIG * (DIG + 1) / 2
) (
  input  logic                 clk,
  input  logic [P*SO-1:0]      pa_in,
  input  logic [L*DIG-1:0]     bt_in,
  input  logic [CW*SO-1:0]     c_in,
  output logic [P*SO-1:0]      pa_out,
  output logic [CW*SO-1:0]     c_out
);
  localparam int unsigned QW = (P + L - 1) * SO;

  initial assert (OFS + P + L - 1 <= CW) else $error("pe: sum bus too narrow");

  logic [L*SO-1:0] pb;
  logic [QW-1:0]   q;
  logic [CW*SO-1:0] c_sum;

  ep_vec   #(.DIG(DIG), .CNT(L))       u_epb  (.a(bt_in), .e(pb));
  pwm_core #(.DIG(DIG), .P(P), .L(L))  u_core (.pa(pa_in), .pb(pb), .q(q));

  always_comb begin
    c_sum = c_in;
    c_sum[OFS*SO +: QW] = c_in[OFS*SO +: QW] ^ q;
  end

  always_ff @(posedge clk) begin
    pa_out <= pa_in;
    c_out  <= c_sum;
  end
endmodule
