// pwm_core: PWM multiplier core of a processing element.  It multiplies the
// evaluation points of all p digits of A (P_A) with those of the l digits of
// one B~ word (P_B~) using p*l PWM circuits, and sums the results that fall on
// the same digit position t+j:
//   q[slot s] = sum over t+j = s of PWM(P_A_t, P_B_j),   0 <= s < p+l-1.
// The sum stays in the evaluation domain (S = d(d+1)/2 bits per slot); the
// reconstruction is done once at the end of the array.  Combinational:
// one AND plus ceil(log2 l) XOR levels.
module pwm_core #(
  parameter  int unsigned DIG = 10,
  parameter  int unsigned P   = 41,
  parameter  int unsigned L   = 4,
  localparam int unsigned SO  = DIG * (DIG + 1) / 2
) (
  input  logic [P*SO-1:0]       pa,
  input  logic [L*SO-1:0]       pb,
  output logic [(P+L-1)*SO-1:0] q
);
  logic [SO-1:0] prod [P][L];

  for (genvar t = 0; t < P; t++) begin : g_t
    for (genvar j = 0; j < L; j++) begin : g_j
      pwm #(.DIG(DIG)) u_pwm (.pa(pa[t*SO +: SO]), .pb(pb[j*SO +: SO]), .q(prod[t][j]));
    end
  end

  always_comb begin
    q = '0;
    for (int unsigned t = 0; t < P; t++)
      for (int unsigned j = 0; j < L; j++)
        q[(t+j)*SO +: SO] = q[(t+j)*SO +: SO] ^ prod[t][j];
  end
endmodule
