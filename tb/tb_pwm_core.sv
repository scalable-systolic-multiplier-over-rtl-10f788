// tb_pwm_core: checks the PWM multiplier core (d = 5, p = 6, l = 2).
// Inputs are reference EP vectors of random digits; slot s of the output
// must equal the sum over t + j = s of EP(a_t) AND EP(b_j).
module tb_pwm_core;
  import tb_ref_pkg::*;
  localparam int DIG = 5, P = 6, L = 2;
  localparam int SO = DIG * (DIG + 1) / 2;
  logic [P*DIG-1:0] a;
  logic [L*DIG-1:0] b;
  logic [P*SO-1:0] pa;
  logic [L*SO-1:0] pb;
  logic [(P+L-1)*SO-1:0] q, exp;
  int checks = 0, failures = 0;

  pwm_core #(.DIG(DIG), .P(P), .L(L)) dut (.pa, .pb, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      a = (P*DIG)'(rand64());
      b = (L*DIG)'(rand64());
      for (int t = 0; t < P; t++) pa[t*SO +: SO] = SO'(ep_ref(DIG, 64'(a[t*DIG +: DIG])));
      for (int j = 0; j < L; j++) pb[j*SO +: SO] = SO'(ep_ref(DIG, 64'(b[j*DIG +: DIG])));
      exp = '0;
      for (int t = 0; t < P; t++)
        for (int j = 0; j < L; j++)
          exp[(t+j)*SO +: SO] ^= pa[t*SO +: SO] & pb[j*SO +: SO];
      #1;
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
