// tb_rec: checks the reconstruction circuit.  Point-wise products of
// reference EP vectors of two random digits are fed to R, whose output must
// be the carry-less product of the digits.  Also checks linearity: R of the
// sum of two PWM vectors equals the sum of the two products.  d = 10 and 5.
module tb_rec;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam int D1 = 10, S1 = D1 * (D1 + 1) / 2;
  localparam int D2 = 5,  S2 = D2 * (D2 + 1) / 2;
  logic [S1-1:0] dv1;
  logic [2*D1-2:0] c1;
  logic [S2-1:0] dv2;
  logic [2*D2-2:0] c2;

  rec #(.DIG(D1)) dut1 (.dv(dv1), .c(c1));
  rec #(.DIG(D2)) dut2 (.dv(dv2), .c(c2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] a, b, a2, b2;
    logic [2*MAXW-1:0] p;
    for (int n = 0; n < 300; n++) begin
      a = rand64() & ((64'd1 << D1) - 1);
      b = rand64() & ((64'd1 << D1) - 1);
      a2 = rand64() & ((64'd1 << D1) - 1);
      b2 = rand64() & ((64'd1 << D1) - 1);
      if (n == 0) begin a = '1 >> (64 - D1); b = a; end
      dv1 = S1'(ep_ref(D1, a) & ep_ref(D1, b));
      if (n % 2 == 1) dv1 ^= S1'(ep_ref(D1, a2) & ep_ref(D1, b2));
      dv2 = S2'(ep_ref(D2, a & 64'h1f) & ep_ref(D2, b & 64'h1f));
      #1;
      p = clmul(MAXW'(a), MAXW'(b));
      if (n % 2 == 1) p ^= clmul(MAXW'(a2), MAXW'(b2));
      checks++;
      if (c1 !== p[2*D1-2:0]) begin
        failures++;
        $display("FAIL d=10 a=%h b=%h c=%h exp=%h", a, b, c1, p[2*D1-2:0]);
      end
      p = clmul(MAXW'(a & 64'h1f), MAXW'(b & 64'h1f));
      checks++;
      if (c2 !== p[2*D2-2:0]) begin
        failures++;
        $display("FAIL d=5 a=%h b=%h c=%h exp=%h", a, b, c2, p[2*D2-2:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
