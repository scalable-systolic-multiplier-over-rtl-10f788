// tb_fpr: checks the final polynomial reduction for x^1223 + x^255 + 1
// (v = 254) and for a small trinomial x^13 + x^4 + 1 (v = 3) against a
// reference that reduces by long division and then divides by x v times.
// Inputs are random and single-bit (every single bit position once in the
// small case).
module tb_fpr;
  import tb_ref_pkg::*;
  localparam int M1 = 1223, K1 = 255, M2 = 13, K2 = 4;
  logic [2*M1-2:0] d1;
  logic [M1-1:0] c1;
  logic [2*M2-2:0] d2;
  logic [M2-1:0] c2;
  int checks = 0, failures = 0;

  fpr dut1 (.d(d1), .c(c1));
  fpr #(.M(M2), .K(K2)) dut2 (.d(d2), .c(c2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXW-1:0] y;
    for (int n = 0; n < 40; n++) begin
      for (int i = 0; i < 2 * M1 - 1; i += 32) d1[i +: 32] = $urandom();
      if (n == 0) d1 = '1;
      if (n == 1) d1 = (2*M1-1)'(1) << (2 * M1 - 2);
      if (n == 2) d1 = '0;
      #1;
      y = spb_ref((2*MAXW)'(d1), M1, K1);
      checks++;
      if (c1 !== y[M1-1:0]) begin failures++; $display("FAIL m=1223 n=%0d", n); end
    end
    for (int n = 0; n < 2 * M2 - 1 + 100; n++) begin
      d2 = (n < 2 * M2 - 1) ? (2*M2-1)'(1) << n : (2*M2-1)'($urandom());
      #1;
      y = spb_ref((2*MAXW)'(d2), M2, K2);
      checks++;
      if (c2 !== y[M2-1:0]) begin failures++; $display("FAIL m=13 n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
