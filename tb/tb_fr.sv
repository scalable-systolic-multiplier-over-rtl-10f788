// tb_fr: checks the final reconstruction (d = 5, 6 slots).  The input is the
// evaluation-domain product of a random 4-digit A and 3-digit B, built with
// reference EP vectors (slot t+j collects EP(a_t) AND EP(b_j)); the output
// must be the carry-less product A*B.  A second instance with a narrower
// output checks the truncation.
module tb_fr;
  import tb_ref_pkg::*;
  localparam int DIG = 5, PA = 4, PB = 3, NS = PA + PB - 1;
  localparam int SO = DIG * (DIG + 1) / 2;
  localparam int OW = (NS + 1) * DIG - 1;
  logic [NS*SO-1:0] dsum;
  logic [OW-1:0] c;
  logic [19:0] c_short;
  int checks = 0, failures = 0;

  fr #(.DIG(DIG), .NS(NS), .OUTW(OW)) dut (.dsum, .c);
  fr #(.DIG(DIG), .NS(NS), .OUTW(20)) dut_s (.dsum, .c(c_short));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] a, b;
    logic [2*MAXW-1:0] p;
    for (int n = 0; n < 200; n++) begin
      a = rand64() & ((64'd1 << (PA * DIG)) - 1);
      b = rand64() & ((64'd1 << (PB * DIG)) - 1);
      dsum = '0;
      for (int t = 0; t < PA; t++)
        for (int j = 0; j < PB; j++)
          dsum[(t+j)*SO +: SO] ^= SO'(ep_ref(DIG, (a >> (t * DIG)) & 64'h1f) &
                                      ep_ref(DIG, (b >> (j * DIG)) & 64'h1f));
      #1;
      p = clmul(MAXW'(a), MAXW'(b));
      checks += 2;
      if (c !== p[OW-1:0]) begin failures++; $display("FAIL a=%h b=%h", a, b); end
      if (c_short !== p[19:0]) begin failures++; $display("FAIL short a=%h b=%h", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
