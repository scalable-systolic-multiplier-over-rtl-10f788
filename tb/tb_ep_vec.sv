// tb_ep_vec: checks a row of 7 EP circuits (d = 10): every digit's slot
// must hold the reference evaluation-point vector of that digit.
module tb_ep_vec;
  import tb_ref_pkg::*;
  localparam int DIG = 10, CNT = 7;
  localparam int SO = DIG * (DIG + 1) / 2;
  logic [CNT*DIG-1:0] a;
  logic [CNT*SO-1:0] e;
  int checks = 0, failures = 0;

  ep_vec #(.DIG(DIG), .CNT(CNT)) dut (.a, .e);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [EPW-1:0] exp;
    for (int n = 0; n < 100; n++) begin
      a = (CNT*DIG)'(rand_wide(CNT * DIG));
      #1;
      for (int c = 0; c < CNT; c++) begin
        exp = ep_ref(DIG, 64'(a[c*DIG +: DIG]));
        checks++;
        if (e[c*SO +: SO] !== exp[SO-1:0]) begin
          failures++;
          $display("FAIL digit %0d", c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
