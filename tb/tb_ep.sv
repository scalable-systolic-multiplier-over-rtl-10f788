// tb_ep: checks the EP circuit for d = 10 on random and corner digits
// against the reference evaluation-point vector.
module tb_ep;
  import tb_ref_pkg::*;
  localparam int DIG = 10;
  localparam int SO = DIG * (DIG + 1) / 2;
  logic [DIG-1:0] a;
  logic [SO-1:0] e;
  int checks = 0, failures = 0;

  ep #(.DIG(DIG)) dut (.a, .e);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [EPW-1:0] exp;
    for (int n = 0; n < 300; n++) begin
      a = (n == 0) ? '0 : (n == 1) ? '1 : DIG'($urandom());
      #1;
      exp = ep_ref(DIG, 64'(a));
      checks++;
      if (e !== exp[SO-1:0]) begin
        failures++;
        $display("FAIL a=%h e=%h exp=%h", a, e, exp[SO-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
