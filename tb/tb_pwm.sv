// tb_pwm: checks the PWM circuit bit by bit: each output bit is the GF(2)
// product of the two input bits.
module tb_pwm;
  localparam int DIG = 10;
  localparam int SO = DIG * (DIG + 1) / 2;
  logic [SO-1:0] pa, pb, q;
  int checks = 0, failures = 0;

  pwm #(.DIG(DIG)) dut (.pa, .pb, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < SO; i++) begin
        pa[i] = $urandom() % 2;
        pb[i] = $urandom() % 2;
      end
      #1;
      for (int i = 0; i < SO; i++) begin
        checks++;
        if (q[i] != (pa[i] && pb[i])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
