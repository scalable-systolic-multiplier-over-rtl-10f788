// tb_psa: checks a parallel systolic array of T = 3 PEs (d = 5, p = 6,
// l = 2).  A new (A, B~ row) pair enters every clock; T clocks later the row
// sum must be, for each PE r, the PWM sums of EP(A) with the evaluation
// points of B~ word r placed at slot offset r*l.  Also checks that the result
// takes exactly T clocks.
module tb_psa;
  import tb_ref_pkg::*;
  localparam int DIG = 5, P = 6, L = 2, T = 3;
  localparam int SO = DIG * (DIG + 1) / 2;
  localparam int CW = P + T * L - 1;
  logic clk = 0;
  logic [P*SO-1:0] pa_in;
  logic [T*L*DIG-1:0] bt_in;
  logic [CW*SO-1:0] c_out;
  logic [CW*SO-1:0] expq [$];
  int checks = 0, failures = 0;

  psa #(.DIG(DIG), .P(P), .L(L), .T(T)) dut (.clk, .pa_in, .bt_in, .c_out);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [P*DIG-1:0] a;
    logic [CW*SO-1:0] e;
    logic [SO-1:0] eb;
    for (int n = 0; n < 100 + T; n++) begin
      @(negedge clk);
      a = (P*DIG)'(rand64());
      bt_in = (T*L*DIG)'(rand64());
      for (int t = 0; t < P; t++) pa_in[t*SO +: SO] = SO'(ep_ref(DIG, 64'(a[t*DIG +: DIG])));
      e = '0;
      for (int r = 0; r < T; r++)
        for (int j = 0; j < L; j++) begin
          eb = SO'(ep_ref(DIG, 64'(bt_in[(r*L+j)*DIG +: DIG])));
          for (int t = 0; t < P; t++)
            e[(r*L+t+j)*SO +: SO] ^= pa_in[t*SO +: SO] & eb;
        end
      expq.push_back(e);
      if (n >= T) begin
        // c_out now shows the result of the pair applied T clocks ago
        checks++;
        if (c_out !== expq[0]) begin failures++; $display("FAIL n=%0d", n); end
        void'(expq.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
