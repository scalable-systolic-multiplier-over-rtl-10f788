// tb_pe: checks one processing element (d = 5, p = 6, l = 2, 9-slot sum
// bus, offset 2).  A new random input set is applied every clock; one clock
// later c_out must equal c_in plus the core result placed at slot 2, and
// pa_out must equal pa_in.
module tb_pe;
  import tb_ref_pkg::*;
  localparam int DIG = 5, P = 6, L = 2, CW = 9, OFS = 2;
  localparam int SO = DIG * (DIG + 1) / 2;
  logic clk = 0;
  logic [P*SO-1:0] pa_in, pa_out;
  logic [L*DIG-1:0] bt_in;
  logic [CW*SO-1:0] c_in, c_out;
  logic [CW*SO-1:0] exp_c;
  logic [P*SO-1:0] exp_pa;
  int checks = 0, failures = 0;

  pe #(.DIG(DIG), .P(P), .L(L), .CW(CW), .OFS(OFS)) dut (.clk, .pa_in, .bt_in, .c_in, .pa_out, .c_out);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [P*DIG-1:0] a;
    logic [L*SO-1:0] pb;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      a = (P*DIG)'(rand64());
      bt_in = (L*DIG)'($urandom());
      for (int t = 0; t < P; t++) pa_in[t*SO +: SO] = SO'(ep_ref(DIG, 64'(a[t*DIG +: DIG])));
      for (int i = 0; i < CW * SO; i += 32) c_in[i +: 32] = $urandom();
      for (int j = 0; j < L; j++) pb[j*SO +: SO] = SO'(ep_ref(DIG, 64'(bt_in[j*DIG +: DIG])));
      exp_c = c_in;
      for (int t = 0; t < P; t++)
        for (int j = 0; j < L; j++)
          exp_c[(OFS+t+j)*SO +: SO] ^= pa_in[t*SO +: SO] & pb[j*SO +: SO];
      exp_pa = pa_in;
      @(posedge clk);
      #1;
      checks += 2;
      if (c_out !== exp_c) begin failures++; $display("FAIL c n=%0d", n); end
      if (pa_out !== exp_pa) begin failures++; $display("FAIL pa n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
