// tb_spb_mult_small: end-to-end test of the multiplier at two reduced
// configurations that exercise other corners of the parameter space:
//   A: GF(2^47), F = x^47 + x^5 + 1, d = 5 (l = 2), T = 2  -> p = 4, W = 1,
//      no adder-tree levels, latency 6 + 2 + 0 + 2 = 10;
//   B: GF(2^61), F = x^61 + x^12 + 1, d = 3 (l = 2), T = 1 -> p = 7, W = 4,
//      one PE per row, latency 6 + 1 + 2 + 2 = 11.
// Both run the same random operands side by side (masked to their widths);
// every result is compared with x^-v a b mod F and every latency is checked.
module tb_spb_mult_small;
  import tb_ref_pkg::*;
  localparam int MA = 47, KA = 5, LA = 10;
  localparam int MB = 61, KB = 12, LB = 11;
  logic clk = 0, rst_n = 0, start = 0;
  logic [MA-1:0] a_a, b_a, c_a;
  logic [MB-1:0] a_b, b_b, c_b;
  logic busy_a, done_a, busy_b, done_b;
  int checks = 0, failures = 0;

  spb_mult_top #(.M(MA), .K(KA), .DIG(5), .T(2)) dut_a (.clk, .rst_n, .start, .a(a_a), .b(b_a),
                                                       .busy(busy_a), .done(done_a), .c(c_a));
  spb_mult_top #(.M(MB), .K(KB), .DIG(3), .T(1)) dut_b (.clk, .rst_n, .start, .a(a_b), .b(b_b),
                                                       .busy(busy_b), .done(done_b), .c(c_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXW-1:0] r;
    int cyc, lat_a, lat_b;
    #22 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      a_a = (n == 0) ? MA'(1) : MA'(rand_wide(MA));
      b_a = (n == 0) ? MA'(1) << (KA - 1) : MA'(rand_wide(MA));
      a_b = MB'(rand_wide(MB));
      b_b = MB'(rand_wide(MB));
      start = 1;
      cyc = 0; lat_a = -1; lat_b = -1;
      @(negedge clk);
      start = 0;
      while (lat_a < 0 || lat_b < 0) begin
        cyc++;
        if (done_a && lat_a < 0) lat_a = cyc;
        if (done_b && lat_b < 0) lat_b = cyc;
        if (done_a) begin
          r = spb_ref(clmul(MAXW'(a_a), MAXW'(b_a)), MA, KA);
          checks++;
          if (c_a !== r[MA-1:0]) begin failures++; $display("FAIL A op %0d", n); end
        end
        if (done_b) begin
          r = spb_ref(clmul(MAXW'(a_b), MAXW'(b_b)), MB, KB);
          checks++;
          if (c_b !== r[MB-1:0]) begin failures++; $display("FAIL B op %0d", n); end
        end
        if (cyc > 40) break;
        @(negedge clk);
      end
      checks += 2;
      if (lat_a != LA + 1) begin failures++; $display("FAIL A latency %0d", lat_a - 1); end
      if (lat_b != LB + 1) begin failures++; $display("FAIL B latency %0d", lat_b - 1); end
      if (n == 0 && c_a !== MA'(1)) begin failures++; $display("FAIL A x^-v x^v"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
