// tb_spb_mult_top: end-to-end test of the multiplier at its default size,
// GF(2^1223) with F = x^1223 + x^255 + 1 (v = 254), d = 10, T = 3.
// Each operation is compared with x^-v a b mod F from a schoolbook reference,
// and must take exactly 13 clocks from the start edge to done.  Operands:
// zero, one times x^v (result 1), all ones, single top bits and random
// values; some operations start in the cycle right after done.  The test
// also counts the mechanisms of the design and fails if one never happened:
// each of the six outer partial products accumulated, reduction of terms
// below degree v and above degree M-1+v, and a start ignored while busy.
module tb_spb_mult_top;
  import tb_ref_pkg::*;
  localparam int M = 1223, K = 255, V = K - 1, LAT = 13;
  logic clk = 0, rst_n = 0, start = 0;
  logic [M-1:0] a, b, c;
  logic busy, done;
  int checks = 0, failures = 0;
  int n_pp [6];
  int n_low = 0, n_high = 0, n_ignored = 0, n_ops = 0;

  spb_mult_top dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .c);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count the partial products by their sparse-polynomial selection.
  logic [4:0] sel [6] = '{5'b00111, 5'b01110, 5'b11100, 5'b00010, 5'b00100, 5'b01000};
  always @(posedge clk)
    if (dut.u_ctrl.acc_en)
      for (int i = 0; i < 6; i++) if (dut.u_ctrl.s2 == sel[i]) n_pp[i]++;

  task automatic run_op(input logic [M-1:0] x, input logic [M-1:0] y, input bit poke);
    logic [MAXW-1:0] r;
    int cyc = 0;
    a = x;
    b = y;
    start = 1;
    @(negedge clk);
    start = 0;
    a = '1;   // operands only need to be valid at the start edge
    b = '0;
    while (!done) begin
      cyc++;
      if (poke && cyc == 4) begin
        start = 1;        // must be ignored: the multiplier is busy
        n_ignored++;
      end else start = 0;
      @(negedge clk);
      if (cyc > 50) break;
    end
    start = 0;
    r = spb_ref(clmul(MAXW'(x), MAXW'(y)), M, K);
    checks += 2;
    if (c !== r[M-1:0]) begin failures++; $display("FAIL op %0d value", n_ops); end
    if (cyc != LAT) begin failures++; $display("FAIL op %0d latency %0d", n_ops, cyc); end
    if (dut.d[V-1:0] != '0) n_low++;
    if (dut.d[2*M-2:M+V] != '0) n_high++;
    n_ops++;
  endtask

  initial begin
    logic [M-1:0] one_v;
    one_v = '0;
    one_v[V] = 1'b1;
    #22 rst_n = 1;
    @(negedge clk);
    run_op('0, M'(rand_wide(M)), 0);
    run_op(M'(1), one_v, 0);
    checks++;
    if (c !== M'(1)) begin failures++; $display("FAIL x^-v * x^v != 1"); end
    run_op('1, '1, 1);
    run_op(M'(1) << (M - 1), M'(1) << (M - 1), 0);
    for (int n = 0; n < 8; n++) begin
      run_op(M'(rand_wide(M)), M'(rand_wide(M)), n == 3);
      if (n % 2 == 1) repeat (2) @(negedge clk);
    end
    $display("ops=%0d pp=%0d/%0d/%0d/%0d/%0d/%0d low_reductions=%0d high_reductions=%0d ignored_starts=%0d",
             n_ops, n_pp[0], n_pp[1], n_pp[2], n_pp[3], n_pp[4], n_pp[5], n_low, n_high, n_ignored);
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (n_pp[i] != n_ops) begin failures++; $display("FAIL partial product %0d count", i); end
    end
    checks += 3;
    if (n_low == 0) failures++;
    if (n_high == 0) failures++;
    if (n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
