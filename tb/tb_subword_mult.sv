// tb_subword_mult: checks the systolic subword multiplier at its default
// size (n = 408, d = 10, T = 3: p = 41, l = 4, W = 4 arrays) and at a small
// size with an odd layout (n = 23, d = 5, T = 2: p = 5, l = 2, W = 2).
// A new random pair enters every clock (plus corner cases: zero, all ones,
// single bits); each product must appear exactly T + ceil(log2 W) clocks
// later (5 and 3) and equal the carry-less product.
module tb_subword_mult;
  import tb_ref_pkg::*;
  localparam int N1 = 408, LAT1 = 5;
  localparam int N2 = 23,  LAT2 = 3;
  logic clk = 0;
  logic [N1-1:0] a1, b1;
  logic [2*N1-2:0] c1;
  logic [N2-1:0] a2, b2;
  logic [2*N2-2:0] c2;
  logic [2*N1-2:0] q1 [$];
  logic [2*N2-2:0] q2 [$];
  int checks = 0, failures = 0;

  subword_mult dut1 (.clk, .a(a1), .b(b1), .c(c1));
  subword_mult #(.NW(N2), .DIG(5), .T(2)) dut2 (.clk, .a(a2), .b(b2), .c(c2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*MAXW-1:0] p;
    for (int n = 0; n < 60 + LAT1; n++) begin
      @(negedge clk);
      if (n >= LAT1) begin
        checks++;
        if (c1 !== q1[0]) begin failures++; $display("FAIL n=408 cycle %0d", n); end
        void'(q1.pop_front());
      end
      if (n >= LAT2) begin
        checks++;
        if (c2 !== q2[0]) begin failures++; $display("FAIL n=23 cycle %0d", n); end
        void'(q2.pop_front());
      end
      case (n)
        0: begin a1 = '0; b1 = '1; end
        1: begin a1 = '1; b1 = '1; end
        2: begin a1 = N1'(1) << (N1 - 1); b1 = N1'(1) << (N1 - 1); end
        default: begin a1 = N1'(rand_wide(N1)); b1 = N1'(rand_wide(N1)); end
      endcase
      a2 = (n == 1) ? '1 : N2'($urandom());
      b2 = (n == 1) ? '1 : N2'($urandom());
      p = clmul(MAXW'(a1), MAXW'(b1));
      q1.push_back(p[2*N1-2:0]);
      p = clmul(MAXW'(a2), MAXW'(b2));
      q2.push_back(p[2*N2-2:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
