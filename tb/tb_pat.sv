// tb_pat: checks the pipelined adder tree for W = 3 rows (two levels) and
// W = 4 rows, 16-bit rows at a stride of 5 bits.  A new set of rows enters
// every clock; ceil(log2 W) = 2 clocks later the sum must be the XOR of the
// rows shifted by g*5.
module tb_pat;
  localparam int RW = 16, ST = 5;
  logic clk = 0;
  logic [RW-1:0] rows3 [3];
  logic [RW-1:0] rows4 [4];
  logic [RW+2*ST-1:0] sum3;
  logic [RW+3*ST-1:0] sum4;
  logic [RW+2*ST-1:0] q3 [$];
  logic [RW+3*ST-1:0] q4 [$];
  int checks = 0, failures = 0;

  pat #(.W(3), .RW(RW), .STRIDE(ST)) dut3 (.clk, .rows(rows3), .sum(sum3));
  pat #(.W(4), .RW(RW), .STRIDE(ST)) dut4 (.clk, .rows(rows4), .sum(sum4));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [RW+3*ST-1:0] e;
    for (int n = 0; n < 202; n++) begin
      @(negedge clk);
      if (n >= 2) begin
        checks += 2;
        if (sum3 !== q3[0]) begin failures++; $display("FAIL W=3 n=%0d", n); end
        if (sum4 !== q4[0]) begin failures++; $display("FAIL W=4 n=%0d", n); end
        void'(q3.pop_front());
        void'(q4.pop_front());
      end
      e = '0;
      for (int g = 0; g < 4; g++) begin
        rows4[g] = RW'($urandom());
        if (g < 3) rows3[g] = RW'($urandom());
      end
      for (int g = 0; g < 3; g++) e ^= (RW+3*ST)'(rows3[g]) << (g * ST);
      q3.push_back(e[RW+2*ST-1:0]);
      e = '0;
      for (int g = 0; g < 4; g++) e ^= (RW+3*ST)'(rows4[g]) << (g * ST);
      q4.push_back(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
