// tb_degree_align: checks the degree-alignment circuit and register D with
// n = 8, M = 23 (D is 45 bits).  Random partial products are accumulated
// with the six sparse-polynomial selections and random extra patterns; D is
// compared with a reference after every clock, including clear, hold
// (acc_en low) and the dropping of bits above 2M-2.
module tb_degree_align;
  localparam int NW = 8, M = 23, DW = 2 * M - 1;
  logic clk = 0, rst_n = 0, clr = 0, acc_en = 0;
  logic [4:0] s2;
  logic [2*NW-2:0] cp;
  logic [DW-1:0] d, e;
  int checks = 0, failures = 0;

  degree_align #(.NW(NW), .M(M)) dut (.clk, .rst_n, .clr, .acc_en, .s2, .cp, .d);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] t;
    logic [4:0] sel [6] = '{5'b00111, 5'b01110, 5'b11100, 5'b00010, 5'b00100, 5'b01000};
    e = '0;
    s2 = '0; cp = '0;
    #12 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      clr = (n % 50 == 0);
      acc_en = ($urandom() % 4) != 0;
      s2 = (n % 3 == 0) ? 5'($urandom()) : sel[n % 6];
      cp = (2*NW-1)'($urandom());
      t = '0;
      for (int j = 0; j < 5; j++) if (s2[j]) t ^= 64'(cp) << (j * NW);
      if (clr) e = '0;
      else if (acc_en) e ^= DW'(t);
      @(posedge clk);
      #1;
      checks++;
      if (d !== e) begin failures++; $display("FAIL n=%0d d=%h e=%h", n, d, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
