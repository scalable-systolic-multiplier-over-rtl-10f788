// tb_operand_gen: checks the decomposed operand generator (16-bit
// subwords) for the six control rows of the outer three-way split, which
// must give X0, X1, X2, X0+X1, X0+X2, X1+X2, and for zero selections.
module tb_operand_gen;
  localparam int NW = 16;
  logic [2:0][NW-1:0] x;
  logic [2:0] s0, s1;
  logic [NW-1:0] y;
  int checks = 0, failures = 0;

  operand_gen #(.NW(NW)) dut (.x, .s0, .s1, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NW-1:0] e;
    for (int n = 0; n < 100; n++) begin
      for (int k = 0; k < 3; k++) x[k] = NW'($urandom());
      for (int i = 0; i < 7; i++) begin
        case (i)
          0: begin s0 = 3'b001; s1 = 3'b000; e = x[0]; end
          1: begin s0 = 3'b010; s1 = 3'b000; e = x[1]; end
          2: begin s0 = 3'b100; s1 = 3'b000; e = x[2]; end
          3: begin s0 = 3'b001; s1 = 3'b010; e = x[0] ^ x[1]; end
          4: begin s0 = 3'b001; s1 = 3'b100; e = x[0] ^ x[2]; end
          5: begin s0 = 3'b010; s1 = 3'b100; e = x[1] ^ x[2]; end
          default: begin s0 = 3'b000; s1 = 3'b000; e = '0; end
        endcase
        #1;
        checks++;
        if (y !== e) begin failures++; $display("FAIL row %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
