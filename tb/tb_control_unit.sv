// tb_control_unit: checks the sequencer with PIPE = 5.  After a start pulse
// it must issue the six control rows (S0, S1) of the outer three-way split
// in order, one per clock; present the matching S2 with acc_en exactly
// PIPE + 1 clocks after each issue; fire c_load 12 and done 13 clocks after
// the start edge; ignore a start while busy; and run a second operation
// identically (the circular register is back at row 0).
module tb_control_unit;
  localparam int PIPE = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, clr, acc_en, c_load, done;
  logic [2:0] s0, s1;
  logic [4:0] s2;
  int checks = 0, failures = 0;

  // Control rows written out independently: {s0, s1, s2}, bit 0 first-listed
  logic [2:0] r0 [6] = '{3'b001, 3'b010, 3'b100, 3'b001, 3'b001, 3'b010};
  logic [2:0] r1 [6] = '{3'b000, 3'b000, 3'b000, 3'b010, 3'b100, 3'b100};
  logic [4:0] r2 [6] = '{5'b00111, 5'b01110, 5'b11100, 5'b00010, 5'b00100, 5'b01000};

  control_unit #(.PIPE(PIPE)) dut (.clk, .rst_n, .start, .busy, .clr, .s0, .s1, .acc_en, .s2, .c_load, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what, input int k);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at k=%0d", what, k); end
  endtask

  initial begin
    #22 rst_n = 1;
    for (int op = 0; op < 3; op++) begin
      @(negedge clk);
      chk(!busy && !done, "idle", -1);
      start = 1;
      #1 chk(clr, "clr", -1);
      for (int k = 0; k <= 14; k++) begin
        @(negedge clk);
        start = (op == 1 && k == 3);   // a start while busy must be ignored
        #1;
        chk(clr == 0, "no clr while busy", k);
        chk(busy == (k < 13), "busy", k);
        if (k < 6) chk(s0 == r0[k] && s1 == r1[k], "s0/s1", k);
        chk(acc_en == (k >= 6 && k <= 11), "acc_en", k);
        if (k >= 6 && k <= 11) chk(s2 == r2[k-6], "s2", k);
        chk(c_load == (k == 12), "c_load", k);
        chk(done == (k == 13), "done", k);
        if (k == 13) break;
      end
      start = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
