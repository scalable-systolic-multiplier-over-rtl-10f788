// fr: final reconstruction.  Applies one R circuit to each of NS slots of an
// evaluation-domain sum, giving NS digit products of 2d-1 bits, and
// overlap-adds slot s at bit position s*d.  This turns the accumulated
// PWM sums of the systolic array into the ordinary polynomial product
// (recombination property: R of a sum is the sum of the R's).  Result bits
// beyond OUTW are dropped (they are zero when the operands fit in OUTW).
// Combinational.
module fr #(
  parameter  int unsigned DIG  = 10,
  parameter  int unsigned NS   = 88,
  parameter  int unsigned OUTW = 815,
  localparam int unsigned SO   = DIG * (DIG + 1) / 2
) (
  input  logic [NS*SO-1:0] dsum,
  output logic [OUTW-1:0]  c
);
  localparam int unsigned FW = (NS + 1) * DIG - 1;  // full product width

  logic [2*DIG-2:0] rs [NS];
  logic [FW-1:0]    full;

  for (genvar s = 0; s < NS; s++) begin : g_r
    rec #(.DIG(DIG)) u_r (.dv(dsum[s*SO +: SO]), .c(rs[s]));
  end

  always_comb begin
    full = '0;
    for (int unsigned s = 0; s < NS; s++)
      full[s*DIG +: 2*DIG-1] = full[s*DIG +: 2*DIG-1] ^ rs[s];
  end

  if (OUTW <= FW) begin : g_trunc
    assign c = full[OUTW-1:0];
  end else begin : g_pad
    assign c = {{(OUTW-FW){1'b0}}, full};
  end
endmodule
