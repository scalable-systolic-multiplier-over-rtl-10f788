// pat: pipelined adder tree.  Sums W row results of RW bits each over
// GF(2) (bitwise XOR), row g shifted up by g*STRIDE bits, into one OW-bit
// result.  The rows are first placed at their offsets, then added pairwise in
// ceil(log2 W) levels with a register after each level, so the latency is
// ceil(log2 W) clocks (0 when W = 1).  Level registers are this design's
// choice of where to cut the tree; the method names the tree as pipelined.
module pat #(
  parameter  int unsigned W      = 4,
  parameter  int unsigned RW     = 2860,
  parameter  int unsigned STRIDE = 660,
  localparam int unsigned OW     = RW + (W - 1) * STRIDE
) (
  input  logic            clk,
  input  logic [RW-1:0]   rows [W],
  output logic [OW-1:0]   sum
);
  localparam int unsigned LV = $clog2(W);
  localparam int unsigned NP = 1 << LV;

  logic [OW-1:0] leaf [NP];

  always_comb begin
    for (int unsigned i = 0; i < NP; i++) begin
      leaf[i] = '0;
      if (i < W) leaf[i][i*STRIDE +: RW] = rows[i];
    end
  end

  if (LV == 0) begin : g_flat
    assign sum = leaf[0];
  end else begin : g_tree
    for (genvar v = 0; v < LV; v++) begin : g_lvl
      localparam int unsigned NN = NP >> (v + 1);
      logic [OW-1:0] node [NN];
      if (v == 0) begin : g_first
        always_ff @(posedge clk)
          for (int unsigned i = 0; i < NN; i++) node[i] <= leaf[2*i] ^ leaf[2*i+1];
      end else begin : g_next
        always_ff @(posedge clk)
          for (int unsigned i = 0; i < NN; i++)
            node[i] <= g_lvl[v-1].node[2*i] ^ g_lvl[v-1].node[2*i+1];
      end
    end
    assign sum = g_lvl[LV-1].node[0];
  end
endmodule
