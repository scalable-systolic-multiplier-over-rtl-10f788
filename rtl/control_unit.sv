// control_unit: sequencer of the scalable multiplier.  The six rows of
// control vectors (S0, S1, S2) of the outer three-way Karatsuba split sit in
// a circular shift register, loaded with CTRL_TABLE at reset.  After
// `start` it issues one partial product per clock for six clocks, rotating
// the register each time; after six rotations it is back at row 0.  S0/S1
// of the head row drive the operand generators combinationally, so the
// operand register captures product i at the end of issue cycle i.  S2 and a
// valid/last flag travel down a delay line of PIPE+1 stages (operand
// register plus the subword multiplier latency PIPE) so that they reach the
// degree-alignment stage together with the product.  When the last product
// has been accumulated, c_load fires for one clock and `done` follows it.
// Interface: start is ignored while busy; clr clears D when start is taken.
// The delay line, the state machine and the start/done handshake are this
// design's choices; the circular register of Table II follows the method.
module control_unit #(
  parameter int unsigned PIPE = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       clr,       // start accepted: load A, B, clear D
  output logic [2:0] s0,
  output logic [2:0] s1,
  output logic       acc_en,    // accumulate the product now at degree alignment
  output logic [4:0] s2,        // its sparse polynomial selection
  output logic       c_load,    // D is complete: load the reduced result
  output logic       done       // result register holds the new product
);
  import gf_pkg::*;

  localparam int unsigned DL  = PIPE + 1;
  localparam int unsigned NPP = 6;   // partial products of the outer three-way split

  // Control table, rows i = 0..5, as (s00 s01 s02), (s10 s11 s12), (s20 .. s24)
  // written with bit 0 = the first-listed entry.
  localparam ctrl_vec_t CTRL_TABLE [NPP] = '{
    '{s0: 3'b001, s1: 3'b000, s2: 5'b00111},  // C0 = A0 B0        * (1 + x^n + x^2n)
    '{s0: 3'b010, s1: 3'b000, s2: 5'b01110},  // C1 = A1 B1        * (x^n + x^2n + x^3n)
    '{s0: 3'b100, s1: 3'b000, s2: 5'b11100},  // C2 = A2 B2        * (x^2n + x^3n + x^4n)
    '{s0: 3'b001, s1: 3'b010, s2: 5'b00010},  // C3 = (A0+A1)(B0+B1) * x^n
    '{s0: 3'b001, s1: 3'b100, s2: 5'b00100},  // C4 = (A0+A2)(B0+B2) * x^2n
    '{s0: 3'b010, s1: 3'b100, s2: 5'b01000}   // C5 = (A1+A2)(B1+B2) * x^3n
  };

  typedef enum logic [1:0] {IDLE, ISSUE, DRAIN} state_t;

  typedef struct packed {
    logic       valid;
    logic       last;
    logic [4:0] s2;
  } tag_t;

  state_t    state;
  logic [2:0] cnt;
  ctrl_vec_t ring [NPP];
  tag_t      dl [DL];
  logic      issue;

  assign issue = (state == ISSUE);
  assign busy  = (state != IDLE);
  assign clr   = (state == IDLE) && start;
  assign s0    = ring[0].s0;
  assign s1    = ring[0].s1;
  assign acc_en = dl[DL-1].valid;
  assign s2     = dl[DL-1].s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      cnt    <= '0;
      ring   <= CTRL_TABLE;
      c_load <= 1'b0;
      done   <= 1'b0;
      for (int unsigned k = 0; k < DL; k++) dl[k] <= '0;
    end else begin
      c_load <= dl[DL-1].valid && dl[DL-1].last;
      done   <= c_load;
      dl[0]  <= '{valid: issue, last: issue && (cnt == 3'(NPP - 1)), s2: ring[0].s2};
      for (int unsigned k = 1; k < DL; k++) dl[k] <= dl[k-1];
      if (issue)
        for (int unsigned k = 0; k < NPP; k++) ring[k] <= ring[(k + 1) % NPP];
      unique case (state)
        IDLE:  if (start) begin
                 state <= ISSUE;
                 cnt   <= '0;
               end
        ISSUE: if (cnt == 3'(NPP - 1)) state <= DRAIN;
               else                   cnt   <= cnt + 3'd1;
        DRAIN: if (c_load) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // The ring must be back at row 0 whenever no operation is being issued.
  assert property (@(posedge clk) disable iff (!rst_n) (state == IDLE) |-> (ring[0] == CTRL_TABLE[0]));
endmodule
