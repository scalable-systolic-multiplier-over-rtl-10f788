// spb_mult_top: scalable shifted-polynomial-basis (SPB) multiplier over
// GF(2^M), F(x) = x^M + x^K + 1, computing C = x^-V A B mod F, V = K - 1.
// Two Karatsuba levels:
//   outer: A = A0 + A1 x^n + A2 x^2n (n = ceil(M/3)); the six products
//          A0B0, A1B1, A2B2, (A0+A1)(B0+B1), (A0+A2)(B0+B2), (A1+A2)(B1+B2)
//          are formed one per clock by two operand generators steered by
//          the control unit, multiplied on ONE subword multiplier, shifted by
//          their sparse polynomials in the degree-alignment circuit and summed
//          in register D;
//   inner: the subword multiplier is the systolic one-step d-term Karatsuba
//          array (EP-A, PSAs of PEs, pipelined adder tree, final
//          reconstruction).
// The final polynomial reduction turns D into C.
// Interface: pulse `start` with a and b valid (taken only when !busy);
// `done` pulses and c holds the product until the next result.
// Timing: c and done appear 6 + T + ceil(log2 W) + 2 clocks after the start
// edge (13 with the default sizes: six issue cycles, T PE stages, two adder-tree
// levels, D and the output register).  One operation at a time.
// Registers A, B, D and the units follow the method's block diagram; the
// operand register in front of the subword multiplier, the output register
// and the handshake are this design's choices.
module spb_mult_top #(
  parameter  int unsigned M   = 1223,
  parameter  int unsigned K   = 255,
  parameter  int unsigned DIG = 10,
  parameter  int unsigned T   = 3,
  localparam int unsigned N   = gf_pkg::ceil_div(M, 3)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c
);
  localparam int unsigned P    = gf_pkg::ceil_div(N, DIG);
  localparam int unsigned L    = gf_pkg::l_of(DIG);
  localparam int unsigned W    = gf_pkg::ceil_div(gf_pkg::ceil_div(P, L), T);
  localparam int unsigned PIPE = T + $clog2(W);

  logic [3*N-1:0]    a_reg, b_reg;     // registers A and B, zero-padded to 3n bits
  logic [N-1:0]      ai, bi;           // decomposed operands
  logic [N-1:0]      ai_q, bi_q;       // operand register
  logic [2*N-2:0]    cp;               // subword product
  logic [2*M-2:0]    d;                // register D
  logic [M-1:0]      c_red;
  logic              clr, acc_en, c_load;
  logic [2:0]        s0, s1;
  logic [4:0]        s2;

  control_unit #(.PIPE(PIPE)) u_ctrl (
    .clk, .rst_n, .start, .busy, .clr, .s0, .s1, .acc_en, .s2, .c_load, .done
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_reg <= '0;
      b_reg <= '0;
    end else if (clr) begin
      a_reg <= {{(3*N-M){1'b0}}, a};
      b_reg <= {{(3*N-M){1'b0}}, b};
    end
  end

  operand_gen #(.NW(N)) u_opa (.x(a_reg), .s0, .s1, .y(ai));
  operand_gen #(.NW(N)) u_opb (.x(b_reg), .s0, .s1, .y(bi));

  always_ff @(posedge clk) begin
    ai_q <= ai;
    bi_q <= bi;
  end

  subword_mult #(.NW(N), .DIG(DIG), .T(T)) u_mul (.clk, .a(ai_q), .b(bi_q), .c(cp));

  degree_align #(.NW(N), .M(M)) u_align (.clk, .rst_n, .clr, .acc_en, .s2, .cp, .d);

  fpr #(.M(M), .K(K)) u_fpr (.d, .c(c_red));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      c <= '0;
    else if (c_load) c <= c_red;
  end
endmodule
