// gf_pkg: shared types, constants and index helpers for the two-level
// Karatsuba SPB multiplier over GF(2^m).
//
// Inner level: a one-step d-term Karatsuba (KA) product of two d-bit digits
// works on "evaluation point" (EP) vectors of S = d(d+1)/2 bits.  Bit i
// (0 <= i < d) of an EP vector is the digit coefficient a_i; the bit at
// pair_idx(d,i,j) (i < j) is a_i + a_j.  Every module that builds, multiplies
// or reconstructs EP vectors uses this same ordering.
//
// Outer level: the three-way KA split of a field element is driven by three
// control vectors per partial product (the method's control table): S0 and S1
// pick the subwords that are added to form the decomposed operands, and S2
// picks the sparse polynomial P_i = s20 + s21 x^n + ... + s24 x^4n that the
// partial product is multiplied by before accumulation.  Bit k of s2 is the
// coefficient of x^(k*n); bit k of s0/s1 selects subword k.
package gf_pkg;

  // Size of an EP vector for digit size d: d singles plus d(d-1)/2 pairs.
  function automatic int unsigned s_otimes(input int unsigned d);
    return d * (d + 1) / 2;
  endfunction

  // Position of the pair (i,j), i < j, inside an EP vector of digit size d.
  function automatic int unsigned pair_idx(input int unsigned d, input int unsigned i,
                                           input int unsigned j);
    return d + (i * (2 * d - i - 1)) / 2 + (j - i - 1);
  endfunction

  // Pipelining factor l = 2^(ceil(log2(1.5 d)) - 2) of the inner multiplier.
  function automatic int unsigned l_of(input int unsigned d);
    return 1 << ($clog2((3 * d + 1) / 2) - 2);
  endfunction

  function automatic int unsigned ceil_div(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

  // One row of the control table (the table itself is in control_unit).
  typedef struct packed {
    logic [2:0] s0;   // first subword selection (one-hot or zero)
    logic [2:0] s1;   // second subword selection (one-hot or zero)
    logic [4:0] s2;   // sparse polynomial, bit k = coefficient of x^(k*n)
  } ctrl_vec_t;


endpackage
