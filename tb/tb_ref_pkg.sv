// tb_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL.  clmul is the schoolbook carry-less product;
// ep_ref builds an evaluation-point vector by enumerating the pairs (i,j),
// i < j, in lexicographic order after the d single bits; spb_ref computes
// x^-v a b mod (x^m + x^k + 1) by long division followed by v divisions by x.
package tb_ref_pkg;
  localparam int MAXW = 2048;
  localparam int EPW  = 256;

  function automatic logic [2*MAXW-1:0] clmul(input logic [MAXW-1:0] a,
                                             input logic [MAXW-1:0] b);
    logic [2*MAXW-1:0] r = '0;
    logic [2*MAXW-1:0] bs = {{MAXW{1'b0}}, b};
    for (int i = 0; i < MAXW; i++) begin
      if (a[i]) r ^= bs;
      bs = bs << 1;
    end
    return r;
  endfunction

  function automatic logic [EPW-1:0] ep_ref(input int d, input logic [63:0] a);
    logic [EPW-1:0] e = '0;
    int idx = d;
    for (int i = 0; i < d; i++) e[i] = a[i];
    for (int i = 0; i < d; i++)
      for (int j = i + 1; j < d; j++) begin
        e[idx] = a[i] ^ a[j];
        idx++;
      end
    return e;
  endfunction

  // x^-v * t mod (x^m + x^k + 1), v = k - 1; t has degree < 2m-1.
  function automatic logic [MAXW-1:0] spb_ref(input logic [2*MAXW-1:0] t, input int m,
                                               input int k);
    logic [2*MAXW-1:0] r = t;
    logic [MAXW-1:0] y;
    for (int i = 2 * m - 2; i >= m; i--)
      if (r[i]) begin
        r[i] = 1'b0;
        r[i-m+k] ^= 1'b1;
        r[i-m] ^= 1'b1;
      end
    y = r[MAXW-1:0];
    for (int s = 0; s < k - 1; s++) begin
      // multiply by x^-1: if y0 then y = (y + F)/x else y = y/x
      if (y[0]) begin
        y[0] ^= 1'b1;
        y[k] ^= 1'b1;
        y[m] ^= 1'b1;
      end
      y = y >> 1;
    end
    return y;
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

  function automatic logic [MAXW-1:0] rand_wide(input int w);
    logic [MAXW-1:0] r;
    for (int i = 0; i < MAXW / 32; i++) r[i*32 +: 32] = $urandom();
    for (int i = w; i < MAXW; i++) r[i] = 1'b0;
    return r;
  endfunction
endpackage
