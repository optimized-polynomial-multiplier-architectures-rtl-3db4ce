// tb_saber_pkg: reference arithmetic and data packing for the Saber
// multiplier testbenches.
//
// ref_mul computes the negacyclic schoolbook product
//   c[j] = sum_i a[i] * s[j-i]  (terms with j-i < 0 use -s[j-i+256])
// modulo 2^13 directly from the definition, independently of the RTL.
// The packing helpers produce the memory images the multipliers read:
// secret words (16 sign-magnitude nibbles each), public words (13-bit
// coefficients back to back) and the two result layouts (packed 13-bit,
// and 4 coefficients per word in 16-bit lanes).
package tb_saber_pkg;
  localparam int N = 256;

  typedef int poly_t [N];
  typedef logic [63:0] word_t;

  function automatic void rand_secret(output poly_t s);
    for (int j = 0; j < N; j++) s[j] = int'($urandom_range(8)) - 4;
  endfunction

  function automatic void rand_public(output poly_t a);
    for (int j = 0; j < N; j++) a[j] = int'($urandom_range(8191));
  endfunction

  function automatic void ref_mul(input poly_t a, input poly_t s, output poly_t c);
    for (int j = 0; j < N; j++) c[j] = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int k;
        k = j + i;
        if (k < N) c[k] = c[k] + a[i] * s[j];
        else       c[k-N] = c[k-N] - a[i] * s[j];
      end
    for (int j = 0; j < N; j++) c[j] = c[j] & 8191;
  endfunction

  function automatic logic [3:0] sm4(int v);
    return (v < 0) ? {1'b1, 3'(-v)} : {1'b0, 3'(v)};
  endfunction

  function automatic word_t secret_word(input poly_t s, int w);
    word_t r;
    for (int t = 0; t < 16; t++) r[4*t +: 4] = sm4(s[16*w + t]);
    return r;
  endfunction

  // bit b of the packed 13-bit stream of p
  function automatic logic stream_bit(input poly_t p, int b);
    return 1'((p[b / 13] >> (b % 13)) & 1);
  endfunction

  function automatic word_t public_word(input poly_t a, int w);
    word_t r;
    for (int b = 0; b < 64; b++) r[b] = stream_bit(a, 64*w + b);
    return r;
  endfunction

  // coefficient k from packed 13-bit result words
  function automatic int packed_coeff(input word_t mem [52], int k);
    int v;
    v = 0;
    for (int b = 0; b < 13; b++)
      if (mem[(13*k + b) / 64][(13*k + b) % 64]) v = v | (1 << b);
    return v;
  endfunction
endpackage
