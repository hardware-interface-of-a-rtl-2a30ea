// sha_pkg: types and constants shared by the SHA core.
//
// The core hashes with one of the FIPS 180-3 functions SHA-1, SHA-224, SHA-256,
// SHA-384 or SHA-512, picked by the parameter ALGO. The function fixes the word
// width w of the interface (32 for SHA-1/224/256, 64 for SHA-384/512), the
// number of rounds, the initial hash value and the digest length.
//
// The round constants and initial hash values of SHA-2 are not typed in as a
// table: they are computed at elaboration from their definition in FIPS 180-3.
//   SHA-512 K[t] = first 64 bits of the fractional part of cbrt(p_t), t = 0..79
//   SHA-512 H0[i] = first 64 bits of the fractional part of sqrt(p_i), i = 0..7
//   SHA-384 H0[i] = same for the primes p_8 .. p_15
// where p_n is the (n+1)-th prime. SHA-256 K and H0 are the upper 32 bits of the
// SHA-512 values; SHA-224 H0 is the lower 32 bits of the SHA-384 values.
// SHA-1 uses K = floor(2^30 * sqrt(n)) for n = 2, 3, 5, 10 and the fixed
// initial value of FIPS 180-3 section 5.3.1.
package sha_pkg;

  typedef enum logic [2:0] {
    SHA1   = 3'd0,
    SHA224 = 3'd1,
    SHA256 = 3'd2,
    SHA384 = 3'd3,
    SHA512 = 3'd4
  } algo_e;

  // Interface word width w
  function automatic int word_width(algo_e a);
    return (a == SHA384 || a == SHA512) ? 64 : 32;
  endfunction

  // Number of w-bit words of the hash value written to dout
  function automatic int digest_words(algo_e a);
    case (a)
      SHA1:    return 5;
      SHA224:  return 7;
      SHA256:  return 8;
      SHA384:  return 6;
      default: return 8;
    endcase
  endfunction


  typedef logic [79:0][63:0] k_table_t;
  typedef logic [7:0][63:0]  iv_table_t;

  // n-th prime, n counted from 0 (2, 3, 5, ...)
  function automatic int nth_prime(int n);
    int found = -1;
    int cand = 1;
    while (found < n) begin
      bit is_p;
      cand++;
      is_p = 1'b1;
      for (int d = 2; d * d <= cand; d++)
        if (cand % d == 0) is_p = 1'b0;
      if (is_p) found++;
    end
    return cand;
  endfunction

  // floor(sqrt(p) * 2^64) mod 2^64: integer square root of p * 2^128
  function automatic logic [63:0] frac_sqrt64(int p);
    logic [255:0] n, r, t;
    n = 256'(p) << 128;
    r = '0;
    for (int b = 70; b >= 0; b--) begin
      t = r | (256'(1) << b);
      if (t * t <= n) r = t;
    end
    return r[63:0];
  endfunction

  // floor(cbrt(p) * 2^64) mod 2^64: integer cube root of p * 2^192
  function automatic logic [63:0] frac_cbrt64(int p);
    logic [255:0] n, r, t;
    n = 256'(p) << 192;
    r = '0;
    for (int b = 70; b >= 0; b--) begin
      t = r | (256'(1) << b);
      if (t * t * t <= n) r = t;
    end
    return r[63:0];
  endfunction

  function automatic k_table_t make_k512();
    k_table_t k;
    for (int i = 0; i < 80; i++) k[i] = frac_cbrt64(nth_prime(i));
    return k;
  endfunction

  function automatic iv_table_t make_iv(int first_prime);
    iv_table_t v;
    for (int i = 0; i < 8; i++) v[i] = frac_sqrt64(nth_prime(first_prime + i));
    return v;
  endfunction

  localparam k_table_t  K512  = make_k512();
  localparam iv_table_t IV512 = make_iv(0);
  localparam iv_table_t IV384 = make_iv(8);

  // floor(2^30 * sqrt(n))
  function automatic logic [31:0] sha1_k(int n);
    logic [127:0] m, r, t;
    m = 128'(n) << 60;
    r = '0;
    for (int b = 32; b >= 0; b--) begin
      t = r | (128'(1) << b);
      if (t * t <= m) r = t;
    end
    return r[31:0];
  endfunction

  localparam logic [3:0][31:0] K_SHA1 = {sha1_k(10), sha1_k(5), sha1_k(3), sha1_k(2)};
  localparam logic [4:0][31:0] IV_SHA1 =
    {32'hc3d2e1f0, 32'h10325476, 32'h98badcfe, 32'hefcdab89, 32'h67452301};

  // Initial hash value of a SHA-2 function, word i in the low w bits
  function automatic iv_table_t sha2_iv(algo_e a);
    iv_table_t v;
    for (int i = 0; i < 8; i++)
      case (a)
        SHA224:  v[i] = {32'h0, IV384[i][31:0]};
        SHA256:  v[i] = {32'h0, IV512[i][63:32]};
        SHA384:  v[i] = IV384[i];
        default: v[i] = IV512[i];
      endcase
    return v;
  endfunction

endpackage
