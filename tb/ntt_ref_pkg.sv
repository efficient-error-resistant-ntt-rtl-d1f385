// ntt_ref_pkg: reference models used by the testbenches.
//
// Plain, unoptimised arithmetic written straight from the definitions, so it
// shares nothing with the RTL: modular reduction with %, the Kyber twiddle
// factors zeta_k = 17^br7(k) mod q, the textbook Cooley-Tukey forward NTT of
// the Kyber reference code, and a Hamming(17,12) encoder that builds the
// code word position by position.
package ntt_ref_pkg;

  localparam int Q = 3329;
  localparam int N = 256;

  typedef int poly_t [N];

  function automatic int br7(int i);
    int r = 0;
    for (int b = 0; b < 7; b++) if (i & (1 << b)) r |= 1 << (6 - b);
    return r;
  endfunction

  function automatic int powmod(int base, int e);
    longint r = 1;
    for (int i = 0; i < e; i++) r = (r * base) % Q;
    return int'(r);
  endfunction

  function automatic int zeta(int k);
    return powmod(17, br7(k));
  endfunction

  function automatic poly_t ntt(poly_t f);
    poly_t r = f;
    int k = 1;
    for (int len = 128; len >= 2; len = len / 2) begin
      for (int start = 0; start < N; start += 2 * len) begin
        int z = zeta(k);
        k++;
        for (int j = start; j < start + len; j++) begin
          int t = int'((longint'(z) * r[j + len]) % Q);
          r[j + len] = (r[j] - t + Q) % Q;
          r[j]       = (r[j] + t) % Q;
        end
      end
    end
    return r;
  endfunction

  // Check bits of a 12-bit value: build the 17-position code word with data
  // bits in order at the non-power-of-two positions, then for each check
  // position 2^i count the ones over the positions it covers.
  function automatic logic [4:0] ham_chk(logic [11:0] d);
    logic [17:0] cw = '0;
    logic [4:0]  c;
    int di = 0;
    for (int pos = 1; pos <= 17; pos++)
      if ((pos & (pos - 1)) != 0) begin cw[pos] = d[di]; di++; end
    for (int i = 0; i < 5; i++) begin
      int ones = 0;
      for (int pos = 1; pos <= 17; pos++)
        if ((pos >> i) & 1) ones += cw[pos];
      c[i] = ones[0];
    end
    return c;
  endfunction

endpackage
