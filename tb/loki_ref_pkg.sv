// loki_ref_pkg: plain-arithmetic reference models of the Kyber polynomial
// operations, used by the testbenches to check the accelerator. Everything is
// computed with ordinary modular multiplication (no Montgomery reduction):
//   zeta(k)    = 17^bitrev7(k) mod q
//   ntt        : Cooley-Tukey loops of the Kyber reference, len 128 .. 2
//   invntt     : Gentleman-Sande loops, len 2 .. 128, then times
//                1441 * 2^-16 (the reference's fqmul by mont^2/128)
//   basemul    : r0 = (a1*b1*zeta + a0*b0) * 2^-16, r1 = (a0*b1 + a1*b0) * 2^-16
//   schoolbook : product in Z_q[X]/(X^256 + 1)
// All results are canonical residues in [0, q).
// It also holds a software SHA-3 (Keccak-f[1600] written with the tabulated
// rotation offsets and round constants of FIPS 202, sponge with the 0x06
// domain suffix) for checking the hash engine on whole messages.
package loki_ref_pkg;
  localparam int Q    = 3329;
  localparam int RINV = 169;    // 2^-16 mod q
  typedef int poly_t [256];

  function automatic int md(longint x);
    longint r;
    r = x % Q;
    if (r < 0) r += Q;
    return int'(r);
  endfunction

  function automatic int brv7(int k);
    int r = 0;
    for (int i = 0; i < 7; i++) if (k & (1 << i)) r |= 1 << (6 - i);
    return r;
  endfunction

  function automatic int zeta(int k);
    int p = 1;
    for (int i = 0; i < brv7(k); i++) p = md(p * 17);
    return p;
  endfunction

  function automatic poly_t ntt(poly_t a);
    poly_t r = a;
    int k = 1;
    for (int len = 128; len >= 2; len >>= 1)
      for (int start = 0; start < 256; start += 2 * len) begin
        int z = zeta(k++);
        for (int j = start; j < start + len; j++) begin
          int t = md(longint'(z) * r[j + len]);
          r[j + len] = md(r[j] - t);
          r[j]       = md(r[j] + t);
        end
      end
    return r;
  endfunction

  function automatic poly_t invntt(poly_t a);
    poly_t r = a;
    int k = 127;
    for (int len = 2; len <= 128; len <<= 1)
      for (int start = 0; start < 256; start += 2 * len) begin
        int z = zeta(k--);
        for (int j = start; j < start + len; j++) begin
          int t = r[j];
          r[j]       = md(t + r[j + len]);
          r[j + len] = md(longint'(z) * (r[j + len] - t));
        end
      end
    for (int j = 0; j < 256; j++) r[j] = md(longint'(r[j]) * 1441 * RINV);
    return r;
  endfunction

  function automatic poly_t basemul(poly_t a, poly_t b);
    poly_t r;
    for (int m = 0; m < 128; m++) begin
      int z = zeta(64 + m / 2);
      if (m % 2) z = md(-z);
      r[2*m]   = md(md(longint'(a[2*m+1]) * b[2*m+1] % Q * z + longint'(a[2*m]) * b[2*m]) * RINV);
      r[2*m+1] = md(md(longint'(a[2*m]) * b[2*m+1] + longint'(a[2*m+1]) * b[2*m]) * RINV);
    end
    return r;
  endfunction

  function automatic poly_t schoolbook(poly_t a, poly_t b);
    poly_t r;
    for (int i = 0; i < 256; i++) r[i] = 0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        int p = md(longint'(a[i]) * b[j]);
        if (i + j < 256) r[i + j]       = md(r[i + j] + p);
        else             r[i + j - 256] = md(r[i + j - 256] - p);
      end
    return r;
  endfunction

  typedef logic [63:0] kst_t [25];
  typedef byte unsigned bytes_t [$];

  localparam int KROT [25] = '{ 0,  1, 62, 28, 27, 36, 44,  6, 55, 20,  3, 10, 43,
                               25, 39, 41, 45, 15, 21,  8, 18,  2, 61, 56, 14};
  localparam logic [63:0] KRC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};

  function automatic logic [63:0] rotl64(logic [63:0] v, int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic kst_t keccak_f(kst_t s);
    logic [63:0] c [5];
    logic [63:0] b [25];
    for (int r = 0; r < 24; r++) begin
      for (int x = 0; x < 5; x++) c[x] = s[x] ^ s[x+5] ^ s[x+10] ^ s[x+15] ^ s[x+20];
      for (int i = 0; i < 25; i++) s[i] ^= c[(i%5+4)%5] ^ rotl64(c[(i%5+1)%5], 1);
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) b[y + 5*((2*x+3*y)%5)] = rotl64(s[x+5*y], KROT[x+5*y]);
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) s[x+5*y] = b[x+5*y] ^ (~b[(x+1)%5+5*y] & b[(x+2)%5+5*y]);
      s[0] ^= KRC[r];
    end
    return s;
  endfunction

  // SHA3 with a rate of `rate` bytes and `outlen` output bytes (outlen <= rate)
  function automatic bytes_t sha3(bytes_t msg, int rate, int outlen);
    kst_t s;
    bytes_t m, out;
    m = msg;
    m.push_back(8'h06);
    while (m.size() % rate != 0) m.push_back(8'h00);
    m[m.size() - 1] |= 8'h80;
    for (int i = 0; i < 25; i++) s[i] = '0;
    for (int blk = 0; blk < m.size() / rate; blk++) begin
      for (int i = 0; i < rate; i++) s[i / 8][8 * (i % 8) +: 8] ^= m[blk * rate + i];
      s = keccak_f(s);
    end
    for (int i = 0; i < outlen; i++) out.push_back(s[i / 8][8 * (i % 8) +: 8]);
    return out;
  endfunction
endpackage
