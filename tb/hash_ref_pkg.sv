// hash_ref_pkg: plain sequential reference models of the hash functions,
// written as straight-line loops over message bytes in the style of the
// published reference software (not as the pipelined layer chains of the
// RTL), for use by the self-checking testbenches.
package hash_ref_pkg;

  typedef logic [7:0] bytes_t [$];

  function automatic longint unsigned rl(input longint unsigned x, input int r, input int w);
    longint unsigned mask;
    mask = (w == 64) ? 64'hffff_ffff_ffff_ffff : 64'h0000_0000_ffff_ffff;
    x = x & mask;
    return ((x << r) | (x >> (w - r))) & mask;
  endfunction

  function automatic longint unsigned le_word(input bytes_t m, input int at, input int nbytes);
    longint unsigned r;
    r = 0;
    for (int j = 0; j < nbytes; j++) r |= longint'(m[at + j]) << (8 * j);
    return r;
  endfunction

  // ---- SipHash / HalfSipHash, plain and extended ---------------------------
  function automatic logic [127:0] siphash_ref(input int w, input bit ext, input int c_rounds,
                                               input int d_rounds, input bytes_t m,
                                               input logic [127:0] key);
    longint unsigned mask, v0, v1, v2, v3, k0, k1, mw, out0, out1;
    int wb, n, i;
    mask = (w == 64) ? 64'hffff_ffff_ffff_ffff : 64'h0000_0000_ffff_ffff;
    wb = w / 8;
    n  = m.size();
    k0 = key[63:0] & mask;
    k1 = (w == 64) ? key[127:64] : 64'(key[63:32]);
    if (w == 64) begin
      v0 = k0 ^ 64'h736f6d6570736575;
      v1 = k1 ^ 64'h646f72616e646f6d;
      v2 = k0 ^ 64'h6c7967656e657261;
      v3 = k1 ^ 64'h7465646279746573;
    end else begin
      v0 = k0;
      v1 = k1;
      v2 = k0 ^ 64'h6c796765;
      v3 = k1 ^ 64'h74656462;
    end
    if (ext) v1 ^= 64'hee;
    i = 0;
    while (i + wb <= n + wb) begin
      if (i + wb <= n) mw = le_word(m, i, wb);
      else begin
        mw = (longint'(n % 256) << (w - 8)) & mask;
        mw |= le_word(m, i, n - i);
      end
      v3 ^= mw;
      for (int r = 0; r < c_rounds; r++) sipround(w, v0, v1, v2, v3);
      v0 ^= mw;
      i += wb;
    end
    v2 ^= ext ? 64'hee : 64'hff;
    for (int r = 0; r < d_rounds; r++) sipround(w, v0, v1, v2, v3);
    out0 = (w == 64) ? (v0 ^ v1 ^ v2 ^ v3) : (v1 ^ v3);
    if (!ext) return 128'(out0);
    v1 ^= 64'hdd;
    for (int r = 0; r < d_rounds; r++) sipround(w, v0, v1, v2, v3);
    out1 = (w == 64) ? (v0 ^ v1 ^ v2 ^ v3) : (v1 ^ v3);
    return (w == 64) ? {out1, out0} : 128'({out1[31:0], out0[31:0]});
  endfunction

  function automatic void sipround(input int w, inout longint unsigned v0, v1, v2, v3);
    longint unsigned mask;
    int ra, rb, rc, rd, re;
    mask = (w == 64) ? 64'hffff_ffff_ffff_ffff : 64'h0000_0000_ffff_ffff;
    if (w == 64) begin ra = 13; rb = 32; rc = 16; rd = 21; re = 17; end
    else         begin ra = 5;  rb = 16; rc = 8;  rd = 7;  re = 13; end
    v0 = (v0 + v1) & mask; v1 = rl(v1, ra, w); v1 ^= v0; v0 = rl(v0, rb, w);
    v2 = (v2 + v3) & mask; v3 = rl(v3, rc, w); v3 ^= v2;
    v0 = (v0 + v3) & mask; v3 = rl(v3, rd, w); v3 ^= v0;
    v2 = (v2 + v1) & mask; v1 = rl(v1, re, w); v1 ^= v2; v2 = rl(v2, rb, w);
  endfunction

  // ---- Chaskey -------------------------------------------------------------
  function automatic logic [127:0] times2(input logic [127:0] k);
    return {k[126:0], 1'b0} ^ (k[127] ? 128'h87 : 128'h0);
  endfunction

  function automatic logic [127:0] chaskey_ref(input int rounds, input bytes_t m,
                                               input logic [127:0] key);
    logic [31:0] v [4];
    logic [127:0] k1, k2, kx, blk;
    int n, nb;
    bit complete;
    n  = m.size();
    k1 = times2(key);
    k2 = times2(k1);
    complete = (n > 0) && (n % 16 == 0);
    nb = (n == 0) ? 1 : (n + 15) / 16;
    for (int j = 0; j < 4; j++) v[j] = key[32*j +: 32];
    for (int b = 0; b < nb; b++) begin
      blk = '0;
      for (int j = 0; j < 16; j++)
        if (16 * b + j < n) blk[8*j +: 8] = m[16 * b + j];
        else if (16 * b + j == n) blk[8*j +: 8] = 8'h01;
      if (b == nb - 1) blk ^= complete ? k1 : k2;
      for (int j = 0; j < 4; j++) v[j] ^= blk[32*j +: 32];
      for (int r = 0; r < rounds; r++) begin
        v[0] += v[1]; v[1] = {v[1][26:0], v[1][31:27]}; v[1] ^= v[0]; v[0] = {v[0][15:0], v[0][31:16]};
        v[2] += v[3]; v[3] = {v[3][23:0], v[3][31:24]}; v[3] ^= v[2];
        v[0] += v[3]; v[3] = {v[3][18:0], v[3][31:19]}; v[3] ^= v[0];
        v[2] += v[1]; v[1] = {v[1][24:0], v[1][31:25]}; v[1] ^= v[2]; v[2] = {v[2][15:0], v[2][31:16]};
      end
    end
    kx = complete ? k1 : k2;
    return {v[3], v[2], v[1], v[0]} ^ kx;
  endfunction

  // ---- SpookyHash V2, short form -------------------------------------------
  function automatic void short_mix(inout longint unsigned h0, h1, h2, h3);
    h2 = rl(h2,50,64); h2 += h3; h0 ^= h2;
    h3 = rl(h3,52,64); h3 += h0; h1 ^= h3;
    h0 = rl(h0,30,64); h0 += h1; h2 ^= h0;
    h1 = rl(h1,41,64); h1 += h2; h3 ^= h1;
    h2 = rl(h2,54,64); h2 += h3; h0 ^= h2;
    h3 = rl(h3,48,64); h3 += h0; h1 ^= h3;
    h0 = rl(h0,38,64); h0 += h1; h2 ^= h0;
    h1 = rl(h1,37,64); h1 += h2; h3 ^= h1;
    h2 = rl(h2,62,64); h2 += h3; h0 ^= h2;
    h3 = rl(h3,34,64); h3 += h0; h1 ^= h3;
    h0 = rl(h0,5,64);  h0 += h1; h2 ^= h0;
    h1 = rl(h1,36,64); h1 += h2; h3 ^= h1;
  endfunction

  function automatic void short_end(inout longint unsigned h0, h1, h2, h3);
    h3 ^= h2; h2 = rl(h2,15,64); h3 += h2;
    h0 ^= h3; h3 = rl(h3,52,64); h0 += h3;
    h1 ^= h0; h0 = rl(h0,26,64); h1 += h0;
    h2 ^= h1; h1 = rl(h1,51,64); h2 += h1;
    h3 ^= h2; h2 = rl(h2,28,64); h3 += h2;
    h0 ^= h3; h3 = rl(h3,9,64);  h0 += h3;
    h1 ^= h0; h0 = rl(h0,47,64); h1 += h0;
    h2 ^= h1; h1 = rl(h1,54,64); h2 += h1;
    h3 ^= h2; h2 = rl(h2,32,64); h3 += h2;
    h0 ^= h3; h3 = rl(h3,25,64); h0 += h3;
    h1 ^= h0; h0 = rl(h0,63,64); h1 += h0;
  endfunction

  function automatic logic [127:0] spooky_short_ref(input bytes_t m, input logic [127:0] seed);
    localparam longint unsigned SC = 64'hdeadbeefdeadbeef;
    longint unsigned a, b, c, d;
    int n, rem, p;
    n   = m.size();
    rem = n % 32;
    a = seed[63:0];
    b = seed[127:64];
    c = SC;
    d = SC;
    p = 0;
    if (n > 15) begin
      while (p + 32 <= n) begin
        c += le_word(m, p, 8);
        d += le_word(m, p + 8, 8);
        short_mix(a, b, c, d);
        a += le_word(m, p + 16, 8);
        b += le_word(m, p + 24, 8);
        p += 32;
      end
      if (rem >= 16) begin
        c += le_word(m, p, 8);
        d += le_word(m, p + 8, 8);
        short_mix(a, b, c, d);
        p += 16;
        rem -= 16;
      end
    end
    d += longint'(n) << 56;
    // the byte-by-byte fall-through of the reference code
    if (rem == 0) begin
      c += SC;
      d += SC;
    end else begin
      for (int j = 0; j < rem; j++)
        if (j < 8) c += longint'(m[p + j]) << (8 * j);
        else       d += longint'(m[p + j]) << (8 * (j - 8));
    end
    short_end(a, b, c, d);
    return {b, a};
  endfunction

endpackage
