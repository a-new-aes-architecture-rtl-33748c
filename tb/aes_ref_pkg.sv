// aes_ref_pkg: a behavioural reference model of the cipher, written
// independently of the RTL, for the testbenches to compare against.
// The 4-bit S-box is derived here by searching GF(2^4) for inverses and
// applying the affine map bit by bit; the byte S-box of standard AES is
// derived the same way in GF(2^8), so the model's round and key-schedule
// code can be checked against the FIPS-197 example vector.
package aes_ref_pkg;
  typedef logic [127:0] blk_t;
  typedef logic [7:0]   st_t [16];

  function automatic logic [3:0] g16mul(input logic [3:0] a, input logic [3:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 8'(a) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 8'h13 << (i - 4);
    return p[3:0];
  endfunction

  function automatic logic [7:0] g256mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p = 0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [3:0] sbox4(input logic [3:0] x, input logic [3:0] c);
    logic [3:0] b = 0, d;
    for (int v = 1; v < 16; v++) if (g16mul(x, 4'(v)) == 4'h1) b = 4'(v);
    for (int i = 0; i < 4; i++) d[i] = b[i] ^ b[(i+2)%4] ^ b[(i+3)%4] ^ c[i];
    return d;
  endfunction

  function automatic logic [3:0] sbox4_inv(input logic [3:0] y, input logic [3:0] c);
    for (int x = 0; x < 16; x++) if (sbox4(4'(x), c) == y) return 4'(x);
    return 4'h0;
  endfunction

  // Standard AES S-box, only used to check this model against FIPS-197.
  function automatic logic [7:0] sbox8_std(input logic [7:0] x);
    logic [7:0] b = 0, d;
    for (int v = 1; v < 256; v++) if (g256mul(x, 8'(v)) == 8'h01) b = 8'(v);
    for (int i = 0; i < 8; i++)
      d[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ (8'h63 >> i & 1);
    return d;
  endfunction

  function automatic logic [7:0] sub8(input logic [7:0] x, input logic [3:0] c, input bit std);
    if (std) return sbox8_std(x);
    return {sbox4(x[7:4], c), sbox4(x[3:0], c)};
  endfunction

  function automatic logic [7:0] isub8(input logic [7:0] x, input logic [3:0] c);
    return {sbox4_inv(x[7:4], c), sbox4_inv(x[3:0], c)};
  endfunction

  function automatic st_t to_st(input blk_t b);
    st_t s;
    for (int i = 0; i < 16; i++) s[i] = b[127-8*i -: 8];
    return s;
  endfunction

  function automatic blk_t from_st(input st_t s);
    blk_t b;
    for (int i = 0; i < 16; i++) b[127-8*i -: 8] = s[i];
    return b;
  endfunction

  function automatic blk_t shift(input blk_t b, input bit inv);
    st_t s = to_st(b), t;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (!inv) t[4*c+r] = s[4*((c+r)%4)+r];
        else      t[4*((c+r)%4)+r] = s[4*c+r];
    return from_st(t);
  endfunction

  function automatic blk_t mix(input blk_t b, input bit inv);
    st_t s = to_st(b), t;
    logic [7:0] m [4];
    m = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        t[4*c+r] = 0;
        for (int k = 0; k < 4; k++) t[4*c+r] ^= g256mul(m[(k-r+4)%4], s[4*c+k]);
      end
    return from_st(t);
  endfunction

  function automatic blk_t sub(input blk_t b, input logic [3:0] c, input bit inv, input bit std);
    st_t s = to_st(b);
    for (int i = 0; i < 16; i++) s[i] = inv ? isub8(s[i], c) : sub8(s[i], c, std);
    return from_st(s);
  endfunction

  // Round key i of the AES-128 schedule (i = 0..10).
  function automatic blk_t round_key(input blk_t key, input int i, input logic [3:0] c, input bit std);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc = 8'h01;
    for (int j = 0; j < 4; j++) w[j] = key[127-32*j -: 32];
    for (int j = 4; j < 44; j++) begin
      t = w[j-1];
      if (j % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sub8(t[31:24], c, std), sub8(t[23:16], c, std), sub8(t[15:8], c, std), sub8(t[7:0], c, std)};
        t[31:24] ^= rc;
        rc = g256mul(rc, 8'h02);
      end
      w[j] = w[j-4] ^ t;
    end
    return {w[4*i], w[4*i+1], w[4*i+2], w[4*i+3]};
  endfunction

  function automatic blk_t encrypt(input blk_t pt, input blk_t key, input logic [3:0] c, input bit std = 0);
    blk_t s = pt ^ key;
    for (int r = 1; r <= 10; r++) begin
      s = shift(sub(s, c, 0, std), 0);
      if (r != 10) s = mix(s, 0);
      s ^= round_key(key, r, c, std);
    end
    return s;
  endfunction

  function automatic blk_t decrypt(input blk_t ct, input blk_t key, input logic [3:0] c);
    blk_t s = ct ^ round_key(key, 10, c, 0);
    for (int r = 9; r >= 0; r--) begin
      s = sub(shift(s, 1), c, 1, 0) ^ round_key(key, r, c, 0);
      if (r != 0) s = mix(s, 1);
    end
    return s;
  endfunction

  // Key of the n-th frame (n = 1, 2, ...): every key byte plus n, mod 256.
  function automatic blk_t frame_key(input blk_t key, input int n);
    blk_t k;
    for (int j = 0; j < 16; j++) k[8*j +: 8] = key[8*j +: 8] + 8'(n);
    return k;
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction
endpackage
