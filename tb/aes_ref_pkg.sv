// aes_ref_pkg -- reference model of AES-128 encryption for the testbenches.
//
// A plain behavioural implementation written from the FIPS-197 definitions
// and deliberately built differently from the RTL: the S-box is found by
// searching for each byte's multiplicative inverse with a general GF(2^8)
// multiplier and applying the affine transform bit by bit; MixColumns uses
// the same general multiplier; the state is held as a 4x4 byte matrix
// s[row][col]; the key schedule is the 44-word array w[].  Functions:
//   sbox(x), gf_mul(a,b), mixcolumns(blk), shiftrows(blk), subbytes(blk),
//   round_keys(key) -> rk[0..10], encrypt(key, pt).
package aes_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef blk_t rk_t [11];

  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      b = b >> 1;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] inv = 8'h00;
    logic [7:0] r;
    logic [7:0] c = 8'h63;
    for (int y = 1; y < 256; y++)
      if (gf_mul(x, 8'(y)) == 8'h01) inv = 8'(y);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8]
             ^ c[i];
    return r;
  endfunction

  // Byte i of a block is bits [127-8i -: 8]; byte i = s[i%4][i/4].
  function automatic blk_t subbytes(blk_t b);
    blk_t o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = sbox(b[127-8*i -: 8]);
    return o;
  endfunction

  function automatic blk_t shiftrows(blk_t b);
    logic [7:0] s [4][4];
    blk_t o;
    for (int i = 0; i < 16; i++) s[i%4][i/4] = b[127-8*i -: 8];
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127-8*(4*c+r) -: 8] = s[r][(c+r)%4];
    return o;
  endfunction

  function automatic blk_t mixcolumns(blk_t b);
    logic [7:0] m [4][4] = '{'{8'h02, 8'h03, 8'h01, 8'h01},
                             '{8'h01, 8'h02, 8'h03, 8'h01},
                             '{8'h01, 8'h01, 8'h02, 8'h03},
                             '{8'h03, 8'h01, 8'h01, 8'h02}};
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [7:0] acc = 8'h00;
        for (int k = 0; k < 4; k++) acc ^= gf_mul(m[r][k], b[127-8*(4*c+k) -: 8]);
        o[127-8*(4*c+r) -: 8] = acc;
      end
    return o;
  endfunction

  function automatic rk_t round_keys(blk_t key);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rcon = 8'h01;
    rk_t rk;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        t[31:24] ^= rcon;
        rcon = gf_mul(rcon, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic blk_t encrypt(blk_t key, blk_t pt);
    rk_t  rk = round_keys(key);
    blk_t s  = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shiftrows(subbytes(s));
      if (r != 10) s = mixcolumns(s);
      s ^= rk[r];
    end
    return s;
  endfunction

endpackage
