// aes_pkg -- types and constants shared by the AES-128 encryption core.
//
// Holds the 128-bit block and byte types, the controller's state encoding
// and the AES S-box.  The S-box table is not typed in: gen_sbox_table()
// builds it at elaboration time from its definition in FIPS-197
// (multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 followed by the
// affine transform b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63).
// It walks the multiplicative group with generator {03}: p runs through
// 3^k while q runs through 3^-k, so q is always the inverse of p.
// Byte 0 of a 128-bit block is bits [127:120], as in FIPS-197.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;
  typedef byte_t        sbox_table_t [256];

  // The twelve states of the controller (START, LOAD, ROUND1..ROUND10).
  typedef enum logic [3:0] {
    ST_START   = 4'd0,
    ST_LOAD    = 4'd1,
    ST_ROUND1  = 4'd2,
    ST_ROUND2  = 4'd3,
    ST_ROUND3  = 4'd4,
    ST_ROUND4  = 4'd5,
    ST_ROUND5  = 4'd6,
    ST_ROUND6  = 4'd7,
    ST_ROUND7  = 4'd8,
    ST_ROUND8  = 4'd9,
    ST_ROUND9  = 4'd10,
    ST_ROUND10 = 4'd11
  } ctrl_state_t;

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic sbox_table_t gen_sbox_table();
    sbox_table_t t;
    byte_t p, q, x;
    p = 8'h01;
    q = 8'h01;
    t[0] = 8'h63;
    for (int k = 0; k < 255; k++) begin
      // p <- p * {03}
      p = p ^ byte_t'(p << 1) ^ (p[7] ? 8'h1b : 8'h00);
      // q <- q / {03}
      q = q ^ byte_t'(q << 1);
      q = q ^ byte_t'(q << 2);
      q = q ^ byte_t'(q << 4);
      if (q[7]) q = q ^ 8'h09;
      x = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4);
      t[p] = x ^ 8'h63;
    end
    return t;
  endfunction

  // Byte i (0..15) of a block, FIPS-197 numbering.
  function automatic byte_t get_byte(block_t b, int unsigned i);
    return b[127 - 8*i -: 8];
  endfunction

endpackage
