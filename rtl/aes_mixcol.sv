// aes_mixcol -- the AES MixColumns transformation (combinational).
//
// Each 32-bit column [b0 b1 b2 b3] of imix is multiplied by the fixed
// polynomial {03}x^3 + {01}x^2 + {01}x + {02} over GF(2^8), giving
//   o0 = 2*b0 ^ 3*b1 ^ b2 ^ b3      o1 = b0 ^ 2*b1 ^ 3*b2 ^ b3
//   o2 = b0 ^ b1 ^ 2*b2 ^ 3*b3      o3 = 3*b0 ^ b1 ^ b2 ^ 2*b3
// No general multiplier is used.  Multiplication by {02} is a 1-bit left
// shift chosen by a multiplexer on the byte's top bit: when that bit is
// set the shifted value is reduced by XOR with 8'h1b.  Multiplication by
// {03} is {02}*b ^ b, and {01} is the byte itself.  That structure follows
// the published architecture; the column ordering (byte 0 = bits [127:120]) is FIPS-197.
//
// Interface: imix is the ShiftRows output, omix the mixed state.  Purely
// combinational, no clock.
module aes_mixcol
  import aes_pkg::*;
(
  input  block_t imix,
  output block_t omix
);

  // Multiply by {02}: multiplexer selected by the overflow bit.
  function automatic byte_t mult2(byte_t b);
    byte_t shifted;
    shifted = {b[6:0], 1'b0};
    return b[7] ? (shifted ^ 8'h1b) : shifted;
  endfunction

  // Multiply by {03} = {02} + {01}.
  function automatic byte_t mult3(byte_t b);
    return mult2(b) ^ b;
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t b0, b1, b2, b3;
      b0 = imix[127 - 32*c      -: 8];
      b1 = imix[127 - 32*c -  8 -: 8];
      b2 = imix[127 - 32*c - 16 -: 8];
      b3 = imix[127 - 32*c - 24 -: 8];
      omix[127 - 32*c      -: 8] = mult2(b0) ^ mult3(b1) ^ b2        ^ b3;
      omix[127 - 32*c -  8 -: 8] = b0        ^ mult2(b1) ^ mult3(b2) ^ b3;
      omix[127 - 32*c - 16 -: 8] = b0        ^ b1        ^ mult2(b2) ^ mult3(b3);
      omix[127 - 32*c - 24 -: 8] = mult3(b0) ^ b1        ^ b2        ^ mult2(b3);
    end
  end

endmodule
