// aes_round -- one AES encryption round per clock cycle.
//
// The 128-bit state to be transformed (iround) is presented as the address
// of sixteen S-box lookups held in eight dual-port S-box memories; at the
// rising clock edge (when en=1) the memories capture it, and during the
// following cycle the substituted bytes (SubBytes) are available.  The
// memories' registered read is therefore the only state register of the
// round loop.  After them everything is combinational:
//   ShiftRows   - pure wiring: output byte r+4c takes substituted byte
//                 r+4((c+r) mod 4), i.e. row r rotates left by r bytes
//   MixColumns  - aes_mixcol
//   final mux   - isel=1 (last round) bypasses MixColumns
//   AddRoundKey - XOR with the round key ikey
// so omix = (isel ? SR(SB(s)) : MC(SR(SB(s)))) ^ ikey, where s is the value
// of iround at the previous enabled edge.  ikey and isel are used in the
// same cycle as omix.
//
// The structure (S-boxes, readdressing for ShiftRows, MIXCOL, the
// MixColumns/ShiftRows mux and the key XOR) follows the published architecture; the byte
// numbering and ShiftRows wiring follow FIPS-197.  Byte 0 = bits [127:120].
module aes_round
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   en,       // capture iround at this edge
  input  block_t iround,   // state entering the round (SubBytes address)
  input  logic   isel,     // 1 = last round: skip MixColumns
  input  block_t ikey,     // round key
  output block_t omix      // round output
);

  block_t bytesub, shiftrow, mixcolumn, muxout;

  // SubBytes: bytes 2k and 2k+1 share one dual-port memory.
  for (genvar k = 0; k < 8; k++) begin : g_sbox
    aes_sbox_dpram u_sbox (
      .clk    (clk),
      .en_a   (en),
      .addr_a (iround[127 - 16*k     -: 8]),
      .dout_a (bytesub[127 - 16*k     -: 8]),
      .en_b   (en),
      .addr_b (iround[127 - 16*k - 8 -: 8]),
      .dout_b (bytesub[127 - 16*k - 8 -: 8])
    );
  end

  // ShiftRows: readdressing of the substituted bytes.
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign shiftrow[127 - 8*(r + 4*c) -: 8] =
             bytesub[127 - 8*(r + 4*((c + r) % 4)) -: 8];
    end
  end

  aes_mixcol u_mixcol (
    .imix (shiftrow),
    .omix (mixcolumn)
  );

  assign muxout = isel ? shiftrow : mixcolumn;
  assign omix   = muxout ^ ikey;

endmodule
