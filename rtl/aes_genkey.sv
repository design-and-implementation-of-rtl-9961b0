// aes_genkey -- AES-128 key expansion, one round key per clock cycle.
//
// A 128-bit register (TRKEY) holds the current round key.  Its input
// multiplexer selects the external cipher key (gi_sel=0) or the round key
// computed from the register (gi_sel=1); the register loads at each rising
// edge with gi_wr=1.  From the register the next round key is formed as in
// FIPS-197 for a 4-word key:
//   t       = SubWord(RotWord(w3)) ^ {gi_round, 24'h0}
//   w0' = w0 ^ t,  w1' = w0 ^ w1 ^ t,  w2' = w0^w1^w2 ^ t,  w3' = w0^w1^w2^w3 ^ t
// where w0 = bits [127:96] ... w3 = bits [31:0], and go_key = {w0',w1',w2',w3'}.
// The four SubWord lookups use two dual-port S-box memories with registered
// reads.  So that their outputs line up with the register, they are
// addressed with the bytes that are about to be written into it (the mux
// output) and enabled by the same gi_wr; the memory's read register thus
// holds a copy of those bytes in substituted form.
//
// Timing: with the register holding round key i-1 and gi_round equal to
// round i's constant, go_key is round key i in the same cycle (combinational
// from the register).  gi_round is the round constant (01, 02, ... 36)
// supplied by the controller.  rst (asynchronous, active high) clears the
// key register.  Structure (register, input mux, four S-boxes, rcon XOR and
// the XOR chain) follows the published architecture; the RotWord byte order follows
// FIPS-197.
module aes_genkey
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   gi_wr,     // register write enable
  input  logic   gi_sel,    // 0 = load gi_key, 1 = load go_key
  input  byte_t  gi_round,  // round constant
  input  block_t gi_key,    // external cipher key
  output block_t go_key     // round key computed from the register
);

  block_t tmkey, trkey;
  logic [31:0] ttrans;
  byte_t s_b13, s_b14, s_b15, s_b12;   // S(byte) of the register's word 3

  assign tmkey = gi_sel ? go_key : gi_key;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        trkey <= '0;
    else if (gi_wr) trkey <= tmkey;
  end

  // SubWord of word 3, addressed ahead of the register (see header).
  aes_sbox_dpram u_sbox0 (
    .clk    (clk),
    .en_a   (gi_wr), .addr_a (tmkey[23:16]), .dout_a (s_b13),
    .en_b   (gi_wr), .addr_b (tmkey[15:8]),  .dout_b (s_b14)
  );
  aes_sbox_dpram u_sbox1 (
    .clk    (clk),
    .en_a   (gi_wr), .addr_a (tmkey[7:0]),   .dout_a (s_b15),
    .en_b   (gi_wr), .addr_b (tmkey[31:24]), .dout_b (s_b12)
  );

  assign ttrans = {s_b13 ^ gi_round, s_b14, s_b15, s_b12};

  assign go_key[127:96] = trkey[127:96] ^ ttrans;
  assign go_key[95:64]  = trkey[127:96] ^ trkey[95:64] ^ ttrans;
  assign go_key[63:32]  = trkey[127:96] ^ trkey[95:64] ^ trkey[63:32] ^ ttrans;
  assign go_key[31:0]   = trkey[127:96] ^ trkey[95:64] ^ trkey[63:32] ^ trkey[31:0] ^ ttrans;

endmodule
