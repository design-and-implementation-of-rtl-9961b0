// aes_cipher -- iterative (non-pipelined) AES-128 encryption core.
//
// One round is computed per clock cycle by a single aes_round instance
// whose output is fed back to its input.  The initial AddRoundKey is an XOR
// gate on the inputs (ci_plain ^ ci_key); the multiplexer M01 chooses that
// value when the controller takes in a new block (LOAD or ROUND10 state) and
// the fed-back round output otherwise.  aes_genkey produces the round keys
// alongside, driven by the controller's round constant; its register
// always loads (write enable tied high), taking ci_key in LOAD/ROUND10 and
// its own next round key in the other states.
//
// Timing: assert ic_startcip while idle (ao_busy=0); ci_plain and ci_key
// are taken at the end of the following (LOAD) cycle.  Ten cycles later the
// ciphertext is on ci_cipherdata for the one cycle in which ao_ready=1
// (ROUND10).  If ic_startcip is high in that cycle, ci_plain/ci_key are
// taken again at its end and the next ciphertext follows ten cycles later,
// giving one 128-bit block per ten clock cycles.  ci_plain and ci_key must
// be stable in the cycle they are taken.  ci_cipherdata carries intermediate
// round values whenever ao_ready=0.  CBC chaining (XOR of the message with
// the previous ciphertext) is done by the user of the core.
//
// The partitioning into control, key generation and round, the input XOR
// and M01 follow the published architecture.  Reset is asynchronous and active high.
module aes_cipher
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   ic_startcip,     // CCTRL: start / continue ciphering
  input  block_t ci_plain,
  input  block_t ci_key,
  output block_t ci_cipherdata,
  output logic   ao_ready,
  output logic   ao_busy
);

  block_t cip0, cdata, cip1to10, roundkey;
  logic   selmuxc, selmuxr, selmuxg;
  byte_t  selround;

  aes_control u_control (
    .clk         (clk),
    .rst         (rst),
    .ic_startcip (ic_startcip),
    .oc_selmuxc  (selmuxc),
    .oc_selmuxr  (selmuxr),
    .oc_selmuxg  (selmuxg),
    .oc_round    (selround),
    .oc_busy     (ao_busy),
    .oc_ready    (ao_ready)
  );

  // Initial round and M01.
  assign cip0  = ci_plain ^ ci_key;
  assign cdata = selmuxc ? cip0 : cip1to10;

  aes_round u_round (
    .clk    (clk),
    .en     (1'b1),
    .iround (cdata),
    .isel   (selmuxr),
    .ikey   (roundkey),
    .omix   (cip1to10)
  );

  aes_genkey u_genkey (
    .clk      (clk),
    .rst      (rst),
    .gi_wr    (1'b1),
    .gi_sel   (selmuxg),
    .gi_round (selround),
    .gi_key   (ci_key),
    .go_key   (roundkey)
  );

  assign ci_cipherdata = cip1to10;

endmodule
