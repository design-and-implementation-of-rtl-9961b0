// aes_cover -- AES-128 encryption module with a shared plaintext/key bus.
//
// Top level of the design.  To save pins, plaintext and key arrive over one
// 128-bit bus, ai_plakey, in two successive cycles: ai_rpla=1 loads the bus
// into the plaintext register, ai_rkey=1 into the key register (both load
// at the rising edge; both may be loaded in any order and at any time).
// The registers feed aes_cipher, which takes them when it starts a block
// (the cycle after ai_cip is seen while idle, or the ROUND10 cycle when
// ai_cip is high then).  Because the cipher keeps its own copies once a
// block has started, the next block's plaintext and key can be loaded while
// the current block is being processed, so loading costs no extra cycles:
// blocks started back to back complete every ten cycles.
//
// Loading both registers in the same cycle is a protocol error (the bus
// carries one value) and is flagged by an assertion.
// Outputs: ao_cipherdata is valid while ao_ready=1 (one cycle per block);
// ao_busy=0 means the core is idle and waiting.  Reset is asynchronous and
// active high and clears both input registers.  The two input registers and
// the shared bus follow the published architecture; the reset polarity is this design's.
module aes_cover
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  block_t ai_plakey,    // shared plaintext / key bus
  input  logic   ai_rpla,      // load plaintext register
  input  logic   ai_rkey,      // load key register
  input  logic   ai_cip,       // start / continue ciphering
  output block_t ao_cipherdata,
  output logic   ao_busy,
  output logic   ao_ready
);

  block_t ro_pla, ro_key;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)          ro_pla <= '0;
    else if (ai_rpla) ro_pla <= ai_plakey;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)          ro_key <= '0;
    else if (ai_rkey) ro_key <= ai_plakey;
  end

  // One bus, one register per cycle.
  a_one_load: assert property (@(posedge clk) !(ai_rpla && ai_rkey));

  aes_cipher u_cip (
    .clk           (clk),
    .rst           (rst),
    .ic_startcip   (ai_cip),
    .ci_plain      (ro_pla),
    .ci_key        (ro_key),
    .ci_cipherdata (ao_cipherdata),
    .ao_ready      (ao_ready),
    .ao_busy       (ao_busy)
  );

endmodule
