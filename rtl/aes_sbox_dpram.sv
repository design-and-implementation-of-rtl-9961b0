// aes_sbox_dpram -- the AES S-box in a dual-port embedded ROM.
//
// Models one dual-port block memory holding the 256-byte S-box.  Two
// independent read ports each take an 8-bit address and return the
// substituted byte; reads are synchronous, as in an FPGA block RAM: the
// address presented while en_x=1 is looked up at the rising clock edge and
// its S-box value appears on dout_x after that edge and holds until the
// next enabled edge.  Because the read is registered, the memory takes the
// place of the pipeline register in front of the S-box logic.
//
// Ten such memories (two S-box lookups each) replace the twenty single
// lookups of a distributed-memory version: eight in the round datapath and
// two in the key expansion.  The table contents are computed at elaboration
// by aes_pkg::gen_sbox_table().  There is no reset: the outputs are only
// meaningful after an enabled read.
module aes_sbox_dpram
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  en_a,
  input  byte_t addr_a,
  output byte_t dout_a,
  input  logic  en_b,
  input  byte_t addr_b,
  output byte_t dout_b
);

  localparam sbox_table_t ROM = gen_sbox_table();

  always_ff @(posedge clk) begin
    if (en_a) dout_a <= ROM[addr_a];
  end

  always_ff @(posedge clk) begin
    if (en_b) dout_b <= ROM[addr_b];
  end

endmodule
