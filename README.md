# Iterative AES-128 encryptor with S-boxes in dual-port block memories

This is a compact AES-128 encryption engine for FPGAs. It computes one AES
round per clock cycle on a single round datapath and produces a 128-bit
ciphertext every ten cycles. It targets Cipher Block Chaining (CBC), the
mode IPsec uses. In CBC each block is XORed with the previous ciphertext
before it is encrypted, so a pipeline of unrolled rounds cannot be kept full.
A small loop that runs one round per cycle then loses nothing and costs a
fraction of the area.

The architecture follows the one published by Algredo-Badillo,
Feregrino-Uribe and Cumplido ("Design and Implementation of an FPGA-Based
1.452-Gbps Non-pipelined AES Architecture"). That work reports 10 cycles per
block, 8.80 ns clock period, 586 slices and 10 block RAMs on a Virtex-II
XC2V1000. The RTL here is a new, self-contained description of that
structure. Where the published description was incomplete or inconsistent,
this RTL makes its own choices, which are listed under
[Departures and choices](#departures-and-choices). It was checked against
the FIPS-197 examples and an independent reference model. No FPGA
implementation results are claimed for it.

## Structure

```
 ai_plakey ──┬─► [R01 plaintext] ─ci_plain──┐
  (shared)   └─► [R02 key] ───────ci_key────┼──────────────────────┐
                                            ▼                      ▼
                                   ci_plain ^ ci_key        aes_genkey
                                   (initial round)     mux ─► key reg ─► SubWord/Rcon/XOR chain ─► round key
                                            │                 ▲    (2 dual-port S-box memories)      │
                                            ▼                 └──────────────────────────────────────┤
                                     M01 mux (selmuxc) ◄─────────────────────┐                       │
                                            │                                │                       │
                                            ▼                                │                       ▼
 aes_round:  8 dual-port S-box memories (registered read) ─► ShiftRows ─► MixColumns ─► mux(selmuxr) ─► XOR ─► ciphertext
                                                                  └────────────────────────┘
 aes_control: 12-state FSM ─► selmuxc, selmuxr, selmuxg, round constant, busy, ready
```

| Module | Role |
| --- | --- |
| `aes_cover` | Top level. Two input registers loaded from one shared 128-bit bus, then the core |
| `aes_cipher` | The core: initial-round XOR, the M01 feedback multiplexer, and the three units below |
| `aes_control` | Controller FSM with states START, LOAD and ROUND1..ROUND10 |
| `aes_round` | One round: SubBytes, ShiftRows, MixColumns (skipped in round 10), AddRoundKey |
| `aes_mixcol` | MixColumns, built from multiplexer-based multiply-by-2 and XOR gates |
| `aes_genkey` | Key expansion that produces each round key in the cycle it is used |
| `aes_sbox_dpram` | 256 x 8 S-box ROM with two synchronous read ports, modelling one block RAM |
| `aes_pkg` | Types, state encoding, and the S-box table generator |

Bytes are numbered as in FIPS-197: byte 0 is bits `[127:120]`, and byte
`r + 4c` is row `r`, column `c` of the state.

## Where the round register is

The loop has no separate state register. Every S-box lookup sits in a
block-RAM port with a registered read, so the memories themselves hold the
round state. In each cycle the M01 multiplexer output (new input or fed-back
round output) is the address of the sixteen round lookups. At the clock edge
the memories capture it. During the next cycle everything after SubBytes is
combinational:

```
omix = (last_round ? SR(SB(s)) : MC(SR(SB(s)))) ^ round_key
```

where `s` is the value captured at the previous edge. This is why 16 round
lookups and 4 key-schedule lookups fit in 10 dual-port memories, with no
extra pipeline stage.

The key schedule gets the same treatment. `aes_genkey` holds the current
round key in a register (TRKEY). Its four SubWord lookups cannot read that
register through a synchronous memory without losing a cycle. So they are
addressed with the value being written into the register (the output of its
input multiplexer), and they load with the same enable. The substituted
bytes then appear in the same cycle as the register contents. The next round
key is:

```
t  = {S(w3[23:16]) ^ rcon, S(w3[15:8]), S(w3[7:0]), S(w3[31:24])}   // RotWord, SubWord, Rcon
w0' = w0 ^ t;  w1' = w0' ^ w1;  w2' = w1' ^ w2;  w3' = w2' ^ w3
```

The hardware forms it as four parallel XOR trees: `w0^t`, `w0^w1^t`, and so on.

## Controller and cycle timing

`aes_control` registers all its outputs. At the edge that enters a state,
the outputs take that state's values:

| State | busy | selmuxc | selmuxg | selmuxr | ready | round constant | Next state |
| --- | --- | --- | --- | --- | --- | --- | --- |
| START | 0 | 0 | 1 | 0 | 0 | 01 | LOAD if start, else START |
| LOAD | 1 | **1** | **0** | 0 | 0 | 01 | ROUND1 |
| ROUND1..9 | 1 | 0 | 1 | 0 | 0 | 01 02 04 08 10 20 40 80 1B | next round |
| ROUND10 | 1 | **1** | **0** | **1** | **1** | 36 | ROUND1 if start, else START |

In this table `selmuxc=1` means the core takes `plain ^ key`, and
`selmuxg=0` means the key register takes the input key. `selmuxr=1` bypasses
MixColumns. After reset the outputs are busy=1, ready=0, selmuxc=0,
selmuxg=1, selmuxr=0 and round=01. busy falls at the first clock edge.

A block runs as follows, where cycle 0 is the cycle in which `start` is seen
in START:

| Cycle | State | What happens |
| --- | --- | --- |
| 0 | START | start=1 seen |
| 1 | LOAD | `plain ^ key` goes into the round memories and `key` into the key register, at the end of the cycle |
| 2..10 | ROUND1..9 | Rounds 1 to 9. The round key is computed in the same cycle, and the key register advances |
| 11 | ROUND10 | Round 10 (no MixColumns). Ciphertext on the output, ready=1. If start=1, the next block is taken at the end of this cycle |

ROUND10 doubles as the load cycle of the next block. Blocks started back to
back therefore leave the core every **10 cycles**: 128 bits per 10 clocks,
which is 1.45 Gbps at 8.8 ns. A block started from idle is ready 11 cycles
after the start request. The ciphertext is valid only in the cycle with
ready=1. In other cycles the output carries intermediate round values.

## Using the top level (`aes_cover`)

A pin-limited FPGA cannot take 256 input bits at once. So plaintext and key
share the 128-bit bus `ai_plakey`:

1. Drive the plaintext with `ai_rpla=1` for one cycle. It is loaded into R01
   at the edge.
2. Drive the key with `ai_rkey=1` for one cycle. It is loaded into R02.
   Either order works. Loading both in the same cycle is a protocol error,
   and an assertion flags it.
3. Hold `ai_cip=1`. From idle the block starts. In ROUND10 (`ao_ready=1`)
   the next block is taken at the end of that cycle.
4. Read `ao_cipherdata` in each cycle with `ao_ready=1`.

Once a block has been taken, the core keeps its own copies of the state and
the key. The next plaintext and key can therefore be loaded during the ten
cycles of the current block, and the shared bus costs no throughput. The key
register keeps its value, so a stream under one key needs only the plaintext
reloaded.

**CBC.** The chaining XOR lies outside the module. The host forms
`message ^ previous_ciphertext`; for the first block it uses the IV. The
previous ciphertext exists only in its ROUND10 cycle. So the host loads the
new plaintext in that cycle with `ai_cip=0`, and raises `ai_cip` in the
following START cycle. A chained CBC stream therefore runs at **12 cycles
per block**. The end-to-end testbench drives exactly this sequence.

`rst` is asynchronous and active high. It clears the two input registers and
the key register, and returns the controller to START.

## Departures and choices

- **ShiftRows and RotWord byte order** follow FIPS-197. The published
  schematics label the S-box and ShiftRows byte connections, and the
  key-schedule S-box inputs, in ways that do not form the AES permutation.
  For example, one key-schedule S-box input repeats another's. The standard
  was taken as authoritative.
- **Ten memories.** The round draws sixteen S-boxes and the key schedule
  four. Here they are packed two per dual-port memory: 8 memories in the
  round and 2 in the key schedule. That gives the ten block RAMs of the
  published final version. An earlier variant with 20 distributed-RAM
  S-boxes and asynchronous reads is not provided.
- **Registered controller outputs.** A state only names some outputs. Those
  it does not name take defaults: busy=1, selmuxc=0, selmuxg=1, selmuxr=0,
  ready=0. Without defaults the feedback multiplexer would stay on "input".
- **Cycle count.** The published text mentions both "every twelve" and
  "every ten" cycles per block. This design gives 10 cycles for independent
  back-to-back blocks and 12 for host-chained CBC.
- **Signals not specified by the original:** reset polarity and style
  (asynchronous, active high), the state encoding (4-bit binary), the start
  input of the core (taken to be the single control input), and the
  key-schedule write enable, tied high.
- **S-box contents** are computed at elaboration by
  `aes_pkg::gen_sbox_table()` from the definition: the inverse in GF(2^8)
  modulo x^8+x^4+x^3+x+1, then the affine map
  `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. No table is
  typed in.
- Only encryption is implemented. No decryption and no 192- or 256-bit keys
  are provided, matching the original.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The reference model `tb/aes_ref_pkg.sv` is
written independently of the RTL: its S-box uses an inverse search, and its
MixColumns uses a general GF(2^8) multiplier. The testbenches also check the
FIPS-197 Appendix B and C.1 vectors directly.

| Testbench | What it checks |
| --- | --- |
| `tb_aes_sbox_dpram` | All 256 entries on both ports, the read latency, hold with enable low |
| `tb_aes_mixcol` | Known columns, a FIPS-197 round, 500 random states |
| `tb_aes_round` | FIPS-197 rounds 1 and 10, 300 random rounds, the last-round bypass |
| `tb_aes_genkey` | All ten round keys for 22 keys, the write-enable hold, reset |
| `tb_aes_control` | Every output in every cycle against a model, the latency, the 10-cycle period |
| `tb_aes_cipher` | 82 blocks from idle and back to back, the latency and period |
| `tb_aes_cover` | End to end: FIPS vectors, 60 blocks with a new key each, loaded while busy, and a 94-block CBC message (one 1500-byte Ethernet payload) at 12 cycles per block. Counts each mechanism |

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_cover.sv \
    --top-module tb_aes_cover -o sim
./obj_dir/sim
```

Verilator finds the other modules through `-Irtl`. Every test finishes in
well under a second.
