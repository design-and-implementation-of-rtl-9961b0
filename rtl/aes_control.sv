// aes_control -- 12-state controller of the iterative AES-128 core.
//
// States: START (idle), LOAD, ROUND1 .. ROUND10.
//   START   -> LOAD    when ic_startcip=1, else stays in START
//   LOAD    -> ROUND1  (input block and key are taken in, initial round)
//   ROUNDk  -> ROUNDk+1
//   ROUND10 -> ROUND1  when ic_startcip=1 (next block is taken in during
//                      ROUND10), else START
// So a block takes LOAD plus ten round cycles; blocks started back to back
// leave the core every ten cycles.
//
// All outputs are registered and take, at the clock edge that enters a
// state, the values of that state (a Moore machine with output flops).
// Values per state, from the state diagram:
//   oc_busy    0 in START only, 1 elsewhere
//   oc_selmuxc 1 in LOAD and ROUND10 (take new input data), else 0
//   oc_selmuxg 0 in LOAD and ROUND10 (take the input key), else 1
//   oc_selmuxr 1 in ROUND10 (last round, no MixColumns), else 0
//   oc_ready   1 in ROUND10 (cipher data valid), else 0
//   oc_round   round constant of ROUNDk: 01 02 04 08 10 20 40 80 1B 36;
//              01 in START and LOAD
// After reset (asynchronous, active high) the state is START and the outputs
// hold their reset values: busy=1, ready=0, selmuxc=0, selmuxg=1,
// selmuxr=0, round=01; busy falls at the first clock edge.  The states,
// transitions, per-state outputs and reset values follow the published architecture; the
// defaults for outputs a state does not name are this design's reading.
module aes_control
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  ic_startcip,
  output logic  oc_selmuxc,   // 1 = input data, 0 = fed-back round output
  output logic  oc_selmuxr,   // 1 = last round (ShiftRows bypasses MixColumns)
  output logic  oc_selmuxg,   // 1 = round key, 0 = input key
  output byte_t oc_round,     // round constant for the key expansion
  output logic  oc_busy,
  output logic  oc_ready
);

  ctrl_state_t state, state_nx;

  always_comb begin
    unique case (state)
      ST_START:   state_nx = ic_startcip ? ST_LOAD : ST_START;
      ST_LOAD:    state_nx = ST_ROUND1;
      ST_ROUND10: state_nx = ic_startcip ? ST_ROUND1 : ST_START;
      ST_ROUND1, ST_ROUND2, ST_ROUND3, ST_ROUND4, ST_ROUND5,
      ST_ROUND6, ST_ROUND7, ST_ROUND8, ST_ROUND9:
                  state_nx = ctrl_state_t'(state + 4'd1);
      default:    state_nx = ST_START;
    endcase
  end

  // Round constant printed for each round state.
  function automatic byte_t round_const(ctrl_state_t s);
    case (s)
      ST_ROUND1:  return 8'b0000_0001;
      ST_ROUND2:  return 8'b0000_0010;
      ST_ROUND3:  return 8'b0000_0100;
      ST_ROUND4:  return 8'b0000_1000;
      ST_ROUND5:  return 8'b0001_0000;
      ST_ROUND6:  return 8'b0010_0000;
      ST_ROUND7:  return 8'b0100_0000;
      ST_ROUND8:  return 8'b1000_0000;
      ST_ROUND9:  return 8'b0001_1011;
      ST_ROUND10: return 8'b0011_0110;
      default:    return 8'b0000_0001;
    endcase
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state      <= ST_START;
      oc_selmuxg <= 1'b1;
      oc_selmuxr <= 1'b0;
      oc_selmuxc <= 1'b0;
      oc_round   <= 8'h01;
      oc_busy    <= 1'b1;
      oc_ready   <= 1'b0;
    end else begin
      state      <= state_nx;
      oc_busy    <= (state_nx != ST_START);
      oc_selmuxc <= (state_nx == ST_LOAD) || (state_nx == ST_ROUND10);
      oc_selmuxg <= !((state_nx == ST_LOAD) || (state_nx == ST_ROUND10));
      oc_selmuxr <= (state_nx == ST_ROUND10);
      oc_ready   <= (state_nx == ST_ROUND10);
      oc_round   <= round_const(state_nx);
    end
  end

  // Ready is only ever raised while busy, and only in ROUND10.
  a_ready_busy: assert property (@(posedge clk)
                                 oc_ready |-> (oc_busy && state == ST_ROUND10));

endmodule
