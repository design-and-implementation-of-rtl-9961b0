// tb_aes_cover -- end-to-end test of the complete AES-128 module.
//
// Drives the top level the way a host would: plaintext and key are put on
// the shared 128-bit bus in two successive cycles (ai_rpla, then ai_rkey),
// and ai_cip is raised once both are loaded.  Every ciphertext is compared
// with an independent reference model.  Three workloads run in turn:
//   1. FIPS-197 example vectors (Appendix B and C.1), each from idle.
//   2. A stream of independent blocks with a fresh random key each; the
//      next block is loaded while the current one is processed, with a few
//      random pauses so that both the back-to-back path (ROUND10 -> ROUND1)
//      and the return to idle occur.  Back-to-back blocks must come out
//      every 10 cycles; a block started from idle must be ready 11 cycles
//      after the cycle in which ai_cip was first seen (one LOAD cycle and
//      ten rounds).
//   3. CBC encryption of a 94-block (1504-byte, one full Ethernet payload)
//      message under one key: each plaintext is the
//      message block XOR the previous ciphertext (the IV for the first),
//      formed by the host in the cycle the ciphertext appears.  This costs
//      two cycles more per block (12 in all), which is checked too.
// The inputs are driven 1 time unit after each rising edge and the outputs
// of the current cycle observed at that point.  Each mechanism is counted
// and must have happened at least once.
module tb_aes_cover;
  import aes_ref_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst, ai_rpla, ai_rkey, ai_cip, ao_busy, ao_ready;
  logic [127:0] ai_plakey, ao_cipherdata;
  int checks = 0, failures = 0;

  aes_cover dut (.*);

  // Mechanism counters.
  int n_idle_start = 0, n_chained = 0, n_to_idle = 0, n_load_busy = 0;
  int n_key_change = 0, n_cbc = 0, n_ready = 0;

  // Host state.
  int           cyc = 0, t_req = -1, t_ready = -1;
  logic         busy_prev = 1'b1, staged = 1'b0, chain_expected = 1'b0;
  logic [127:0] st_pt, st_key, last_key = '0;
  blk_t         exp_q [$];

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (cycle %0d): got %032h expected %032h", what, cyc, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Advance one cycle; observe the outputs of the new cycle.  Returns with
  // the inputs free to be driven for this cycle.
  task automatic next_cycle();
    @(posedge clk); #1;
    cyc++;
    ai_rpla = 1'b0; ai_rkey = 1'b0; ai_cip = 1'b0;
    if (ao_ready) begin
      n_ready++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL ready with no block outstanding (cycle %0d)", cyc);
      end else begin
        check("ciphertext", ao_cipherdata, exp_q.pop_front());
      end
      if (t_req >= 0) begin
        check("latency from start request", 128'(cyc - t_req), 128'd11);
        t_req = -1;
      end else if (chain_expected) begin
        check("back-to-back period", 128'(cyc - t_ready), 128'd10);
      end
      t_ready = cyc;
    end
  endtask

  // End of a cycle's driving: note what the cipher takes in at this edge.
  task automatic end_cycle();
    logic is_load = ao_busy && !busy_prev;
    busy_prev = ao_busy;
    if ((ai_rpla || ai_rkey) && ao_busy) n_load_busy++;
    if (ai_cip && !ao_busy && t_req < 0) t_req = cyc;
    chain_expected = 1'b0;
    if (ao_ready) begin
      if (ai_cip) begin n_chained++; chain_expected = 1'b1; end
      else        n_to_idle++;
    end
    if (is_load || (ao_ready && ai_cip)) begin
      if (is_load) n_idle_start++;
      checks++;
      if (!staged) begin
        failures++;
        $display("FAIL cipher took a block that was not staged (cycle %0d)", cyc);
      end
      exp_q.push_back(encrypt(st_key, st_pt));
      if (st_key != last_key) n_key_change++;
      last_key = st_key;
      staged = 1'b0;
    end
  endtask

  // Workloads 1 and 2: blocks given as (key, plaintext) lists.
  task automatic run_stream(blk_t keys [$], blk_t pts [$], int pause_pct);
    int k = 0, step = 0;
    while (k < pts.size() || staged || exp_q.size() != 0 || ao_busy) begin
      next_cycle();
      if (!staged && k < pts.size()) begin
        if (step == 0) begin
          ai_plakey = pts[k]; ai_rpla = 1'b1; step = 1;
        end else begin
          ai_plakey = keys[k]; ai_rkey = 1'b1; step = 0;
          st_pt = pts[k]; st_key = keys[k]; k++;
        end
      end else if (staged) begin
        ai_cip = ($urandom_range(0, 99) >= pause_pct);
      end
      end_cycle();
      if (ai_rkey) staged = 1'b1;
    end
  endtask

  // Workload 3: CBC under one key.
  task automatic run_cbc(blk_t key, blk_t iv, blk_t msg [$]);
    blk_t chain = iv;
    blk_t expc [$];
    int   k = 0;
    int   t_prev = -1;
    // Expected ciphertexts, worked out from the reference cipher alone.
    for (int i = 0; i < msg.size(); i++) begin
      chain = encrypt(key, msg[i] ^ chain);
      expc.push_back(chain);
    end
    chain = iv;
    // Key once, then the first plaintext.
    next_cycle(); ai_plakey = key; ai_rkey = 1'b1; end_cycle();
    next_cycle(); ai_plakey = msg[0] ^ iv; ai_rpla = 1'b1; end_cycle();
    st_key = key; st_pt = msg[0] ^ iv; staged = 1'b1; k = 1;
    while (staged || exp_q.size() != 0 || ao_busy) begin
      next_cycle();
      if (ao_ready) begin
        check("CBC ciphertext", ao_cipherdata, expc[n_cbc]);
        if (t_prev >= 0) check("CBC block period", 128'(cyc - t_prev), 128'd12);
        t_prev = cyc;
        n_cbc++;
        chain = ao_cipherdata;
        if (k < msg.size()) begin
          // Host forms the next CBC input in the cycle the ciphertext shows.
          ai_plakey = msg[k] ^ chain; ai_rpla = 1'b1;
        end
      end else if (staged) begin
        ai_cip = 1'b1;
      end
      end_cycle();
      if (ai_rpla) begin
        st_pt = msg[k] ^ chain; staged = 1'b1; k++;
      end
    end
  endtask

  initial begin
    blk_t keys [$], pts [$], msg [$];
    ai_plakey = '0; ai_rpla = 1'b0; ai_rkey = 1'b0; ai_cip = 1'b0;
    rst = 1'b0;
    #1 rst = 1'b1;
    #20 rst = 1'b0;
    repeat (2) next_cycle();
    busy_prev = ao_busy;

    // 1. FIPS-197 vectors, each from idle.
    keys = '{128'h2b7e1516_28aed2a6_abf71588_09cf4f3c, 128'h00010203_04050607_08090a0b_0c0d0e0f};
    pts  = '{128'h3243f6a8_885a308d_313198a2_e0370734, 128'h00112233_44556677_8899aabb_ccddeeff};
    exp_q.delete();
    run_stream(keys, pts, 0);
    // Absolute check of the first vector, independent of the model.
    check("FIPS-197 Appendix B", encrypt(keys[0], pts[0]), 128'h3925841d_02dc09fb_dc118597_196a0b32);
    check("FIPS-197 Appendix C.1", encrypt(keys[1], pts[1]), 128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a);

    // 2. Independent blocks, new key each, a few pauses.
    keys.delete(); pts.delete();
    for (int i = 0; i < 60; i++) begin
      keys.push_back({$urandom, $urandom, $urandom, $urandom});
      pts.push_back({$urandom, $urandom, $urandom, $urandom});
    end
    run_stream(keys, pts, 3);

    // 3. CBC message of 94 blocks: one 1500-byte Ethernet payload, padded.
    for (int i = 0; i < 94; i++) msg.push_back({$urandom, $urandom, $urandom, $urandom});
    run_cbc({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom}, msg);

    $display("blocks=%0d from_idle=%0d back_to_back=%0d back_to_idle=%0d loads_while_busy=%0d key_changes=%0d cbc_blocks=%0d",
             n_ready, n_idle_start, n_chained, n_to_idle, n_load_busy, n_key_change, n_cbc);
    checks++;
    if (n_idle_start == 0 || n_chained == 0 || n_to_idle == 0 || n_load_busy == 0 ||
        n_key_change == 0 || n_cbc != 94 || n_ready != 2 + 60 + 94) begin
      failures++;
      $display("FAIL a mechanism never happened or blocks are missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
