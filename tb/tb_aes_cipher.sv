// tb_aes_cipher -- self-checking test of the AES-128 core (no input registers).
//
// Plaintext and key are driven straight onto ci_plain / ci_key and held
// until the core has taken them (the LOAD cycle, or ROUND10 when ic_startcip
// is high there); then the next block is put on the inputs at once.  Runs
// the FIPS-197 Appendix B and C.1 vectors and 80 random blocks with random
// keys, with random pauses in ic_startcip so that starts from idle, returns
// to idle and back-to-back blocks all happen.  Every ciphertext is compared
// with the reference model; a block started from idle must be ready 11
// cycles after the cycle in which the start request is first seen, and
// back-to-back blocks must be 10 cycles apart.  ao_ready must never rise
// without an outstanding block.
module tb_aes_cipher;
  import aes_ref_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst, ic_startcip, ao_ready, ao_busy;
  logic [127:0] ci_plain, ci_key, ci_cipherdata;
  int checks = 0, failures = 0;
  int n_idle_start = 0, n_chained = 0, n_to_idle = 0, n_ready = 0;

  aes_cipher dut (.*);

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  blk_t keys [$], pts [$], exp_q [$];
  int   k = 0, cyc = 0, t_req = -1, t_ready = -1;
  logic busy_prev, chained = 1'b0, is_load, advance = 1'b0;

  initial begin

    keys = '{128'h2b7e1516_28aed2a6_abf71588_09cf4f3c, 128'h00010203_04050607_08090a0b_0c0d0e0f};
    pts  = '{128'h3243f6a8_885a308d_313198a2_e0370734, 128'h00112233_44556677_8899aabb_ccddeeff};
    for (int i = 0; i < 80; i++) begin
      keys.push_back({$urandom, $urandom, $urandom, $urandom});
      pts.push_back({$urandom, $urandom, $urandom, $urandom});
    end
    ic_startcip = 1'b0; ci_plain = pts[0]; ci_key = keys[0];
    rst = 1'b0;
    #1 rst = 1'b1;
    #20 rst = 1'b0;
    @(posedge clk); #1;
    busy_prev = ao_busy;
    while (k < pts.size() || exp_q.size() != 0 || ao_busy) begin
      @(posedge clk); #1;
      cyc++;
      // The block taken at the last edge is replaced by the next one.
      if (advance) begin
        if (k < pts.size()) begin ci_plain = pts[k]; ci_key = keys[k]; end
        else begin ci_plain = ~ci_plain; ci_key = ~ci_key; end
        advance = 1'b0;
      end
      // Observe this cycle.
      if (ao_ready) begin
        n_ready++;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL ready with no block outstanding");
        end else begin
          blk_t e;
          e = exp_q.pop_front();
          if (n_ready == 1) check("FIPS-197 Appendix B", ci_cipherdata, 128'h3925841d_02dc09fb_dc118597_196a0b32);
          if (n_ready == 2) check("FIPS-197 Appendix C.1", ci_cipherdata, 128'h69c4e0d8_6a7b0430_d8cdb780_70b4c55a);
          check("ciphertext", ci_cipherdata, e);
        end
        if (t_req >= 0) check("latency from start request", 128'(cyc - t_req), 128'd11);
        else if (chained) check("back-to-back period", 128'(cyc - t_ready), 128'd10);
        t_req = -1;
        t_ready = cyc;
      end
      // Drive this cycle: the first two blocks start from idle only.
      ic_startcip = (k < pts.size()) && (k >= 2 ? $urandom_range(0, 99) >= 5 : !ao_busy);
      if (ic_startcip && !ao_busy && t_req < 0) t_req = cyc;
      is_load = ao_busy && !busy_prev;
      busy_prev = ao_busy;
      chained = 1'b0;
      if (ao_ready) begin
        if (ic_startcip) begin n_chained++; chained = 1'b1; end
        else n_to_idle++;
      end
      if (is_load || (ao_ready && ic_startcip)) begin
        if (is_load) n_idle_start++;
        exp_q.push_back(encrypt(ci_key, ci_plain));
        k++;
        advance = 1'b1;
      end
    end
    $display("blocks=%0d from_idle=%0d back_to_back=%0d back_to_idle=%0d",
             n_ready, n_idle_start, n_chained, n_to_idle);
    checks++;
    if (n_ready != pts.size() || n_idle_start == 0 || n_chained == 0 || n_to_idle == 0) begin
      failures++;
      $display("FAIL a mechanism never happened or blocks are missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
