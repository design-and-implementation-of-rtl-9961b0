// tb_aes_round -- self-checking test of the one-round datapath.
//
// The state is presented on iround before a clock edge; after the edge
// omix must equal SubBytes, ShiftRows, (MixColumns unless isel=1) and XOR
// with ikey of that state.  Checks FIPS-197 Appendix B rounds 1 and 10 and
// 300 random (state, key, isel) triples against the reference model, that
// ikey and isel act in the same cycle (combinationally) and that en=0
// keeps the captured state.
module tb_aes_round;
  import aes_ref_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic         en, isel;
  logic [127:0] iround, ikey, omix;
  int checks = 0, failures = 0;

  aes_round dut (.*);

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  function automatic logic [127:0] ref_round(logic [127:0] s, logic [127:0] k, logic last);
    logic [127:0] t = shiftrows(subbytes(s));
    return (last ? t : mixcolumns(t)) ^ k;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] s, k;
    logic         l;
    en = 1'b1; isel = 1'b0; ikey = '0;
    // FIPS-197 Appendix B, round 1.
    @(negedge clk);
    iround = 128'h193de3be_a0f4e22b_9ac68d2a_e9f84808;
    @(posedge clk); #1;
    ikey = 128'ha0fafe17_88542cb1_23a33939_2a6c7605; #1;
    check("FIPS-197 round 1", omix, 128'ha49c7ff2_689f352b_6b5bea43_026a5049);
    // FIPS-197 Appendix B, round 10 (no MixColumns).
    @(negedge clk);
    iround = 128'heb40f21e_592e3884_8ba113e7_1bc342d2;
    @(posedge clk); #1;
    isel = 1'b1;
    ikey = 128'hd014f9a8_c9ee2589_e13f0cc8_b6630ca6; #1;
    check("FIPS-197 round 10", omix, 128'h3925841d_02dc09fb_dc118597_196a0b32);
    // Random rounds.
    for (int n = 0; n < 300; n++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      l = 1'($urandom);
      @(negedge clk);
      iround = s; ikey = k; isel = l;
      @(posedge clk); #1;
      iround = ~s;   // must not matter until the next edge
      #1;
      check("random round", omix, ref_round(s, k, l));
    end
    // en=0 keeps the captured state.
    @(negedge clk); en = 1'b0; iround = 128'h0;
    @(posedge clk); #1;
    check("hold with en=0", omix, ref_round(s, ikey, isel));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
