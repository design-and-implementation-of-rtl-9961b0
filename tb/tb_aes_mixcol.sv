// tb_aes_mixcol -- self-checking test of the MixColumns block.
//
// Checks the MixColumns example columns of FIPS-197 / the AES proposal
// (db135345 -> 8e4da1bc, f20a225c -> 9fdc589d, c6c6c6c6 -> c6c6c6c6,
// d4d4d4d5 -> d5d5d7d6), a full FIPS-197 Appendix B state, and 500
// random states against a reference built from a general GF(2^8)
// multiplier.
module tb_aes_mixcol;
  import aes_ref_pkg::*;

  logic [127:0] imix, omix;
  int checks = 0, failures = 0;

  aes_mixcol dut (.imix(imix), .omix(omix));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    imix = 128'hdb135345_f20a225c_c6c6c6c6_d4d4d4d5; #1;
    check("known columns", omix, 128'h8e4da1bc_9fdc589d_c6c6c6c6_d5d5d7d6);
    // FIPS-197 Appendix B, round 1: after ShiftRows -> after MixColumns.
    imix = 128'hd4bf5d30_e0b452ae_b84111f1_1e2798e5; #1;
    check("FIPS-197 round 1", omix, 128'h046681e5_e0cb199a_48f8d37a_2806264c);
    for (int n = 0; n < 500; n++) begin
      imix = {$urandom, $urandom, $urandom, $urandom}; #1;
      check("random", omix, mixcolumns(imix));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
