// tb_aes_genkey -- self-checking test of the key expansion.
//
// Loads a cipher key (gi_sel=0), then runs ten cycles with gi_sel=1 and the
// round constants 01..36; in cycle i go_key must be round key i of the
// reference key schedule.  Uses the FIPS-197 Appendix A.1 key (round key
// 10 = d014f9a8c9ee2589e13f0cc8b6630ca6), the Appendix C.1 key and 20
// random keys, checks that gi_wr=0 freezes the register and that reset
// clears it.
module tb_aes_genkey;
  import aes_ref_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst, gi_wr, gi_sel;
  logic [7:0]   gi_round;
  logic [127:0] gi_key, go_key;
  int checks = 0, failures = 0;

  localparam logic [7:0] RCON [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10,
                                       8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  aes_genkey dut (.*);

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

  task automatic expand(logic [127:0] key);
    rk_t rk = round_keys(key);
    @(negedge clk);
    gi_wr = 1'b1; gi_sel = 1'b0; gi_key = key;
    for (int r = 1; r <= 10; r++) begin
      @(negedge clk);
      gi_sel = 1'b1; gi_key = ~key; gi_round = RCON[r-1];
      #1;
      check($sformatf("round key %0d of %032h", r, key), go_key, rk[r]);
    end
  endtask

  initial begin
    logic [127:0] held;
    rst = 1'b0; gi_wr = 1'b0; gi_sel = 1'b0; gi_round = 8'h01; gi_key = '0;
    #1 rst = 1'b1;
    #11 rst = 1'b0;
    expand(128'h2b7e1516_28aed2a6_abf71588_09cf4f3c);
    check("FIPS-197 A.1 round key 10", go_key, 128'hd014f9a8_c9ee2589_e13f0cc8_b6630ca6);
    expand(128'h00010203_04050607_08090a0b_0c0d0e0f);
    check("FIPS-197 C.1 round key 10", go_key, 128'h13111d7f_e3944a17_f307a78b_4d2b30c5);
    for (int n = 0; n < 20; n++) expand({$urandom, $urandom, $urandom, $urandom});
    // Write enable low: the register and S-box reads hold.
    held = go_key;
    gi_wr = 1'b0;
    @(negedge clk); @(negedge clk);
    check("hold with gi_wr=0", go_key, held);
    // Asynchronous reset clears the key register at once.
    rst = 1'b1; #1;
    checks++;
    if (dut.trkey !== '0) begin
      failures++;
      $display("FAIL reset did not clear the key register");
    end
    rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
