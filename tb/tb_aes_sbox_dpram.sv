// tb_aes_sbox_dpram -- self-checking test of the dual-port S-box ROM.
//
// Reads all 256 entries through port a (ascending) and port b (descending)
// at the same time and compares each with the reference S-box, which is
// computed by inverse search and affine transform.  Also checks three
// values printed in FIPS-197, the one-cycle read latency and that a port
// with en=0 keeps its last output.
module tb_aes_sbox_dpram;
  import aes_ref_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic       en_a, en_b;
  logic [7:0] addr_a, addr_b, dout_a, dout_b;
  int checks = 0, failures = 0;

  aes_sbox_dpram dut (.*);

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] held;
    en_a = 1'b1; en_b = 1'b1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      addr_a = 8'(i);
      addr_b = 8'(255 - i);
      @(posedge clk); #1;
      check($sformatf("port a addr %02h", i),       dout_a, sbox(8'(i)));
      check($sformatf("port b addr %02h", 255 - i), dout_b, sbox(8'(255 - i)));
    end
    // Values printed in the FIPS-197 S-box table.
    @(negedge clk); addr_a = 8'h00; addr_b = 8'h53;
    @(posedge clk); #1;
    check("sbox[00]", dout_a, 8'h63);
    check("sbox[53]", dout_b, 8'hed);
    @(negedge clk); addr_a = 8'hff;
    // Before the edge the old value is still there (registered read).
    check("registered read", dout_a, 8'h63);
    @(posedge clk); #1;
    check("sbox[ff]", dout_a, 8'h16);
    // Disabled port holds.
    held = dout_b;
    @(negedge clk); en_b = 1'b0; addr_b = 8'h10;
    @(posedge clk); #1;
    check("hold with en_b=0", dout_b, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
