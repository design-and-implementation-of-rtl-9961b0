// tb_aes_control -- self-checking test of the 12-state controller.
//
// A behavioural model in the testbench tracks the state as a number
// (0 = START, 1 = LOAD, 2..11 = ROUND1..ROUND10) and gives the expected
// registered outputs after each clock edge.  The stimulus toggles
// ic_startcip randomly, so that the idle wait, a single block and runs of
// back-to-back blocks (ROUND10 -> ROUND1) all occur.  Checks the reset
// values, every output in every cycle, the latency (ready rises ten clock
// edges after the edge that sees the start request: LOAD plus ten rounds) and the 10-cycle period of back-to-back blocks.
module tb_aes_control;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst, ic_startcip;
  logic       oc_selmuxc, oc_selmuxr, oc_selmuxg, oc_busy, oc_ready;
  logic [7:0] oc_round;
  int checks = 0, failures = 0;
  int n_single = 0, n_chained = 0, n_idle = 0;

  aes_control dut (.*);

  localparam logic [7:0] RCON [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10,
                                       8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0h expected %0h", what, $time, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ph, ph_nx, cyc, t_start, t_ready_last;
    logic run;
    rst = 1'b0; ic_startcip = 1'b0;
    #1 rst = 1'b1;
    #2;
    check("reset busy",    32'(oc_busy),    1);
    check("reset ready",   32'(oc_ready),   0);
    check("reset selmuxc", 32'(oc_selmuxc), 0);
    check("reset selmuxg", 32'(oc_selmuxg), 1);
    check("reset selmuxr", 32'(oc_selmuxr), 0);
    check("reset round",   32'(oc_round), 32'h01);
    #8 rst = 1'b0;
    ph = 0; cyc = 0; t_start = -1; t_ready_last = -1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      // Long idle stretches and long runs: change the request rarely.
      if ($urandom_range(0, 29) == 0) run = ~run;
      ic_startcip = run;
      @(posedge clk);
      cyc++;
      case (ph)
        0:  ph_nx = ic_startcip ? 1 : 0;
        11: ph_nx = ic_startcip ? 2 : 0;
        default: ph_nx = ph + 1;
      endcase
      if (ph == 0 && ic_startcip) t_start = cyc;
      if (ph == 0 && !ic_startcip) n_idle++;
      if (ph == 11 && ic_startcip) n_chained++;
      ph = ph_nx;
      #1;
      check("busy",    oc_busy,    ph != 0);
      check("selmuxc", oc_selmuxc, ph == 1 || ph == 11);
      check("selmuxg", oc_selmuxg, !(ph == 1 || ph == 11));
      check("selmuxr", oc_selmuxr, ph == 11);
      check("ready",   oc_ready,   ph == 11);
      check("round",   oc_round,   (ph >= 2) ? RCON[ph-2] : 8'h01);
      if (oc_ready) begin
        if (t_start >= 0) begin
          check("latency start->ready", cyc - t_start, 10);
          n_single++;
          t_start = -1;
        end else begin
          check("back-to-back period", cyc - t_ready_last, 10);
        end
        t_ready_last = cyc;
      end
    end
    checks++;
    if (n_single == 0 || n_chained == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL coverage: single=%0d chained=%0d idle=%0d", n_single, n_chained, n_idle);
    end
    $display("blocks started from idle=%0d chained=%0d idle cycles=%0d", n_single, n_chained, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
