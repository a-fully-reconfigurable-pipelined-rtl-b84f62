// Self-checking test of prbs_sync_fsm (LOCK 4, VERIFY 3, UNLOCK 4): locking
// after four clean words and not after three, failed verification, isolated
// errors that keep the lock, loss after four consecutive bad words with a
// single lost pulse, and reset to hunting on enable or valid low.
module tb_prbs_sync_fsm;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, enable, err_valid, err_zero, sync, locked, lost;
  int   nlost = 0;

  prbs_sync_fsm #(.LOCK_WORDS(4), .VERIFY_WORDS(3), .UNLOCK_WORDS(4)) dut (
    .clk, .rst_n, .enable, .err_valid, .err_zero, .sync, .locked, .lost);

  always @(posedge clk) if (rst_n && lost) nlost++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (sync=%b locked=%b)", what, sync, locked); end
  endtask

  // Apply one word's zero-test result for one cycle.
  task automatic word(logic zero);
    @(negedge clk); err_valid = 1'b1; err_zero = zero;
  endtask

  initial begin
    rst_n = 1'b0; enable = 1'b0; err_valid = 1'b0; err_zero = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1; enable = 1'b1;
    @(negedge clk);
    chk(!sync && !locked, "hunting after reset");
    word(1); word(1); word(1); word(0);
    @(negedge clk); err_valid = 1'b0;
    chk(!sync, "three clean words are not enough");
    word(1); word(1); word(1); word(1);
    @(negedge clk);
    chk(sync && !locked, "verify after four clean words");
    err_valid = 1'b1; err_zero = 1'b0;         // error during verification
    @(negedge clk);
    chk(!sync && !locked, "verification error returns to hunt");
    repeat (4) word(1);
    repeat (3) word(1);
    @(negedge clk); err_zero = 1'b1;
    chk(sync && locked, "locked after verification");
    word(0); word(1); word(0); word(0); word(0); word(1);
    @(negedge clk);
    chk(locked && nlost == 0, "isolated errors keep the lock");
    word(0); word(0); word(0); word(0);
    @(negedge clk);
    chk(!sync && !locked, "lost after four bad words");
    @(negedge clk);
    chk(nlost == 1, $sformatf("one lost pulse, saw %0d", nlost));
    repeat (7) word(1);
    @(negedge clk);
    chk(locked, "relocked");
    enable = 1'b0;
    @(negedge clk); enable = 1'b1;
    chk(!sync, "enable low forces hunt");
    repeat (7) word(1);
    @(negedge clk);
    chk(locked, "relocked again");
    err_valid = 1'b0;
    @(negedge clk);
    chk(!sync && nlost == 1, "invalid word forces hunt without lost pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
