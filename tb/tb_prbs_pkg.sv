// Checks the depth and level-width helpers of prbs_pkg against hand-counted
// tree shapes.
module tb_prbs_pkg;
  import prbs_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    chk(xor_depth(32, 4), 3, "depth 32/4");   // 32 -> 8 -> 2 -> 1
    chk(xor_depth(64, 4), 3, "depth 64/4");   // 64 -> 16 -> 4 -> 1
    chk(xor_depth(65, 4), 4, "depth 65/4");
    chk(xor_depth(16, 4), 2, "depth 16/4");
    chk(xor_depth(13, 3), 3, "depth 13/3");   // 13 -> 5 -> 2 -> 1
    chk(xor_depth(1, 4), 1, "depth 1/4");
    chk(xor_depth(32, 6), 2, "depth 32/6");   // 32 -> 6 -> 1
    chk(xor_level_width(32, 4, 0), 32, "lvl0");
    chk(xor_level_width(32, 4, 1), 8, "lvl1");
    chk(xor_level_width(13, 3, 2), 2, "lvl2 13/3");
    chk(core_latency(32, 4), 4, "latency 32/4");
    chk(core_latency(16, 4), 3, "latency 16/4");
    chk(int'(CFG_POLY) != int'(CFG_SEED) && int'(CFG_SEED) != int'(CFG_WIDTH), 1, "selector codes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
