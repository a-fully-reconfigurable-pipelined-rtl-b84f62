// Shared definitions of the reconfigurable parallel PRBS generator/checker.
//
// The generator is a Fibonacci LFSR run w steps per clock. Polynomial bit k-1
// holds the coefficient of x^k and taps state bit k-1; the order n is the
// position of the highest polynomial bit set, plus one. One serial step shifts
// the state up by one and enters the parity of (polynomial AND state) at bit 0.
//
// Wide XOR gates are built as trees of FAN_IN-input XORs with a register after
// every node, so a tree over N inputs takes xor_depth(N, FAN_IN) cycles. The
// core feedback loop is one such tree plus the core register: core_latency()
// cycles, which is also the number of interleaved states the loop holds and
// the number of states the bootstrap unit preloads.
//
// The bit convention follows the LFSR drawing of the architecture; the helper
// functions and the register selector are this design's own.
package prbs_pkg;

  // Selector of the user-writable parameter registers.
  typedef enum logic [1:0] {
    CFG_POLY  = 2'd0,
    CFG_SEED  = 2'd1,
    CFG_WIDTH = 2'd2
  } cfg_sel_e;

  // Number of registered levels of a FAN_IN-ary XOR tree over n inputs (>= 1).
  function automatic int xor_depth(int n, int fan_in);
    int cnt;
    int d;
    cnt = (n + fan_in - 1) / fan_in;
    d   = 1;
    while (cnt > 1) begin
      cnt = (cnt + fan_in - 1) / fan_in;
      d++;
    end
    return d;
  endfunction

  // Number of signals left after `level` levels of reduction (level 0 = n).
  function automatic int xor_level_width(int n, int fan_in, int level);
    int cnt;
    cnt = n;
    for (int l = 0; l < level; l++) cnt = (cnt + fan_in - 1) / fan_in;
    return cnt;
  endfunction

  // Registers around the core feedback loop: XOR tree plus core register.
  function automatic int core_latency(int max_order, int fan_in);
    return xor_depth(max_order, fan_in) + 1;
  endfunction

endpackage
