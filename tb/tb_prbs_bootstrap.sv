// Self-checking test of prbs_bootstrap (MAX_ORDER=16, MAX_WIDTH=32, LAT=3).
// For several polynomial/seed/width settings it checks the reconfiguration
// time (w*LAT + n calculation cycles, then LAT preload cycles), the
// initialization sequence against the serial reference model, every mask row
// of both arrays against masks derived from the model, the width and order
// masks, width clamping, and that a second reconfig in mid-calculation
// restarts the unit.
module tb_prbs_bootstrap;
  import prbs_ref_pkg::*;
  localparam int MO = 16, MW = 32, FI = 4, LAT = 3, WW = 6;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n, reconfig;
  logic [MO-1:0] poly, seed;
  logic [WW-1:0] width;
  logic [MO-1:0] core_taps [MO];
  logic [MO-1:0] gen_taps  [MW];
  logic [MW-1:0] width_mask;
  logic [MO-1:0] order_mask;
  logic [WW-1:0] width_q;
  logic          preload, busy, ready;
  logic [MO-1:0] preload_state;

  prbs_bootstrap #(.MAX_ORDER(MO), .MAX_WIDTH(MW), .FAN_IN(FI)) dut (
    .clk, .rst_n, .reconfig, .poly, .seed, .width, .core_taps, .gen_taps, .width_mask,
    .order_mask, .width_q, .preload, .preload_state, .busy, .ready);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(logic [63:0] p, logic [63:0] s, int wset, bit abort_first);
    prbs_ref      r;
    logic [511:0] wd;
    int           w, n, cyc, npre;
    logic [MO-1:0] exp_pre [LAT];
    w = (wset == 0 || wset > MW) ? MW : wset;
    r = new(p, s);
    n = r.n;
    for (int j = 0; j < LAT; j++) begin exp_pre[j] = MO'(r.hist); wd = r.next_word(w); end
    @(negedge clk);
    poly = MO'(p); seed = MO'(s); width = WW'(wset); reconfig = 1'b1;
    if (abort_first) begin
      poly = 16'h0003; width = 6'd7;
      @(negedge clk); reconfig = 1'b0;
      repeat (5) @(negedge clk);
      chk(busy && !ready, "busy during first calculation");
      poly = MO'(p); width = WW'(wset); reconfig = 1'b1;
    end
    @(negedge clk); reconfig = 1'b0;
    cyc = 0; npre = 0;   // edges counted after the one that took reconfig
    while (!ready && cyc < 5000) begin
      if (preload) begin
        chk(preload_state === exp_pre[npre], $sformatf("preload %0d got %h exp %h", npre, preload_state, exp_pre[npre]));
        npre++;
      end
      @(negedge clk); cyc++;
    end
    chk(cyc == w * LAT + n + LAT, $sformatf("reconfig time %0d expected %0d", cyc, w * LAT + n + LAT));
    chk(npre == LAT, $sformatf("preload count %0d", npre));
    chk(int'(width_q) == w, "width_q");
    for (int i = 0; i < MW; i++) chk(width_mask[i] == (i < w), $sformatf("width_mask[%0d]", i));
    for (int k = 0; k < MO; k++) chk(order_mask[k] == (k < n), $sformatf("order_mask[%0d]", k));
    for (int i = 0; i < MW; i++) begin
      logic [MO-1:0] e;
      e = (i < w) ? MO'(mask_gen(p, w, i)) : '0;
      chk(gen_taps[i] === e, $sformatf("p=%h w=%0d gen_taps[%0d] got %h exp %h", p, w, i, gen_taps[i], e));
    end
    for (int k = 0; k < MO; k++) begin
      logic [MO-1:0] e;
      e = (k < n) ? MO'(mask_core(p, w * LAT, k)) : '0;
      chk(core_taps[k] === e, $sformatf("p=%h w=%0d core_taps[%0d] got %h exp %h", p, w, k, core_taps[k], e));
    end
    repeat (3) @(negedge clk);
    chk(ready && !busy && !preload, "ready holds");
  endtask

  initial begin
    rst_n = 1'b0; reconfig = 1'b0; poly = '0; seed = '0; width = '0;
    repeat (3) @(negedge clk);
    chk(!ready && !busy, "idle after reset");
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    chk(!ready && !busy, "waits for reconfig");
    run(64'h6000, 64'h7fff, 32, 0);     // x^15+x^14+1, full width
    run(64'h0060, 64'h0011, 5, 0);      // x^7+x^6+1, width below order
    run(64'h0110, 64'h01aa, 0, 0);      // x^9+x^5+1, width 0 -> clamped
    run(64'h8016, 64'hbeef, 13, 1);     // x^16+x^5+x^3+x^2+1, restarted
    run(64'h0003, 64'h0001, 1, 0);      // x^2+x+1, serial
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
