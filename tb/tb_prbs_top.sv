// End-to-end test of prbs_top at reduced size (MAX_ORDER=16, MAX_WIDTH=32):
// the generator output is looped back into the checker with injected bit
// errors. Phases:
//   1. x^15+x^14+1 at width 32 on both sides: every transmitted word is
//      compared with the serial reference model, the checker must lock, and
//      the counters must show exactly the injected bit errors and checked
//      bits.
//   2. The generator alone is switched on the fly to x^15+x+1: the checker
//      must lose lock; then the checker is switched too and must lock again.
//   3. Both switch to x^16+x^5+x^3+x^2+1 at width 5 (below the order).
// Each mechanism (reconfiguration, core preload, width change, lock, error
// detection, loss of lock) is counted, and one that never happened is a
// failure.
module tb_prbs_top;
  import prbs_pkg::*;
  import prbs_ref_pkg::*;
  localparam int MO = 16, MW = 32, WW = $clog2(MW + 1);
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n;
  logic          tx_wr_en, tx_reconfig, tx_ready, tx_valid;
  cfg_sel_e      tx_wr_sel;
  logic [MO-1:0] tx_wr_data;
  logic [WW-1:0] tx_width;
  logic [MW-1:0] tx_word;
  logic          rx_wr_en, rx_reconfig, rx_ready, rx_valid, rx_synced, rx_err_valid;
  cfg_sel_e      rx_wr_sel;
  logic [MO-1:0] rx_wr_data;
  logic [MW-1:0] rx_word, rx_err_word, inj;
  logic          stats_clear;
  logic [47:0]   stat_bits, stat_err_bits, stat_err_words, stat_sync_losses;

  prbs_top #(.MAX_ORDER(MO), .MAX_WIDTH(MW)) dut (.*);

  // Loop-back channel with error injection. Like a real link, it delivers a
  // word every cycle once the generator has started, whatever is sent.
  logic link_up;
  always_ff @(posedge clk) if (!rst_n) link_up <= 1'b0; else if (tx_valid) link_up <= 1'b1;
  assign rx_valid = tx_valid || link_up;
  assign rx_word  = tx_word ^ inj;

  // Mechanism counters.
  int n_reconfig = 0, n_preload = 0, n_width_change = 0, n_lock = 0, n_err = 0, n_loss = 0;
  logic prev_pre = 1'b0, prev_sync = 1'b0;
  logic [WW-1:0] prev_width = '0;
  always @(posedge clk) if (rst_n) begin
    if (tx_reconfig) n_reconfig++;
    if (dut.u_gen.preload && !prev_pre) n_preload++;
    if (rx_synced && !prev_sync) n_lock++;
    if (rx_err_valid && rx_err_word != '0) n_err++;
    if (dut.u_chk.sync_lost) n_loss++;
    if (tx_ready && tx_width != prev_width) begin
      if (prev_width != '0) n_width_change++;
      prev_width <= tx_width;
    end
    prev_pre  <= dut.u_gen.preload;
    prev_sync <= rx_synced;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cfg(bit tx, cfg_sel_e s, logic [MO-1:0] d);
    @(negedge clk);
    if (tx) begin tx_wr_en = 1'b1; tx_wr_sel = s; tx_wr_data = d; end
    else    begin rx_wr_en = 1'b1; rx_wr_sel = s; rx_wr_data = d; end
    @(negedge clk); tx_wr_en = 1'b0; rx_wr_en = 1'b0;
  endtask

  task automatic setup(bit tx, bit rx, logic [63:0] p, logic [63:0] s, int w);
    if (tx) begin cfg(1, CFG_POLY, MO'(p)); cfg(1, CFG_SEED, MO'(s)); cfg(1, CFG_WIDTH, MO'(w)); end
    if (rx) begin cfg(0, CFG_POLY, MO'(p)); cfg(0, CFG_WIDTH, MO'(w)); end
    @(negedge clk); tx_reconfig = tx; rx_reconfig = rx;
    @(negedge clk); tx_reconfig = 1'b0; rx_reconfig = 1'b0;
  endtask

  // Runs nwords transmitted words, checking them against the model and
  // injecting one bit error every `gap` words while the checker is locked.
  task automatic stream(logic [63:0] p, logic [63:0] s, int w, int nwords, int gap, output int injected);
    prbs_ref      r;
    logic [511:0] e;
    r = new(p, s);
    injected = 0;
    while (!tx_valid) @(negedge clk);
    for (int t = 0; t < nwords; t++) begin
      e = r.next_word(w);
      chk(tx_valid, $sformatf("tx valid gap at word %0d", t));
      chk(tx_word === MW'(e), $sformatf("p=%h w=%0d tx word %0d got %h exp %h", p, w, t, tx_word, MW'(e)));
      if (gap > 0 && rx_synced && (t % gap) == 0 && t < nwords - 20) begin
        inj = MW'(1) << ($urandom % w);
        injected++;
      end else begin
        inj = '0;
      end
      @(negedge clk);
    end
    inj = '0;
  endtask

  int injected, losses0;

  initial begin
    rst_n = 1'b0; tx_wr_en = 1'b0; rx_wr_en = 1'b0; tx_reconfig = 1'b0; rx_reconfig = 1'b0;
    tx_wr_sel = CFG_POLY; rx_wr_sel = CFG_POLY; tx_wr_data = '0; rx_wr_data = '0;
    inj = '0; stats_clear = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Phase 1
    setup(1, 1, 64'h6000, 64'h2bcd, 32);
    stream(64'h6000, 64'h2bcd, 32, 400, 17, injected);
    chk(rx_synced, "phase 1 locked");
    repeat (8) @(negedge clk);
    chk(stat_err_bits == 48'(injected), $sformatf("error bits %0d injected %0d", stat_err_bits, injected));
    chk(stat_err_words == 48'(injected), "errored words");
    chk(stat_bits > 0 && stat_bits % 32 == 0 && stat_bits <= 48'(400 * 32), $sformatf("checked bits %0d", stat_bits));
    chk(stat_sync_losses == 0, "no loss in phase 1");

    // Phase 2: generator changes polynomial, checker does not.
    losses0 = int'(stat_sync_losses);
    setup(1, 0, 64'h4002, 64'h7fff, 32);
    stream(64'h4002, 64'h7fff, 32, 60, 0, injected);
    chk(!rx_synced && int'(stat_sync_losses) == losses0 + 1, "checker loses lock on polynomial change");
    setup(0, 1, 64'h4002, 64'h0, 32);
    while (!rx_ready) @(negedge clk);
    repeat (150) @(negedge clk);
    chk(rx_synced, "checker relocks after its own reconfiguration");

    // Phase 3: both change polynomial and width.
    setup(1, 1, 64'h8016, 64'h00ff, 5);
    stats_clear = 1'b1;
    @(negedge clk); stats_clear = 1'b0;
    stream(64'h8016, 64'h00ff, 5, 400, 23, injected);
    chk(rx_synced, "phase 3 locked");
    repeat (8) @(negedge clk);
    chk(stat_err_bits == 48'(injected), $sformatf("phase 3 error bits %0d injected %0d", stat_err_bits, injected));
    chk(stat_bits % 5 == 0 && stat_bits > 0, "phase 3 bits counted per 5-bit word");

    chk(n_reconfig >= 3, $sformatf("reconfigurations: %0d", n_reconfig));
    chk(n_preload >= 3, $sformatf("core preloads: %0d", n_preload));
    chk(n_width_change >= 1, $sformatf("width changes: %0d", n_width_change));
    chk(n_lock >= 3, $sformatf("locks: %0d", n_lock));
    chk(n_err >= 2, $sformatf("error words reported: %0d", n_err));
    chk(n_loss >= 1, $sformatf("losses of lock: %0d", n_loss));
    $display("mechanisms: reconfig=%0d preload=%0d width_change=%0d lock=%0d err_words=%0d loss=%0d",
             n_reconfig, n_preload, n_width_change, n_lock, n_err, n_loss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
