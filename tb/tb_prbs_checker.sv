// Self-checking test of prbs_checker (MAX_ORDER=16, MAX_WIDTH=32, DEPTH=2).
// A continuous stream from the serial reference model, started at an
// arbitrary point, is fed in. Checked: lock is acquired without a seed
// within a bounded time; with no injected errors every error word is zero;
// single injected bit errors come out at exactly that bit, DEPTH+3 cycles
// after the word entered, and do not break the lock; a jump to an unrelated
// part of the sequence loses the lock (one sync_lost pulse) and the checker
// locks again; an all-zero input never locks. Run for widths above, equal
// to and below the order.
module tb_prbs_checker;
  import prbs_pkg::*;
  import prbs_ref_pkg::*;
  localparam int MO = 16, MW = 32, FI = 4, D = 2, LAG = D + 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n, wr_en, reconfig, ready, rx_valid, synced, err_valid, sync_lost;
  cfg_sel_e      wr_sel;
  logic [MO-1:0] wr_data;
  logic [5:0]    width;
  logic [MW-1:0] rx_word, err_word;
  int            nlost;

  prbs_checker #(.MAX_ORDER(MO), .MAX_WIDTH(MW), .FAN_IN(FI)) dut (
    .clk, .rst_n, .wr_en, .wr_sel, .wr_data, .reconfig, .ready, .width,
    .rx_valid, .rx_word, .synced, .err_valid, .err_word, .sync_lost);

  always @(posedge clk) if (rst_n && sync_lost) nlost++;

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

  task automatic wr(cfg_sel_e s, logic [MO-1:0] d);
    @(negedge clk); wr_en = 1'b1; wr_sel = s; wr_data = d;
    @(negedge clk); wr_en = 1'b0;
  endtask

  // Streams nwords words; inj[t] is XORed into word t. Returns the cycle
  // (word index) at which synced was first seen and checks error words.
  task automatic run(logic [63:0] p, int w);
    prbs_ref       r;
    logic [511:0]  e;
    logic [MW-1:0] inj [];
    int            nw, lock_at, relock_at, jump_at, lost0, nerr_seen;
    nw = 900;
    inj = new[nw];
    foreach (inj[i]) inj[i] = '0;
    r = new(p, 64'($urandom) | 64'h1);
    wr(CFG_POLY, MO'(p)); wr(CFG_WIDTH, MO'(w));
    @(negedge clk); reconfig = 1'b1;
    @(negedge clk); reconfig = 1'b0;
    while (!ready) @(negedge clk);
    // Errors at known places once locked; a jump in the sequence at word 500.
    inj[200] = MW'(1) << (w - 1);
    inj[260] = MW'(1);
    inj[320] = MW'(1) << (w / 2);
    jump_at  = 500;
    lock_at = -1; relock_at = -1; lost0 = nlost; nerr_seen = 0;
    for (int c = 0; c < nw + LAG; c++) begin
      @(negedge clk);
      if (c >= LAG) begin
        int t;
        t = c - LAG;
        if (synced && lock_at < 0) lock_at = t;
        if (synced && nlost > lost0 && relock_at < 0) relock_at = t;
        if (err_valid && t < jump_at) begin
          chk(err_word === inj[t], $sformatf("w=%0d word %0d err %h exp %h", w, t, err_word, inj[t]));
          if (err_word != 0) nerr_seen++;
        end
        if (err_valid && relock_at >= 0 && t > relock_at) chk(err_word == '0, $sformatf("w=%0d clean after relock %0d", w, t));
      end
      if (c < nw) begin
        if (c == jump_at) r = new(p, 64'($urandom) | 64'h1);
        e = r.next_word(w);
        rx_valid = 1'b1;
        rx_word  = MW'(e) ^ inj[c];
      end else begin
        rx_valid = 1'b0;
      end
    end
    chk(lock_at >= 0 && lock_at < 100, $sformatf("w=%0d locked at word %0d", w, lock_at));
    chk(nerr_seen == 3, $sformatf("w=%0d saw %0d injected errors", w, nerr_seen));
    chk(nlost - lost0 == 1, $sformatf("w=%0d lost %0d times", w, nlost - lost0));
    chk(relock_at > jump_at && relock_at < jump_at + 150, $sformatf("w=%0d relocked at %0d", w, relock_at));
    @(negedge clk);
    chk(!synced, "rx_valid low drops the lock");
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; reconfig = 1'b0; wr_sel = CFG_POLY; wr_data = '0;
    rx_valid = 1'b0; rx_word = '0; nlost = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(64'h6000, 32);   // x^15+x^14+1, width above order
    run(64'h8016, 16);   // x^16+x^5+x^3+x^2+1, width = order
    run(64'h4002, 5);    // x^15+x+1, width below order
    // An idle (all-zero) link must not be taken for a sequence.
    for (int c = 0; c < 200; c++) begin
      @(negedge clk); rx_valid = 1'b1; rx_word = '0;
      chk(!synced, $sformatf("no lock on all-zero input, cycle %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
