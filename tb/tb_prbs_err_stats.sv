// Self-checking test of prbs_err_stats: random error words with random valid,
// counted independently in the testbench; loss pulses; clear; and the
// saturation of a narrow counter.
module tb_prbs_err_stats;
  localparam int MW = 64, WW = 7;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n, clear, err_valid, sync_lost;
  logic [MW-1:0] err_word;
  logic [WW-1:0] width;
  logic [47:0]   bit_count, err_bits, err_words, loss_count;
  logic [5:0]    s_bits, s_err, s_words, s_loss;

  prbs_err_stats #(.MAX_WIDTH(MW), .CNT_W(48)) dut (
    .clk, .rst_n, .clear, .err_valid, .err_word, .width, .sync_lost,
    .bit_count, .err_bits, .err_words, .loss_count);
  prbs_err_stats #(.MAX_WIDTH(MW), .CNT_W(6)) dut_sat (
    .clk, .rst_n, .clear, .err_valid, .err_word, .width, .sync_lost,
    .bit_count (s_bits), .err_bits (s_err), .err_words (s_words), .loss_count (s_loss));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  longint eb, ee, ew, el;

  initial begin
    rst_n = 1'b0; clear = 1'b0; err_valid = 1'b0; sync_lost = 1'b0; err_word = '0; width = 7'd48;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    eb = 0; ee = 0; ew = 0; el = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      err_valid = ($urandom % 4) != 0;
      sync_lost = ($urandom % 16) == 0;
      case ($urandom % 3)
        0: err_word = '0;
        1: err_word = MW'(1) << ($urandom % 48);
        default: err_word = {$urandom, $urandom} & 64'h0000_ffff_ffff_ffff;
      endcase
      if (err_valid) begin
        eb += 48;
        ee += $countones(err_word);
        if (err_word != 0) ew++;
      end
      if (sync_lost) el++;
    end
    @(negedge clk); err_valid = 1'b0; sync_lost = 1'b0;
    chk(bit_count == 48'(eb), $sformatf("bits %0d exp %0d", bit_count, eb));
    chk(err_bits == 48'(ee), $sformatf("err bits %0d exp %0d", err_bits, ee));
    chk(err_words == 48'(ew), $sformatf("err words %0d exp %0d", err_words, ew));
    chk(loss_count == 48'(el), $sformatf("losses %0d exp %0d", loss_count, el));
    chk(s_bits == 6'h3f && s_err == 6'h3f, "narrow counters saturate");
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    chk(bit_count == 0 && err_bits == 0 && err_words == 0 && loss_count == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
