// Self-checking test of prbs_gen (MAX_ORDER=16, MAX_WIDTH=32). Each setting
// is written through the register port and started with a reconfig pulse;
// every output word is compared with the serial reference model, out_valid
// must stay high every cycle (one word per clock) and the time from reconfig
// to the first word must be w*LAT + n + DEPTH + 2 cycles. Settings include the
// three PRBS15 polynomials x^15+x+1, x^15+x^4+1, x^15+x^7+1, widths below,
// equal to and above the order, and a reconfiguration while running.
module tb_prbs_gen;
  import prbs_pkg::*;
  import prbs_ref_pkg::*;
  localparam int MO = 16, MW = 32, FI = 4, LAT = 3, D = 2, WW = 6;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n, wr_en, reconfig, ready, out_valid;
  cfg_sel_e      wr_sel;
  logic [MO-1:0] wr_data;
  logic [WW-1:0] width;
  logic [MW-1:0] out_word;

  prbs_gen #(.MAX_ORDER(MO), .MAX_WIDTH(MW), .FAN_IN(FI)) dut (
    .clk, .rst_n, .wr_en, .wr_sel, .wr_data, .reconfig, .ready, .width, .out_valid, .out_word);

  initial begin
    repeat (40000) @(posedge clk);
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

  task automatic run(logic [63:0] p, logic [63:0] s, int w, int nwords);
    prbs_ref      r;
    logic [511:0] e;
    int           cyc, n;
    r = new(p, s);
    n = r.n;
    wr(CFG_POLY, MO'(p)); wr(CFG_SEED, MO'(s)); wr(CFG_WIDTH, MO'(w));
    @(negedge clk); reconfig = 1'b1;
    @(negedge clk); reconfig = 1'b0;
    chk(!out_valid, "valid drops on reconfig");
    cyc = 0;
    while (!out_valid && cyc < 3000) begin @(negedge clk); cyc++; end
    chk(cyc == w * LAT + n + D + 2,
        $sformatf("p=%h w=%0d first word after %0d cycles, expected %0d", p, w, cyc, w * LAT + n + D + 2));
    chk(int'(width) == w, "width output");
    for (int t = 0; t < nwords; t++) begin
      e = r.next_word(w);
      chk(out_valid, $sformatf("p=%h w=%0d valid gap at word %0d", p, w, t));
      chk(out_word === MW'(e), $sformatf("p=%h w=%0d word %0d got %h exp %h", p, w, t, out_word, MW'(e)));
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; reconfig = 1'b0; wr_sel = CFG_POLY; wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    chk(!ready && !out_valid, "no output before the first reconfig");
    run(64'h4002, 64'h7fff, 32, 200);   // x^15 + x^1 + 1
    run(64'h4008, 64'h7fff, 32, 200);   // x^15 + x^4 + 1
    run(64'h4040, 64'h7fff, 32, 200);   // x^15 + x^7 + 1
    run(64'h0060, 64'h007f, 7, 100);    // x^7 + x^6 + 1, width = order
    run(64'h0060, 64'h0001, 32, 100);   // width above order
    run(64'h8016, 64'h1234, 3, 300);    // x^16+x^5+x^3+x^2+1, width below order
    run(64'h0110, 64'h0155, 1, 600);    // x^9+x^5+1, serial
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
