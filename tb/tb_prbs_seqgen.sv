// Self-checking test of prbs_seqgen. The core state sequence of the serial
// reference model is applied one state per clock with masks derived from the
// model; every output word must equal the model's word DEPTH+1 cycles later,
// with bits above the width cleared. Widths 64 (full) and 20, orders 31 and 15.
module tb_prbs_seqgen;
  import prbs_ref_pkg::*;
  localparam int MO = 32, MW = 64, FI = 4, D = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [MO-1:0] state;
  logic [MO-1:0] gen_taps [MW];
  logic [MW-1:0] width_mask;
  logic [MW-1:0] out_word;

  prbs_seqgen #(.MAX_ORDER(MO), .MAX_WIDTH(MW), .FAN_IN(FI)) dut (.clk, .state, .gen_taps, .width_mask, .out_word);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [63:0] poly, logic [63:0] seed, int w, int nwords);
    prbs_ref       r;
    logic [MW-1:0] words [];
    logic [MO-1:0] st [];
    logic [511:0]  wd;
    words = new[nwords];
    st    = new[nwords];
    r = new(poly, seed);
    for (int i = 0; i < MW; i++) gen_taps[i] = (i < w) ? MO'(mask_gen(poly, w, i)) : '0;
    for (int i = 0; i < MW; i++) width_mask[i] = (i < w);
    for (int t = 0; t < nwords; t++) begin
      st[t]    = MO'(r.hist);
      wd       = r.next_word(w);
      words[t] = MW'(wd);
    end
    for (int c = 0; c < nwords + D + 1; c++) begin
      @(negedge clk);
      if (c >= D + 1) begin
        checks++;
        if (out_word !== words[c-D-1]) begin
          failures++;
          $display("FAIL w=%0d word %0d: got %h expected %h", w, c-D-1, out_word, words[c-D-1]);
        end
      end
      if (c < nwords) state = st[c];
    end
  endtask

  initial begin
    run(64'h4800_0000, 64'h7fff_ffff, 64, 50);
    run(64'h6000, 64'h0001, 20, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
