// Testbench helper: drives one prbs_gen instance through a list of widths
// for one polynomial and seed, and compares every word with the serial
// reference model. Each setting runs NWORDS words; the word stream must be
// uninterrupted (one word per clock). Results are counted in `checks` and
// `failures`; `done` rises when the list is finished.
module prbs_gen_runner #(
  parameter int          MO       = 32,
  parameter int          MW       = 256,
  parameter logic [63:0] POLY     = 64'h4800_0000,
  parameter logic [63:0] SEED     = 64'h1,
  parameter int          NSET     = 1,
  parameter int          WIDTHS [5] = '{256, 0, 0, 0, 0},
  parameter int          NWORDS   = 100
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import prbs_pkg::*;
  import prbs_ref_pkg::*;
  localparam int WW = $clog2(MW + 1);

  logic          wr_en, reconfig, ready, out_valid;
  cfg_sel_e      wr_sel;
  logic [MO-1:0] wr_data;
  logic [WW-1:0] width;
  logic [MW-1:0] out_word;

  prbs_gen #(.MAX_ORDER(MO), .MAX_WIDTH(MW)) dut (
    .clk, .rst_n, .wr_en, .wr_sel, .wr_data, .reconfig, .ready, .width, .out_valid, .out_word);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL order<=%0d %s", MO, what); end
  endtask

  task automatic wr(cfg_sel_e s, logic [MO-1:0] d);
    @(negedge clk); wr_en = 1'b1; wr_sel = s; wr_data = d;
    @(negedge clk); wr_en = 1'b0;
  endtask

  initial begin
    prbs_ref      r;
    logic [511:0] e;
    done = 1'b0; checks = 0; failures = 0;
    wr_en = 1'b0; reconfig = 1'b0; wr_sel = CFG_POLY; wr_data = '0;
    @(posedge rst_n);
    for (int i = 0; i < NSET; i++) begin
      r = new(POLY, SEED);
      wr(CFG_POLY, MO'(POLY)); wr(CFG_SEED, MO'(SEED)); wr(CFG_WIDTH, MO'(WIDTHS[i]));
      @(negedge clk); reconfig = 1'b1;
      @(negedge clk); reconfig = 1'b0;
      while (!out_valid) @(negedge clk);
      for (int t = 0; t < NWORDS; t++) begin
        e = r.next_word(WIDTHS[i]);
        chk(out_valid, $sformatf("w=%0d valid gap at word %0d", WIDTHS[i], t));
        chk(out_word === MW'(e), $sformatf("poly=%h w=%0d word %0d", POLY, WIDTHS[i], t));
        @(negedge clk);
      end
    end
    done = 1'b1;
  end
endmodule
