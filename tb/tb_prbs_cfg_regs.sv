// Self-checking test of prbs_cfg_regs: reset values, writes to each
// register through the select/data port, and that a cycle without wr_en
// changes nothing.
module tb_prbs_cfg_regs;
  import prbs_pkg::*;
  localparam int MO = 32, MW = 256, WW = 9;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n, wr_en;
  cfg_sel_e      wr_sel;
  logic [MO-1:0] wr_data, poly, seed;
  logic [WW-1:0] width;

  prbs_cfg_regs #(.MAX_ORDER(MO), .MAX_WIDTH(MW)) dut (.clk, .rst_n, .wr_en, .wr_sel, .wr_data, .poly, .seed, .width);

  initial begin
    repeat (1000) @(posedge clk);
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
    @(negedge clk); wr_en = 1'b0; wr_data = $urandom;
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; wr_sel = CFG_POLY; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(poly == 32'h60 && seed == '1 && width == 9'd256, "reset values");
    wr(CFG_POLY, 32'h4800_0000);
    chk(poly == 32'h4800_0000 && seed == '1 && width == 9'd256, "poly write");
    wr(CFG_SEED, 32'hdead_beef);
    chk(poly == 32'h4800_0000 && seed == 32'hdead_beef && width == 9'd256, "seed write");
    wr(CFG_WIDTH, 32'd40);
    chk(poly == 32'h4800_0000 && seed == 32'hdead_beef && width == 9'd40, "width write");
    repeat (3) @(negedge clk);
    chk(poly == 32'h4800_0000 && seed == 32'hdead_beef && width == 9'd40, "hold without wr_en");
    for (int i = 0; i < 20; i++) begin
      logic [MO-1:0] v;
      v = $urandom;
      wr(CFG_SEED, v);
      chk(seed == v, "random seed write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
