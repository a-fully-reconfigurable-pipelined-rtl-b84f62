// Self-checking test of pipe_xor_tree: random vectors every cycle, output
// compared with the parity of the vector applied DEPTH cycles earlier, for
// three tree shapes (N=32/FAN_IN=4, N=13/FAN_IN=3, N=1/FAN_IN=4). The latency
// is checked against the hand-counted depth.
module tb_pipe_xor_tree;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] in_a, in_b, in_c;
  logic        out_a, out_b, out_c;
  pipe_xor_tree #(.N(32), .FAN_IN(4)) dut_a (.clk, .in (in_a),       .out (out_a));
  pipe_xor_tree #(.N(13), .FAN_IN(3)) dut_b (.clk, .in (in_b[12:0]), .out (out_b));
  pipe_xor_tree #(.N(1),  .FAN_IN(4)) dut_c (.clk, .in (in_c[0]),    .out (out_c));

  localparam int DA = 3, DB = 3, DC = 1;   // counted by hand
  logic [31:0] ha [256], hb [256], hc [256];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut_a.DEPTH != DA || dut_b.DEPTH != DB || dut_c.DEPTH != DC) begin
      failures++;
      $display("FAIL depth %0d %0d %0d", dut_a.DEPTH, dut_b.DEPTH, dut_c.DEPTH);
    end
    for (int t = 0; t < 256; t++) begin
      @(negedge clk);
      if (t >= DA) begin checks++; if (out_a !== ^ha[t-DA]) begin failures++; $display("FAIL a t=%0d", t); end end
      if (t >= DB) begin checks++; if (out_b !== ^hb[t-DB][12:0]) begin failures++; $display("FAIL b t=%0d", t); end end
      if (t >= DC) begin checks++; if (out_c !== hc[t-DC][0]) begin failures++; $display("FAIL c t=%0d", t); end end
      ha[t] = $urandom; hb[t] = $urandom; hc[t] = $urandom;
      in_a = ha[t]; in_b = hb[t]; in_c = hc[t];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
