// Self-checking test of dyn_xor: random inputs and random masks every cycle
// (plus all-zero and all-one masks); the output must equal the parity of
// (inputs AND mask) applied DEPTH cycles earlier.
module tb_dyn_xor;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] in, taps;
  logic        out;
  dyn_xor #(.N(32), .FAN_IN(4)) dut (.clk, .in, .taps, .out);

  localparam int D = 3;
  logic [31:0] hi [300], hm [300];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      if (t >= D) begin
        checks++;
        if (out !== ^(hi[t-D] & hm[t-D])) begin
          failures++;
          $display("FAIL t=%0d in=%h taps=%h out=%b", t-D, hi[t-D], hm[t-D], out);
        end
      end
      hi[t] = $urandom;
      hm[t] = (t < 20) ? 32'h0 : (t < 40) ? 32'hffff_ffff : $urandom;
      in = hi[t]; taps = hm[t];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
