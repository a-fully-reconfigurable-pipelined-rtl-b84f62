// Runs the generator at the sizes of both resource sweeps of the source
// architecture:
//   * maxOrder 8, 16, 32 and 64, each at maxWidth 256, with a polynomial of
//     the largest order the instance holds, at the full 256-bit width;
//   * maxOrder 32 with output widths 16, 32, 64, 128 and 256, chosen at run
//     time on the default-size generator (PRBS31).
// Every word is compared with the serial reference model and the output must
// deliver one word per clock.
module tb_prbs_size_sweep;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic d8, d16, d32, d64;
  int   c8, c16, c32, c64, f8, f16, f32, f64;

  // x^8+x^6+x^5+x^4+1
  prbs_gen_runner #(.MO(8),  .MW(256), .POLY(64'hb8),   .SEED(64'h5a), .NSET(1), .WIDTHS('{256, 0, 0, 0, 0}))
    u8  (.clk, .rst_n, .done (d8),  .checks (c8),  .failures (f8));
  // x^16+x^15+x^13+x^4+1
  prbs_gen_runner #(.MO(16), .MW(256), .POLY(64'hd008), .SEED(64'hace1), .NSET(1), .WIDTHS('{256, 0, 0, 0, 0}))
    u16 (.clk, .rst_n, .done (d16), .checks (c16), .failures (f16));
  // x^31+x^28+1 at every width of the width sweep
  prbs_gen_runner #(.MO(32), .MW(256), .POLY(64'h4800_0000), .SEED(64'h1357_9bdf), .NSET(5),
                    .WIDTHS('{16, 32, 64, 128, 256}))
    u32 (.clk, .rst_n, .done (d32), .checks (c32), .failures (f32));
  // x^64+x^63+x^61+x^60+1
  prbs_gen_runner #(.MO(64), .MW(256), .POLY(64'hd800_0000_0000_0000), .SEED(64'h0123_4567_89ab_cdef),
                    .NSET(1), .WIDTHS('{256, 0, 0, 0, 0}))
    u64 (.clk, .rst_n, .done (d64), .checks (c64), .failures (f64));

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (d8 && d16 && d32 && d64);
    checks   = c8 + c16 + c32 + c64;
    failures = f8 + f16 + f32 + f64;
    if (c8 == 0 || c16 == 0 || c32 == 0 || c64 == 0) failures++;
    $display("order 8: %0d checks, order 16: %0d, order 32: %0d, order 64: %0d", c8, c16, c32, c64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
