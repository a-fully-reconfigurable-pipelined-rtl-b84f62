// Self-checking test of prbs_core. The testbench programs the core XOR masks
// for a jump of w*LAT bits (masks derived from the serial reference model),
// preloads LAT consecutive states, and then checks that the core register
// shows every following state of the serial model, one per clock, for
// x^31+x^28+1 at w=8 and x^7+x^6+1 at w=40.
module tb_prbs_core;
  import prbs_ref_pkg::*;
  localparam int MO = 32, FI = 4, LAT = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [MO-1:0] core_taps [MO];
  logic          load;
  logic [MO-1:0] load_state;
  logic [MO-1:0] state;

  prbs_core #(.MAX_ORDER(MO), .FAN_IN(FI)) dut (.clk, .core_taps, .load, .load_state, .state);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [63:0] poly, logic [63:0] seed, int w, int nstates);
    prbs_ref       r;
    logic [511:0]  wd;
    logic [MO-1:0] st [];
    st = new[nstates];
    r = new(poly, seed);
    for (int k = 0; k < MO; k++) core_taps[k] = MO'(mask_core(poly, w * LAT, k));
    for (int t = 0; t < nstates; t++) begin
      st[t] = MO'(r.hist);
      wd = r.next_word(w);
    end
    for (int c = 0; c <= nstates - 1; c++) begin
      @(negedge clk);
      if (c > 0) begin
        checks++;
        if (state !== st[c-1]) begin
          failures++;
          $display("FAIL poly=%h w=%0d state %0d: got %h expected %h", poly, w, c-1, state, st[c-1]);
        end
      end
      load       = (c < LAT);
      load_state = st[c];
    end
  endtask

  initial begin
    checks++;
    if (dut.LAT != LAT) begin failures++; $display("FAIL LAT %0d", dut.LAT); end
    run(64'h4800_0000, 64'h1234_5678, 8, 60);
    run(64'h60, 64'h55, 40, 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
