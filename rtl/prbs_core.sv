// PRBS core: state registers and the core XOR gate array.
//
// The core register holds an LFSR state of up to MAX_ORDER bits: the last n
// bits of the sequence before the word being generated, bit 0 the most
// recent. Each state bit k is recomputed by a dynamic XOR gate whose mask is
// row k of core_taps, so the array applies a run-time GF(2) matrix M to the
// state.
//
// Because the XOR gates are pipelined, the loop register -> XOR tree -> core
// register is LAT = tree depth + 1 cycles long and carries LAT independent
// states at once. The bootstrap unit therefore programs M = A^(w*LAT), where
// A is one serial LFSR step and w the output width, and preloads LAT
// consecutive states (each w bits apart) through `load`. After that the core
// register steps through consecutive states, one per clock, with no
// combinational path longer than one LUT. The checker uses the same load
// path to force states built from received data.
//
// Timing: a state loaded at one edge appears on `state` after it; the array
// result computed from it arrives at the core register LAT cycles later.
// The pipelined loop is the architecture's; the interleaved-state scheme and
// the state convention are this design's reading of it.
module prbs_core #(
  parameter int MAX_ORDER = 32,
  parameter int FAN_IN    = 4,
  localparam int LAT = prbs_pkg::core_latency(MAX_ORDER, FAN_IN)
) (
  input  logic                 clk,
  input  logic [MAX_ORDER-1:0] core_taps [MAX_ORDER],
  input  logic                 load,
  input  logic [MAX_ORDER-1:0] load_state,
  output logic [MAX_ORDER-1:0] state
);

  logic [MAX_ORDER-1:0] next_state;

  for (genvar k = 0; k < MAX_ORDER; k++) begin : g_bit
    dyn_xor #(.N(MAX_ORDER), .FAN_IN(FAN_IN)) u_xor (
      .clk  (clk),
      .in   (state),
      .taps (core_taps[k]),
      .out  (next_state[k])
    );
  end

  always_ff @(posedge clk) begin
    if (load) state <= load_state;
    else      state <= next_state;
  end

endmodule
