// Bit sequence generator: XOR gate array and output registers.
//
// Turns the core state into one parallel output word per clock. Output bit i
// is a dynamic XOR gate over the state with mask gen_taps[i]; the bootstrap
// unit fills the masks so that, for width w, out_word[w-1] is the first bit
// of the word in time and out_word[0] the last (the bit order of the parallel
// LFSR drawing). Bits w and above are cleared by width_mask in the output
// registers.
//
// Timing: out_word belongs to the state that was on `state` DEPTH + 1 cycles
// earlier (XOR tree levels plus the output register), one word per cycle.
// The array and output registers are the architecture's; the zeroing of
// unused bits is this design's choice.
module prbs_seqgen #(
  parameter int MAX_ORDER = 32,
  parameter int MAX_WIDTH = 256,
  parameter int FAN_IN    = 4,
  localparam int DEPTH = prbs_pkg::xor_depth(MAX_ORDER, FAN_IN)
) (
  input  logic                 clk,
  input  logic [MAX_ORDER-1:0] state,
  input  logic [MAX_ORDER-1:0] gen_taps [MAX_WIDTH],
  input  logic [MAX_WIDTH-1:0] width_mask,
  output logic [MAX_WIDTH-1:0] out_word
);

  logic [MAX_WIDTH-1:0] bits;

  for (genvar i = 0; i < MAX_WIDTH; i++) begin : g_out
    dyn_xor #(.N(MAX_ORDER), .FAN_IN(FAN_IN)) u_xor (
      .clk  (clk),
      .in   (state),
      .taps (gen_taps[i]),
      .out  (bits[i])
    );
  end

  always_ff @(posedge clk) out_word <= bits & width_mask;

endmodule
