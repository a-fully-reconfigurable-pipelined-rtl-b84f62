// Fully reconfigurable parallel PRBS generator.
//
// Produces a pseudo-random binary sequence of any order up to MAX_ORDER, any
// polynomial and any width up to MAX_WIDTH bits per clock, all chosen at run
// time: write the polynomial, seed and width registers, pulse `reconfig`, and
// after the bootstrap has finished a new word leaves every clock.
//
// Inside: parameter registers -> bootstrap unit -> (tap masks, initialization
// sequence) -> core (state registers with a pipelined dynamic-XOR feedback
// array) -> bit sequence generator (dynamic-XOR array per output bit) ->
// output registers. Every XOR is a registered tree, so the clock rate does not
// fall as order or width grow.
//
// Interface: out_word[w-1] is the first bit of a word in time, bits above w-1
// are zero. The stream continues the seed: the seed plays the part of the n
// bits sent just before the first word. out_valid is high for every word from
// the first one on until the next reconfig.
// Timing: after the clock edge that takes the reconfig pulse, the bootstrap
// computes for w*LAT + n cycles and preloads for LAT cycles; the first valid
// word appears w*LAT + n + DEPTH + 2 cycles after that edge (DEPTH is the XOR
// tree depth, LAT = DEPTH + 1; 4 and 3 at the default sizes).
// The block structure is the architecture's; the timing and state convention
// are this design's.
module prbs_gen #(
  parameter int MAX_ORDER = 32,
  parameter int MAX_WIDTH = 256,
  parameter int FAN_IN    = 4,
  localparam int WW    = $clog2(MAX_WIDTH + 1),
  localparam int DEPTH = prbs_pkg::xor_depth(MAX_ORDER, FAN_IN)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  prbs_pkg::cfg_sel_e   wr_sel,
  input  logic [MAX_ORDER-1:0] wr_data,
  input  logic                 reconfig,
  output logic                 ready,
  output logic [WW-1:0]        width,
  output logic                 out_valid,
  output logic [MAX_WIDTH-1:0] out_word
);

  logic [MAX_ORDER-1:0] poly;
  logic [MAX_ORDER-1:0] seed;
  logic [WW-1:0]        width_reg;
  logic [MAX_ORDER-1:0] core_taps [MAX_ORDER];
  logic [MAX_ORDER-1:0] gen_taps  [MAX_WIDTH];
  logic [MAX_WIDTH-1:0] width_mask;
  logic [MAX_ORDER-1:0] order_mask;
  logic                 preload;
  logic [MAX_ORDER-1:0] preload_state;
  logic                 busy;
  logic [MAX_ORDER-1:0] state;

  prbs_cfg_regs #(.MAX_ORDER(MAX_ORDER), .MAX_WIDTH(MAX_WIDTH)) u_regs (
    .clk, .rst_n, .wr_en, .wr_sel, .wr_data,
    .poly, .seed, .width (width_reg)
  );

  prbs_bootstrap #(.MAX_ORDER(MAX_ORDER), .MAX_WIDTH(MAX_WIDTH), .FAN_IN(FAN_IN)) u_boot (
    .clk, .rst_n, .reconfig, .poly, .seed, .width (width_reg),
    .core_taps, .gen_taps, .width_mask, .order_mask, .width_q (width),
    .preload, .preload_state, .busy, .ready
  );

  prbs_core #(.MAX_ORDER(MAX_ORDER), .FAN_IN(FAN_IN)) u_core (
    .clk, .core_taps, .load (preload), .load_state (preload_state), .state
  );

  prbs_seqgen #(.MAX_ORDER(MAX_ORDER), .MAX_WIDTH(MAX_WIDTH), .FAN_IN(FAN_IN)) u_seq (
    .clk, .state, .gen_taps, .width_mask, .out_word
  );

  // Validity of the core register contents, followed through the sequence
  // generator (DEPTH tree levels + output register).
  logic             core_valid;
  logic [DEPTH:0]   vpipe;

  always_ff @(posedge clk) begin
    if (!rst_n || reconfig) begin
      core_valid <= 1'b0;
      vpipe      <= '0;
    end else begin
      core_valid <= preload || (core_valid && ready);
      vpipe      <= {vpipe[DEPTH-1:0], core_valid};
    end
  end

  assign out_valid = vpipe[DEPTH];

endmodule
