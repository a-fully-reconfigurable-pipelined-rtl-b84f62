// Self-synchronizing parallel PRBS checker.
//
// Built on the same core and sequence generator as the generator. For a
// Fibonacci LFSR the last n received bits are exactly the state that predicts
// the bits that follow, so the checker needs no seed and no manual alignment:
//   * Input register: one received word per clock, rx_word[w-1] first in time.
//   * History register: the last n received bits (bit 0 newest).
//   * State-register multiplexer: while sync = 0 the core register is loaded
//     with the history after each word; while sync = 1 it runs on the core
//     XOR array, independent of received data, so link errors do not spread.
//   * Delay: the received word waits DEPTH + 1 cycles so that it meets the
//     word generated from the history just before it.
//   * Comparator: error word = generated XOR delayed received word; its zero
//     test feeds the synchronization state machine. A word predicted from an
//     all-zero history never counts as a match: the all-zero stream fits every
//     polynomial, so without this the checker would lock onto an idle link.
// Because the core loop holds LAT interleaved states, loading consecutive
// histories every clock fills it with consecutive states; switching to
// sync = 1 then continues the sequence seamlessly.
//
// Interface: configure polynomial and width like the generator (the seed
// register is unused) and pulse reconfig. err_word/err_valid leave once per
// valid word while synchronized; `synced` is high while locked; sync_lost
// pulses when lock is lost. The received stream must be continuous: a word
// with rx_valid low returns the checker to hunting.
// Timing: err_word is registered and lags the received word by DEPTH + 3
// cycles (input register, delay, error register).
// The block list (delay, comparator, zero test, FSM, multiplexed state path)
// follows the architecture; the history-register formulation and delay length
// are this design's.
module prbs_checker #(
  parameter int MAX_ORDER    = 32,
  parameter int MAX_WIDTH    = 256,
  parameter int FAN_IN       = 4,
  parameter int LOCK_WORDS   = 4,
  parameter int UNLOCK_WORDS = 4,
  localparam int WW    = $clog2(MAX_WIDTH + 1),
  localparam int DEPTH = prbs_pkg::xor_depth(MAX_ORDER, FAN_IN),
  localparam int LAT   = prbs_pkg::core_latency(MAX_ORDER, FAN_IN)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  prbs_pkg::cfg_sel_e   wr_sel,
  input  logic [MAX_ORDER-1:0] wr_data,
  input  logic                 reconfig,
  output logic                 ready,
  output logic [WW-1:0]        width,
  input  logic                 rx_valid,
  input  logic [MAX_WIDTH-1:0] rx_word,
  output logic                 synced,
  output logic                 err_valid,
  output logic [MAX_WIDTH-1:0] err_word,
  output logic                 sync_lost
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
  logic [MAX_WIDTH-1:0] gen_word;
  logic                 sync;

  prbs_cfg_regs #(.MAX_ORDER(MAX_ORDER), .MAX_WIDTH(MAX_WIDTH)) u_regs (
    .clk, .rst_n, .wr_en, .wr_sel, .wr_data,
    .poly, .seed, .width (width_reg)
  );

  prbs_bootstrap #(.MAX_ORDER(MAX_ORDER), .MAX_WIDTH(MAX_WIDTH), .FAN_IN(FAN_IN)) u_boot (
    .clk, .rst_n, .reconfig, .poly, .seed, .width (width_reg),
    .core_taps, .gen_taps, .width_mask, .order_mask, .width_q (width),
    .preload, .preload_state, .busy, .ready
  );

  // ---- input sequence register and history of received bits ---------------
  logic [MAX_WIDTH-1:0] rin;
  logic                 rin_v;
  logic [MAX_ORDER-1:0] hist;
  logic [MAX_ORDER-1:0] hist_next;
  logic [MAX_ORDER+MAX_WIDTH-1:0] hist_ext;

  assign hist_ext  = ((MAX_ORDER + MAX_WIDTH)'(hist) << width) | (MAX_ORDER + MAX_WIDTH)'(rin);
  assign hist_next = hist_ext[MAX_ORDER-1:0] & order_mask;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rin_v <= 1'b0;
      rin   <= '0;
      hist  <= '0;
    end else begin
      rin_v <= rx_valid && ready && !reconfig;
      rin   <= rx_word & width_mask;
      if (rin_v) hist <= hist_next;
    end
  end

  // ---- generator with the multiplexed state-register update path ----------
  prbs_core #(.MAX_ORDER(MAX_ORDER), .FAN_IN(FAN_IN)) u_core (
    .clk, .core_taps, .load (!sync), .load_state (hist_next), .state
  );

  prbs_seqgen #(.MAX_ORDER(MAX_ORDER), .MAX_WIDTH(MAX_WIDTH), .FAN_IN(FAN_IN)) u_seq (
    .clk, .state, .gen_taps, .width_mask, .out_word (gen_word)
  );

  // ---- delay line aligning received words with generated words ------------
  // hist_nz follows each history loaded into the core: an all-zero state
  // predicts all-zero words and must never count as a match.
  logic [MAX_WIDTH-1:0] dly   [DEPTH+1];
  logic [DEPTH:0]       dly_v;
  logic [DEPTH:0]       hist_nz;

  always_ff @(posedge clk) begin
    if (!rst_n || reconfig) begin
      dly_v   <= '0;
      hist_nz <= '0;
    end else begin
      dly_v   <= {dly_v[DEPTH-1:0], rin_v};
      hist_nz <= {hist_nz[DEPTH-1:0], hist_next != '0};
    end
    dly[0] <= rin;
    for (int i = 1; i <= DEPTH; i++) dly[i] <= dly[i-1];
  end

  // ---- comparator, zero test and synchronization --------------------------
  logic [MAX_WIDTH-1:0] err;
  logic                 cmp_valid;
  logic                 locked;
  logic                 lost;
  logic                 match;
  assign err       = gen_word ^ dly[DEPTH];
  assign cmp_valid = dly_v[DEPTH];
  assign match     = (err == '0) && hist_nz[DEPTH];

  prbs_sync_fsm #(
    .LOCK_WORDS   (LOCK_WORDS),
    .VERIFY_WORDS (LAT),
    .UNLOCK_WORDS (UNLOCK_WORDS)
  ) u_fsm (
    .clk, .rst_n, .enable (ready), .err_valid (cmp_valid), .err_zero (match),
    .sync, .locked, .lost
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      err_valid <= 1'b0;
      err_word  <= '0;
      sync_lost <= 1'b0;
    end else begin
      err_valid <= cmp_valid && locked;
      err_word  <= err;
      sync_lost <= lost;
    end
  end

  assign synced = locked;

endmodule
