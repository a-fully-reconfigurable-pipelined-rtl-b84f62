// PRBS link test system: reconfigurable parallel generator on the transmit
// side, self-synchronizing checker and error statistics on the receive side.
//
// In a link test the generator's words go to a serializer, across the
// channel, and back through a deserializer into the checker. The transceivers
// and channel are outside this design, so the generator output (tx_*) and the
// checker input (rx_valid, rx_word) are ports; connect them directly for a
// loop-back test. Generator and checker have separate parameter registers
// and reconfig requests, as the two ends of a real link do; set the same
// polynomial and width on both. The checker finds the sequence position by
// itself.
//
// Counters (48 bits, saturating): checked bits, bit errors, errored words
// and losses of synchronization, all cleared by stats_clear.
// Timing: see prbs_gen and prbs_checker; the counters lag err_word by one
// cycle.
module prbs_top #(
  parameter int MAX_ORDER = 32,
  parameter int MAX_WIDTH = 256,
  parameter int FAN_IN    = 4,
  localparam int WW    = $clog2(MAX_WIDTH + 1),
  localparam int CNT_W = 48
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // generator (transmit side)
  input  logic                 tx_wr_en,
  input  prbs_pkg::cfg_sel_e   tx_wr_sel,
  input  logic [MAX_ORDER-1:0] tx_wr_data,
  input  logic                 tx_reconfig,
  output logic                 tx_ready,
  output logic [WW-1:0]        tx_width,
  output logic                 tx_valid,
  output logic [MAX_WIDTH-1:0] tx_word,
  // checker (receive side)
  input  logic                 rx_wr_en,
  input  prbs_pkg::cfg_sel_e   rx_wr_sel,
  input  logic [MAX_ORDER-1:0] rx_wr_data,
  input  logic                 rx_reconfig,
  output logic                 rx_ready,
  input  logic                 rx_valid,
  input  logic [MAX_WIDTH-1:0] rx_word,
  output logic                 rx_synced,
  output logic                 rx_err_valid,
  output logic [MAX_WIDTH-1:0] rx_err_word,
  // error statistics
  input  logic                 stats_clear,
  output logic [CNT_W-1:0]     stat_bits,
  output logic [CNT_W-1:0]     stat_err_bits,
  output logic [CNT_W-1:0]     stat_err_words,
  output logic [CNT_W-1:0]     stat_sync_losses
);

  logic [WW-1:0] rx_width;
  logic          rx_sync_lost;

  prbs_gen #(.MAX_ORDER(MAX_ORDER), .MAX_WIDTH(MAX_WIDTH), .FAN_IN(FAN_IN)) u_gen (
    .clk, .rst_n,
    .wr_en (tx_wr_en), .wr_sel (tx_wr_sel), .wr_data (tx_wr_data),
    .reconfig (tx_reconfig), .ready (tx_ready), .width (tx_width),
    .out_valid (tx_valid), .out_word (tx_word)
  );

  prbs_checker #(.MAX_ORDER(MAX_ORDER), .MAX_WIDTH(MAX_WIDTH), .FAN_IN(FAN_IN)) u_chk (
    .clk, .rst_n,
    .wr_en (rx_wr_en), .wr_sel (rx_wr_sel), .wr_data (rx_wr_data),
    .reconfig (rx_reconfig), .ready (rx_ready), .width (rx_width),
    .rx_valid, .rx_word,
    .synced (rx_synced), .err_valid (rx_err_valid), .err_word (rx_err_word),
    .sync_lost (rx_sync_lost)
  );

  prbs_err_stats #(.MAX_WIDTH(MAX_WIDTH), .CNT_W(CNT_W)) u_stats (
    .clk, .rst_n, .clear (stats_clear),
    .err_valid (rx_err_valid), .err_word (rx_err_word), .width (rx_width),
    .sync_lost (rx_sync_lost),
    .bit_count (stat_bits), .err_bits (stat_err_bits),
    .err_words (stat_err_words), .loss_count (stat_sync_losses)
  );

endmodule
