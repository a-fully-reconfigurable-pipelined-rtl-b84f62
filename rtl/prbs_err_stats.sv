// Error statistics counters fed by a PRBS checker.
//
// Every valid error word adds `width` to the checked-bit count, its number of
// set bits to the bit-error count and one to the errored-word count when any
// bit is set; each `sync_lost` pulse adds one to the loss count. The bit
// error ratio is err_bits / bit_count. `clear` zeroes all counters. Counters
// saturate instead of wrapping. Results are registered: a word shows in the
// counters one cycle after it is presented.
//
// The block is named in the test setup; the set of counters and their width
// are this design's own choice.
module prbs_err_stats #(
  parameter int MAX_WIDTH = 256,
  parameter int CNT_W     = 48,
  localparam int WW = $clog2(MAX_WIDTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 err_valid,
  input  logic [MAX_WIDTH-1:0] err_word,
  input  logic [WW-1:0]        width,
  input  logic                 sync_lost,
  output logic [CNT_W-1:0]     bit_count,
  output logic [CNT_W-1:0]     err_bits,
  output logic [CNT_W-1:0]     err_words,
  output logic [CNT_W-1:0]     loss_count
);

  logic [WW-1:0] ones;
  always_comb begin
    ones = '0;
    for (int i = 0; i < MAX_WIDTH; i++) ones += WW'(err_word[i]);
  end

  function automatic logic [CNT_W-1:0] sat_add(logic [CNT_W-1:0] a, logic [CNT_W-1:0] b);
    logic [CNT_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      bit_count  <= '0;
      err_bits   <= '0;
      err_words  <= '0;
      loss_count <= '0;
    end else begin
      if (err_valid) begin
        bit_count <= sat_add(bit_count, CNT_W'(width));
        err_bits  <= sat_add(err_bits, CNT_W'(ones));
        if (|err_word) err_words <= sat_add(err_words, CNT_W'(1));
      end
      if (sync_lost) loss_count <= sat_add(loss_count, CNT_W'(1));
    end
  end

endmodule
