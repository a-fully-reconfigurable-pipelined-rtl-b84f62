// Bootstrap unit: turns polynomial, seed and width into the internal
// configuration of the core and the sequence generator.
//
// On a `reconfig` pulse the unit latches the three parameter registers and
// works out, one row per clock, the mask rows c(i) that give "the sequence
// bit i steps after a state" as a parity of that state:
//     c(0) = e(n-1),   c(i+1) = (c(i) >> 1) XOR (c(i)[0] ? poly : 0)
// where n is the order (highest polynomial bit + 1). For a state holding the
// n bits before a word, the word's j-th bit in time is c(n+j), and bit k of
// the state w*LAT steps later is c(w*LAT+n-1-k). So
//     gen_taps[w-1-j]  = c(n+j),          j = 0 .. w-1
//     core_taps[k]     = c(w*LAT+n-1-k),  k = 0 .. n-1
// and every other row is zero. In parallel a serial copy of the LFSR runs
// from the seed and records every w-th state: these LAT states are the
// initialization sequence that fills the pipelined core loop.
//
// Timing: CALC lasts w*LAT + n cycles, then LOAD drives `preload` for LAT
// cycles (seed state first), then `ready` rises and stays high until the
// next reconfig. `busy` is high during CALC and LOAD. A reconfig pulse is
// accepted in any state and restarts the sequence.
//
// That the bootstrap unit produces the masks and preloads the core pipeline
// follows the architecture; the row recurrence, the serial seed stepping and
// the cycle counts are this design's own way of doing it. Widths of 0 or
// above MAX_WIDTH are clamped into 1..MAX_WIDTH.
module prbs_bootstrap #(
  parameter int MAX_ORDER = 32,
  parameter int MAX_WIDTH = 256,
  parameter int FAN_IN    = 4,
  localparam int LAT = prbs_pkg::core_latency(MAX_ORDER, FAN_IN),
  localparam int WW  = $clog2(MAX_WIDTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 reconfig,
  input  logic [MAX_ORDER-1:0] poly,
  input  logic [MAX_ORDER-1:0] seed,
  input  logic [WW-1:0]        width,
  output logic [MAX_ORDER-1:0] core_taps [MAX_ORDER],
  output logic [MAX_ORDER-1:0] gen_taps  [MAX_WIDTH],
  output logic [MAX_WIDTH-1:0] width_mask,
  output logic [MAX_ORDER-1:0] order_mask,
  output logic [WW-1:0]        width_q,
  output logic                 preload,
  output logic [MAX_ORDER-1:0] preload_state,
  output logic                 busy,
  output logic                 ready
);

  typedef enum logic [1:0] {BS_IDLE, BS_CALC, BS_LOAD, BS_READY} bs_state_e;

  localparam int CW = $clog2(MAX_WIDTH * LAT + MAX_ORDER + 1) + 1;
  localparam int OW = $clog2(MAX_ORDER + 1);
  localparam int LW = $clog2(LAT + 1);
  localparam int GI = (MAX_WIDTH > 1) ? $clog2(MAX_WIDTH) : 1;  // gen_taps row index
  localparam int OI = (MAX_ORDER > 1) ? $clog2(MAX_ORDER) : 1;  // core_taps row index
  localparam int PI = (LAT > 1) ? $clog2(LAT) : 1;              // pre_buf index

  bs_state_e            st;
  logic [MAX_ORDER-1:0] poly_q;
  logic [OW-1:0]        order_q;
  logic [CW-1:0]        idx;        // row index i of c(i)
  logic [CW-1:0]        core_base;  // w*LAT
  logic [MAX_ORDER-1:0] row;        // c(i)
  logic [MAX_ORDER-1:0] ser;        // serial LFSR state
  logic [WW-1:0]        ser_cnt;    // serial steps inside the current word
  logic [LW-1:0]        pre_idx;    // next initialization state to record / send
  logic [MAX_ORDER-1:0] pre_buf [LAT];

  // ---- combinational views of the incoming parameters ----------------------
  logic [MAX_ORDER-1:0] in_omask;
  logic [OW-1:0]        in_order;
  logic [WW-1:0]        in_width;

  always_comb begin
    in_order = '0;
    for (int k = 0; k < MAX_ORDER; k++) begin
      in_omask[k] = |(poly >> k);
      if (poly[k]) in_order = OW'(k + 1);
    end
    if (width == '0 || int'(width) > MAX_WIDTH) in_width = WW'(MAX_WIDTH);
    else                                        in_width = width;
  end

  // ---- one step of the row recurrence and of the serial LFSR ---------------
  logic [MAX_ORDER-1:0] row_next;
  logic [MAX_ORDER-1:0] ser_next;
  assign row_next = (row >> 1) ^ (row[0] ? poly_q : '0);
  assign ser_next = {ser[MAX_ORDER-2:0], ^(ser & poly_q)} & order_mask;

  // Positions of the current row inside the two mask arrays.
  logic [CW-1:0] gen_j;    // i - n
  logic [CW-1:0] core_j;   // i - w*LAT
  logic          gen_hit;
  logic          core_hit;
  assign gen_j    = idx - CW'(order_q);
  assign core_j   = idx - core_base;
  assign gen_hit  = (idx >= CW'(order_q)) && (gen_j < CW'(width_q));
  assign core_hit = (idx >= core_base) && (core_j < CW'(order_q));

  logic [CW-1:0] gen_row_w;
  logic [CW-1:0] core_row_w;
  logic [GI-1:0] gen_row;
  logic [OI-1:0] core_row;
  logic [PI-1:0] pre_sel;
  assign gen_row_w  = CW'(width_q) - 1'b1 - gen_j;
  assign core_row_w = CW'(order_q) - 1'b1 - core_j;
  assign gen_row    = gen_row_w[GI-1:0];
  assign core_row   = core_row_w[OI-1:0];
  assign pre_sel    = pre_idx[PI-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st         <= BS_IDLE;
      width_mask <= '0;
      order_mask <= '0;
      width_q    <= WW'(MAX_WIDTH);
      order_q    <= '0;
      poly_q     <= '0;
      idx        <= '0;
      core_base  <= '0;
      pre_idx    <= '0;
    end else if (reconfig) begin
      st         <= BS_CALC;
      poly_q     <= poly;
      order_q    <= in_order;
      order_mask <= in_omask;
      width_q    <= in_width;
      for (int b = 0; b < MAX_WIDTH; b++) width_mask[b] <= (b < int'(in_width));
      core_base  <= CW'(in_width) * CW'(LAT);
      idx        <= '0;
      row        <= in_omask ^ (in_omask >> 1);   // e(n-1)
      ser        <= seed & in_omask;
      ser_cnt    <= '0;
      pre_buf[0] <= seed & in_omask;
      pre_idx    <= LW'(1);
      for (int r = 0; r < MAX_ORDER; r++) core_taps[r] <= '0;
      for (int r = 0; r < MAX_WIDTH; r++) gen_taps[r]  <= '0;
    end else begin
      unique case (st)
        BS_CALC: begin
          if (gen_hit)  gen_taps[gen_row]   <= row;
          if (core_hit) core_taps[core_row] <= row;
          row <= row_next;
          idx <= idx + 1'b1;
          if (int'(pre_idx) < LAT) begin
            ser <= ser_next;
            if (ser_cnt == width_q - 1'b1) begin
              pre_buf[pre_sel]  <= ser_next;
              pre_idx          <= pre_idx + 1'b1;
              ser_cnt          <= '0;
            end else begin
              ser_cnt <= ser_cnt + 1'b1;
            end
          end
          if (idx == core_base + CW'(order_q) - 1'b1) begin
            st      <= BS_LOAD;
            pre_idx <= '0;
          end
        end
        BS_LOAD: begin
          pre_idx <= pre_idx + 1'b1;
          if (int'(pre_idx) == LAT - 1) st <= BS_READY;
        end
        default: ;
      endcase
    end
  end

  assign preload       = (st == BS_LOAD);
  assign preload_state = pre_buf[pre_sel];
  assign busy          = (st == BS_CALC) || (st == BS_LOAD);
  assign ready         = (st == BS_READY);

endmodule
