// Parameter registers of a PRBS generator or checker.
//
// Holds the three user parameters: polynomial (bit k-1 = coefficient of x^k,
// the highest set bit gives the order), seed (the n bits that precede the
// first generated word, bit 0 the most recent) and output width in bits. A
// write takes one cycle: when wr_en is high, the register chosen by wr_sel is
// loaded from wr_data (the width register from its low bits). New values are
// used only when the bootstrap unit is told to reconfigure.
//
// That parameters are set by writing registers follows the architecture; the
// write port and the reset values (x^7 + x^6 + 1, all-ones seed, full width)
// are this design's choice.
module prbs_cfg_regs #(
  parameter int                   MAX_ORDER  = 32,
  parameter int                   MAX_WIDTH  = 256,
  parameter logic [MAX_ORDER-1:0] RESET_POLY = MAX_ORDER'('h60),
  localparam int WW = $clog2(MAX_WIDTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  prbs_pkg::cfg_sel_e   wr_sel,
  input  logic [MAX_ORDER-1:0] wr_data,
  output logic [MAX_ORDER-1:0] poly,
  output logic [MAX_ORDER-1:0] seed,
  output logic [WW-1:0]        width
);

  import prbs_pkg::*;

  logic [MAX_ORDER+WW-1:0] wr_ext;
  assign wr_ext = (MAX_ORDER + WW)'(wr_data);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      poly  <= RESET_POLY;
      seed  <= '1;
      width <= WW'(MAX_WIDTH);
    end else if (wr_en) begin
      unique case (wr_sel)
        CFG_POLY:  poly  <= wr_data;
        CFG_SEED:  seed  <= wr_data;
        CFG_WIDTH: width <= wr_ext[WW-1:0];
        default: ;
      endcase
    end
  end

endmodule
