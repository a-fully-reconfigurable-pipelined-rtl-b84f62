// Pipelined wide XOR gate.
//
// XORs N input bits with a tree of FAN_IN-input XOR nodes. Every node is one
// FPGA lookup table followed by a register, so each tree level costs exactly
// one clock cycle and the longest combinational path is a single LUT whatever
// N is. Latency is DEPTH = ceil(log_FAN_IN(N)) cycles (at least one); a new
// input vector is accepted every cycle.
//
// The LUT-plus-register tree follows the architecture's wide-XOR structure;
// FAN_IN = 4 matches the four leaf inputs drawn there and can be raised to 6
// for six-input LUT devices. The registers carry no reset: whoever uses the
// tree tracks when its output is valid.
module pipe_xor_tree #(
  parameter int N      = 32,
  parameter int FAN_IN = 4,
  localparam int DEPTH = prbs_pkg::xor_depth(N, FAN_IN)
) (
  input  logic         clk,
  input  logic [N-1:0] in,
  output logic         out
);

  // Every level is stored in a vector wide enough for the last partial group.
  localparam int PW = N + FAN_IN;

  for (genvar l = 0; l < DEPTH; l++) begin : g_lvl
    localparam int NOUT = prbs_pkg::xor_level_width(N, FAN_IN, l + 1);
    logic [PW-1:0] d;
    logic [PW-1:0] nxt;
    logic [PW-1:0] q;

    if (l == 0) begin : g_first
      assign d = PW'(in);
    end else begin : g_next
      assign d = g_lvl[l-1].q;
    end

    always_comb begin
      nxt = '0;
      for (int j = 0; j < NOUT; j++) nxt[j] = ^d[j*FAN_IN +: FAN_IN];
    end

    always_ff @(posedge clk) q <= nxt;
  end

  assign out = g_lvl[DEPTH-1].q[0];

endmodule
