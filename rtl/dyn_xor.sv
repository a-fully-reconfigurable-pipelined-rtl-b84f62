// Dynamic XOR gate.
//
// A wide XOR whose inputs are selected at run time: out is the parity of
// (in AND taps), produced by a pipelined XOR tree DEPTH cycles after `in` is
// applied. Changing `taps` changes which inputs take part, so one array of
// such gates implements any GF(2) matrix without re-synthesis; this is what
// makes polynomial and width reconfigurable.
//
// The mask AND is merged into the leaf level of the tree (it fits in the same
// lookup table), so the gate has the tree's latency. `taps` is expected to be
// stable while results are used; it changes only during reconfiguration.
module dyn_xor #(
  parameter int N      = 32,
  parameter int FAN_IN = 4,
  localparam int DEPTH = prbs_pkg::xor_depth(N, FAN_IN)
) (
  input  logic         clk,
  input  logic [N-1:0] in,
  input  logic [N-1:0] taps,
  output logic         out
);

  pipe_xor_tree #(.N(N), .FAN_IN(FAN_IN)) u_tree (
    .clk (clk),
    .in  (in & taps),
    .out (out)
  );

endmodule
