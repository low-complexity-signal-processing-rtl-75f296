// tree_node: one internal node of the parallel sparse tree classifier.
//
// The input vector reaches the tree as a serial bit stream on din, one bit
// per clock, in the fixed examination order. A node is enabled by vin from
// its parent. Four flip-flops do the work:
//   dout_q  pipelines the stream to both children (Dout = Din one clock
//           later); its input is gated by vin so an idle node never toggles,
//   vind1_q, vind2_q  delay vin by one and two clocks; their difference
//           Dlatch = VinD1 & ~VinD2 is a one-clock pulse after vin rises,
//   din1_q  latches, on Dlatch, the bit present on Dout at that time: the
//           first bit the node sees, which is the bit it examines.
// Two clocks after vin rises the node enables exactly one child: Voutr if
// the examined bit is 1, Voutl if it is 0. The child sees its own vin rise
// together with the next bit of the stream on its din, so every level
// costs two clocks and consumes one bit. Results travel back without
// clocking: rout = routl | routr. A leaf child is not a node: the parent's
// routl/routr is tied to its own voutl/voutr (a leaf that returns 1, the H1
// hypothesis) or to 0 (H0), which sparse_tree does.
//
// The node has no reset, as in the original node. Holding vin low for two
// clocks clears vind1/vind2 and the outputs; din1 only matters while vind2
// is set. vin must stay high for the whole descent and drop for at least one
// clock between classifications.
//
// The flip-flop set, signal names and the OR on the result follow the node
// schematic of the design; the gating that produces Dlatch and the Vouts,
// the bit-to-branch assignment (1 = right) and the RW-bit result (RW = 1 is
// the single-bit detector node; wider results carry a leaf number) are
// this implementation's choices.
module tree_node #(
  parameter int unsigned RW = 1
) (
  input  logic          clk,
  input  logic          din,
  input  logic          vin,
  output logic          dout,
  output logic          voutl,
  output logic          voutr,
  input  logic [RW-1:0] routl,
  input  logic [RW-1:0] routr,
  output logic [RW-1:0] rout
);

  logic dout_q, vind1_q, vind2_q, din1_q;
  logic dlatch;

  assign dlatch = vind1_q & ~vind2_q;

  always_ff @(posedge clk) begin
    dout_q  <= din & vin;
    vind1_q <= vin;
    vind2_q <= vind1_q;
    if (dlatch) din1_q <= dout_q;
  end

  assign dout  = dout_q;
  assign voutr = vind2_q &  din1_q;
  assign voutl = vind2_q & ~din1_q;
  assign rout  = routl | routr;

endmodule
