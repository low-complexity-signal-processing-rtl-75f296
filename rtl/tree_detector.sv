// tree_detector: template detection with a sparse tree instead of a
// correlator.
//
// A correlator would compute C = a'x over a window of N_WORDS samples and
// compare it with a threshold. Here the decision is taken by a sparse
// binary tree that looks at one bit of the window at a time, in a fixed
// order (most informative bit first), and stops as soon as the bits seen
// so far make one hypothesis clearly more likely. The tree is a table
// (TREE, ORDER) designed offline for a given template, noise level and
// false-alarm / miss goals; det_tree_pkg holds the default example.
//
// Interface: offer a window on x with in_valid; in_ready is high when the
// detector is idle. detect (1 = template present, H1) is valid while
// out_valid pulses, 2*DEPTH+2 clocks after acceptance; one window can be
// accepted every 2*DEPTH+2 clocks. node_active shows which nodes are
// enabled; only those on the path taken toggle.
module tree_detector
  import tree_pkg::*;
#(
  parameter int unsigned N_WORDS = det_tree_pkg::N_WORDS,
  parameter int unsigned WORD_W  = det_tree_pkg::WORD_W,
  parameter int unsigned N_NODES = det_tree_pkg::N_NODES,
  parameter int unsigned DEPTH   = det_tree_pkg::DEPTH,
  parameter node_t   [N_NODES-1:0] TREE  = det_tree_pkg::TREE,
  parameter bitsel_t [DEPTH-1:0]   ORDER = det_tree_pkg::ORDER
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [N_WORDS-1:0][WORD_W-1:0] x,
  output logic                           out_valid,
  output logic                           detect,
  output logic [N_NODES-1:0]             node_active
);

  logic din, vin, rout;
  logic [N_WORDS-1:0][WORD_W-1:0] words_unused;

  tree_feeder #(
    .N_WORDS(N_WORDS), .WORD_W(WORD_W), .DEPTH(DEPTH), .RW(1), .ORDER(ORDER)
  ) u_feeder (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_words   (x),
    .tree_din   (din),
    .tree_vin   (vin),
    .tree_rout  (rout),
    .out_valid  (out_valid),
    .out_result (detect),
    .out_words  (words_unused)
  );

  sparse_tree #(
    .N_NODES(N_NODES), .RW(1), .TREE(TREE)
  ) u_tree (
    .clk      (clk),
    .din      (din),
    .vin      (vin),
    .rout     (rout),
    .node_vin (node_active)
  );

endmodule
