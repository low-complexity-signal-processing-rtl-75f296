// tree_classifier_top: both tree-classifier engines side by side.
//
// det_*  : the template detector (tree_detector), an 8-sample window of
//          8-bit samples, decision H1/H0 every 2*18+2 = 38 clocks at most.
// atan_* : the arctangent estimator (tree_atan2), 5-bit x and y, angle in
//          radians with 10 fraction bits, one result every 20 clocks.
// The two engines share only the clock and reset; each has its own
// valid/ready input handshake and a one-clock out_valid pulse.
module tree_classifier_top (
  input  logic                     clk,
  input  logic                     rst_n,
  // detector
  input  logic                     det_in_valid,
  output logic                     det_in_ready,
  input  logic [det_tree_pkg::N_WORDS-1:0][det_tree_pkg::WORD_W-1:0] det_x,
  output logic                     det_out_valid,
  output logic                     det_detect,
  output logic [det_tree_pkg::N_NODES-1:0] det_node_active,
  // arctangent
  input  logic                     atan_in_valid,
  output logic                     atan_in_ready,
  input  logic [atan_tree_pkg::IN_W-1:0] atan_x,
  input  logic [atan_tree_pkg::IN_W-1:0] atan_y,
  output logic                     atan_out_valid,
  output logic [$clog2(atan_tree_pkg::N_LEAVES)-1:0] atan_leaf,
  output logic signed [15:0]       atan_angle
);

  tree_detector u_det (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (det_in_valid),
    .in_ready    (det_in_ready),
    .x           (det_x),
    .out_valid   (det_out_valid),
    .detect      (det_detect),
    .node_active (det_node_active)
  );

  tree_atan2 u_atan (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (atan_in_valid),
    .in_ready  (atan_in_ready),
    .x         (atan_x),
    .y         (atan_y),
    .out_valid (atan_out_valid),
    .leaf      (atan_leaf),
    .angle     (atan_angle)
  );

endmodule
