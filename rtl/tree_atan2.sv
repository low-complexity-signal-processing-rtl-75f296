// tree_atan2: two-input arctangent by a tree classifier plus a small
// affine evaluation.
//
// A sparse tree of the same nodes as the detector examines the bits of x
// and y in a fixed interleaved order (x MSB, y MSB, next x bit, ...) and
// stops in one of N_LEAVES rectangles of the input plane. Its leaves do not
// return a yes/no answer but their own number, carried back to the root on
// an RW-bit result bus that every node ORs. The leaf number selects the
// rectangle's stored affine approximation, which atan_affine_unit evaluates
// on the bits the tree did not examine.
//
// Interface: x and y (IN_W-bit two's complement, read as x/2^(IN_W-1)) are
// offered with in_valid/in_ready. out_valid pulses 2*DEPTH+3 clocks after
// acceptance with the rectangle number (leaf) and the angle in radians
// (FRAC fraction bits). One pair can be accepted every 2*DEPTH+2 clocks.
module tree_atan2
  import tree_pkg::*;
#(
  parameter int unsigned IN_W     = atan_tree_pkg::IN_W,
  parameter int unsigned N_NODES  = atan_tree_pkg::N_NODES,
  parameter int unsigned N_LEAVES = atan_tree_pkg::N_LEAVES,
  parameter int unsigned DEPTH    = atan_tree_pkg::DEPTH,
  parameter int unsigned LEAF_W   = $clog2(N_LEAVES),
  parameter int unsigned OUT_W    = 16,
  parameter node_t   [N_NODES-1:0] TREE  = atan_tree_pkg::TREE,
  parameter bitsel_t [DEPTH-1:0]   ORDER = atan_tree_pkg::ORDER,
  parameter atan_tree_pkg::leaf_coef_t [N_LEAVES-1:0] COEF = atan_tree_pkg::COEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [IN_W-1:0]         x,
  input  logic [IN_W-1:0]         y,
  output logic                    out_valid,
  output logic [LEAF_W-1:0]       leaf,
  output logic signed [OUT_W-1:0] angle
);

  logic                      din, vin;
  logic [LEAF_W-1:0]         rout, leaf_f;
  logic                      valid_f;
  logic [1:0][IN_W-1:0]      words_f;
  logic [N_NODES-1:0]        node_vin_unused;

  tree_feeder #(
    .N_WORDS(2), .WORD_W(IN_W), .DEPTH(DEPTH), .RW(LEAF_W), .ORDER(ORDER)
  ) u_feeder (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_words   ({y, x}),
    .tree_din   (din),
    .tree_vin   (vin),
    .tree_rout  (rout),
    .out_valid  (valid_f),
    .out_result (leaf_f),
    .out_words  (words_f)
  );

  sparse_tree #(
    .N_NODES(N_NODES), .RW(LEAF_W), .TREE(TREE)
  ) u_tree (
    .clk      (clk),
    .din      (din),
    .vin      (vin),
    .rout     (rout),
    .node_vin (node_vin_unused)
  );

  atan_affine_unit #(
    .IN_W(IN_W), .N_LEAVES(N_LEAVES), .LEAF_W(LEAF_W), .OUT_W(OUT_W), .COEF(COEF)
  ) u_affine (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (valid_f),
    .leaf      (leaf_f),
    .x         (words_f[0]),
    .y         (words_f[1]),
    .out_valid (out_valid),
    .angle     (angle)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)       leaf <= '0;
    else if (valid_f) leaf <= leaf_f;
  end

endmodule
