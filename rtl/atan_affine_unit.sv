// atan_affine_unit: the arithmetic behind the arctangent tree.
//
// Inside rectangle r the angle is approximated by a_r*x + b_r*y + c_r.
// Splitting x and y into the bits the tree already examined (x_k, y_k) and
// the bits it did not (x_u, y_u) gives
//   (a_r*x_k + b_r*y_k + c_r) + (a_r*x_u + b_r*y_u),
// and the first bracket is a constant of the leaf. So the unit stores, per
// leaf, that constant k, the slopes a and b, and the numbers ux, uy of
// unexamined low bits; at run time it only multiplies the short unsigned
// values x_u (ux bits) and y_u (uy bits) by a and b. x_u is taken from the
// offset-binary form of x (sign bit inverted), which equals x minus the
// smallest x of the rectangle whether or not the sign bit was examined.
//
// Interface: leaf, x and y are sampled with in_valid; angle (radians,
// FRAC fraction bits, two's complement) follows with out_valid one clock
// later. COEF defaults to the example table of atan_tree_pkg.
//
// The split of equation-wise work (stored constant plus multiply of the
// unknown bits) follows the design; the number formats, the stored ux/uy
// fields and the output register are this implementation's choices.
module atan_affine_unit
  import atan_tree_pkg::leaf_coef_t;
#(
  parameter int unsigned IN_W     = atan_tree_pkg::IN_W,
  parameter int unsigned N_LEAVES = atan_tree_pkg::N_LEAVES,
  parameter int unsigned LEAF_W   = $clog2(N_LEAVES),
  parameter int unsigned OUT_W    = 16,
  parameter leaf_coef_t [N_LEAVES-1:0] COEF = atan_tree_pkg::COEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [LEAF_W-1:0]       leaf,
  input  logic [IN_W-1:0]         x,
  input  logic [IN_W-1:0]         y,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] angle
);

  localparam int unsigned ACC_W = 16 + IN_W + 3;

  leaf_coef_t                coef;
  logic [IN_W-1:0]           xo, yo, xmask, ymask, xu, yu;
  logic signed [ACC_W-1:0]   acc;

  always_comb begin
    coef  = (int'(leaf) < int'(N_LEAVES)) ? COEF[leaf] : '0;
    xo    = {~x[IN_W-1], x[IN_W-2:0]};
    yo    = {~y[IN_W-1], y[IN_W-2:0]};
    xmask = IN_W'((1 << coef.ux) - 1);
    ymask = IN_W'((1 << coef.uy) - 1);
    xu    = xo & xmask;
    yu    = yo & ymask;
    acc   = ACC_W'(coef.k)
          + ACC_W'(coef.a) * $signed({1'b0, xu})
          + ACC_W'(coef.b) * $signed({1'b0, yu});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      angle     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) angle <= acc[OUT_W-1:0];
    end
  end

endmodule
