// atan_tree_pkg: the example arctangent tree and per-leaf coefficients
// used as the default of tree_atan2.
//
// Inputs x, y are 5-bit two's complement numbers read as x/16, y/16. The
// tree examines bits in the fixed order x4, y4, x3, y3, ... (MSB first,
// interleaved). Leaves were split greedily, largest squared error first,
// until there were 41; inside every rectangle atan2(y, x) is fitted by
// least squares with a*x + b*y + c over all integer points. Mean-square
// error of the fit over all 1024 inputs is 5.2e-4 rad^2.
//
// Per leaf the table holds, with 10 fraction bits (value * 1024):
//   k  = a*lo_x + b*lo_y + c, where lo_x, lo_y are the smallest x, y in the
//        rectangle (the known bits with the unknown ones at their minimum),
//   a, b = the slopes per input LSB (a/16, b/16),
//   ux, uy = the number of low bits of x, y the leaf did not examine.
// The angle is then k + a*xu + b*yu, xu and yu being the unexamined low
// bits read as an unsigned number (offset binary when no bit is known).
package atan_tree_pkg;
  import tree_pkg::*;

  localparam int unsigned IN_W     = 5;
  localparam int unsigned N_NODES  = 40;
  localparam int unsigned N_LEAVES = 41;
  localparam int unsigned DEPTH    = 9;
  localparam int unsigned FRAC     = 10;

  typedef struct packed {
    logic signed [15:0] k;
    logic signed [15:0] a;
    logic signed [15:0] b;
    logic [2:0]         ux;
    logic [2:0]         uy;
  } leaf_coef_t;

  // c0: examined bit 0, c1: examined bit 1; leaf idx = leaf number
  localparam node_t [N_NODES-1:0] TREE = '{
    /* 39 */ '{c0: '{is_node: 1'b0, idx: 16'd39}, c1: '{is_node: 1'b0, idx: 16'd40}},
    /* 38 */ '{c0: '{is_node: 1'b0, idx: 16'd37}, c1: '{is_node: 1'b0, idx: 16'd38}},
    /* 37 */ '{c0: '{is_node: 1'b0, idx: 16'd35}, c1: '{is_node: 1'b0, idx: 16'd36}},
    /* 36 */ '{c0: '{is_node: 1'b1, idx: 16'd39}, c1: '{is_node: 1'b0, idx: 16'd34}},
    /* 35 */ '{c0: '{is_node: 1'b0, idx: 16'd32}, c1: '{is_node: 1'b0, idx: 16'd33}},
    /* 34 */ '{c0: '{is_node: 1'b0, idx: 16'd31}, c1: '{is_node: 1'b1, idx: 16'd38}},
    /* 33 */ '{c0: '{is_node: 1'b1, idx: 16'd37}, c1: '{is_node: 1'b0, idx: 16'd30}},
    /* 32 */ '{c0: '{is_node: 1'b1, idx: 16'd36}, c1: '{is_node: 1'b0, idx: 16'd29}},
    /* 31 */ '{c0: '{is_node: 1'b0, idx: 16'd28}, c1: '{is_node: 1'b1, idx: 16'd35}},
    /* 30 */ '{c0: '{is_node: 1'b1, idx: 16'd34}, c1: '{is_node: 1'b0, idx: 16'd27}},
    /* 29 */ '{c0: '{is_node: 1'b0, idx: 16'd25}, c1: '{is_node: 1'b0, idx: 16'd26}},
    /* 28 */ '{c0: '{is_node: 1'b0, idx: 16'd23}, c1: '{is_node: 1'b0, idx: 16'd24}},
    /* 27 */ '{c0: '{is_node: 1'b0, idx: 16'd22}, c1: '{is_node: 1'b1, idx: 16'd33}},
    /* 26 */ '{c0: '{is_node: 1'b0, idx: 16'd20}, c1: '{is_node: 1'b0, idx: 16'd21}},
    /* 25 */ '{c0: '{is_node: 1'b1, idx: 16'd32}, c1: '{is_node: 1'b0, idx: 16'd19}},
    /* 24 */ '{c0: '{is_node: 1'b0, idx: 16'd18}, c1: '{is_node: 1'b1, idx: 16'd31}},
    /* 23 */ '{c0: '{is_node: 1'b0, idx: 16'd16}, c1: '{is_node: 1'b0, idx: 16'd17}},
    /* 22 */ '{c0: '{is_node: 1'b1, idx: 16'd29}, c1: '{is_node: 1'b1, idx: 16'd30}},
    /* 21 */ '{c0: '{is_node: 1'b0, idx: 16'd14}, c1: '{is_node: 1'b0, idx: 16'd15}},
    /* 20 */ '{c0: '{is_node: 1'b0, idx: 16'd12}, c1: '{is_node: 1'b0, idx: 16'd13}},
    /* 19 */ '{c0: '{is_node: 1'b1, idx: 16'd27}, c1: '{is_node: 1'b1, idx: 16'd28}},
    /* 18 */ '{c0: '{is_node: 1'b0, idx: 16'd10}, c1: '{is_node: 1'b0, idx: 16'd11}},
    /* 17 */ '{c0: '{is_node: 1'b0, idx: 16'd8}, c1: '{is_node: 1'b0, idx: 16'd9}},
    /* 16 */ '{c0: '{is_node: 1'b0, idx: 16'd6}, c1: '{is_node: 1'b0, idx: 16'd7}},
    /* 15 */ '{c0: '{is_node: 1'b1, idx: 16'd25}, c1: '{is_node: 1'b1, idx: 16'd26}},
    /* 14 */ '{c0: '{is_node: 1'b0, idx: 16'd5}, c1: '{is_node: 1'b1, idx: 16'd24}},
    /* 13 */ '{c0: '{is_node: 1'b0, idx: 16'd3}, c1: '{is_node: 1'b0, idx: 16'd4}},
    /* 12 */ '{c0: '{is_node: 1'b1, idx: 16'd22}, c1: '{is_node: 1'b1, idx: 16'd23}},
    /* 11 */ '{c0: '{is_node: 1'b1, idx: 16'd21}, c1: '{is_node: 1'b0, idx: 16'd2}},
    /* 10 */ '{c0: '{is_node: 1'b0, idx: 16'd1}, c1: '{is_node: 1'b1, idx: 16'd20}},
    /*  9 */ '{c0: '{is_node: 1'b1, idx: 16'd18}, c1: '{is_node: 1'b1, idx: 16'd19}},
    /*  8 */ '{c0: '{is_node: 1'b1, idx: 16'd17}, c1: '{is_node: 1'b0, idx: 16'd0}},
    /*  7 */ '{c0: '{is_node: 1'b1, idx: 16'd15}, c1: '{is_node: 1'b1, idx: 16'd16}},
    /*  6 */ '{c0: '{is_node: 1'b1, idx: 16'd13}, c1: '{is_node: 1'b1, idx: 16'd14}},
    /*  5 */ '{c0: '{is_node: 1'b1, idx: 16'd11}, c1: '{is_node: 1'b1, idx: 16'd12}},
    /*  4 */ '{c0: '{is_node: 1'b1, idx: 16'd9}, c1: '{is_node: 1'b1, idx: 16'd10}},
    /*  3 */ '{c0: '{is_node: 1'b1, idx: 16'd7}, c1: '{is_node: 1'b1, idx: 16'd8}},
    /*  2 */ '{c0: '{is_node: 1'b1, idx: 16'd5}, c1: '{is_node: 1'b1, idx: 16'd6}},
    /*  1 */ '{c0: '{is_node: 1'b1, idx: 16'd3}, c1: '{is_node: 1'b1, idx: 16'd4}},
    /*  0 */ '{c0: '{is_node: 1'b1, idx: 16'd1}, c1: '{is_node: 1'b1, idx: 16'd2}}
  };

  localparam leaf_coef_t [N_LEAVES-1:0] COEF = '{
    /* 40 */ '{k: 16'sd0, a: 16'sd0, b: 16'sd804, ux: 3'd0, uy: 3'd1},
    /* 39 */ '{k: 16'sd0, a: 16'sd0, b: 16'sd1608, ux: 3'd0, uy: 3'd1},
    /* 38 */ '{k: 16'sd2399, a: -16'sd301, b: -16'sd174, ux: 3'd1, uy: 3'd1},
    /* 37 */ '{k: 16'sd3299, a: -16'sd165, b: -16'sd640, ux: 3'd1, uy: 3'd1},
    /* 36 */ '{k: -16'sd1691, a: 16'sd640, b: 16'sd165, ux: 3'd1, uy: 3'd1},
    /* 35 */ '{k: -16'sd1628, a: 16'sd290, b: 16'sd39, ux: 3'd1, uy: 3'd1},
    /* 34 */ '{k: 16'sd1572, a: -16'sd402, b: 16'sd73, ux: 3'd1, uy: 3'd1},
    /* 33 */ '{k: -16'sd2063, a: 16'sd289, b: -16'sd199, ux: 3'd1, uy: 3'd2},
    /* 32 */ '{k: -16'sd2377, a: 16'sd124, b: -16'sd195, ux: 3'd1, uy: 3'd2},
    /* 31 */ '{k: 16'sd3237, a: -16'sd88, b: -16'sd244, ux: 3'd1, uy: 3'd2},
    /* 30 */ '{k: -16'sd1173, a: 16'sd183, b: 16'sd212, ux: 3'd1, uy: 3'd2},
    /* 29 */ '{k: 16'sd119, a: -16'sd137, b: 16'sd302, ux: 3'd1, uy: 3'd2},
    /* 28 */ '{k: -16'sd2114, a: 16'sd138, b: -16'sd51, ux: 3'd2, uy: 3'd2},
    /* 27 */ '{k: 16'sd2378, a: -16'sd155, b: -16'sd67, ux: 3'd2, uy: 3'd2},
    /* 26 */ '{k: 16'sd2750, a: -16'sd77, b: -16'sd91, ux: 3'd2, uy: 3'd2},
    /* 25 */ '{k: 16'sd3262, a: -16'sd33, b: -16'sd151, ux: 3'd2, uy: 3'd2},
    /* 24 */ '{k: -16'sd770, a: 16'sd67, b: 16'sd155, ux: 3'd2, uy: 3'd2},
    /* 23 */ '{k: -16'sd1142, a: 16'sd91, b: 16'sd77, ux: 3'd2, uy: 3'd2},
    /* 22 */ '{k: -16'sd1653, a: 16'sd151, b: 16'sd33, ux: 3'd2, uy: 3'd2},
    /* 21 */ '{k: 16'sd804, a: -16'sd92, b: 16'sd92, ux: 3'd2, uy: 3'd2},
    /* 20 */ '{k: 16'sd76, a: -16'sd45, b: 16'sd175, ux: 3'd2, uy: 3'd2},
    /* 19 */ '{k: 16'sd1533, a: -16'sd175, b: 16'sd45, ux: 3'd2, uy: 3'd2},
    /* 18 */ '{k: -16'sd2348, a: 16'sd65, b: -16'sd107, ux: 3'd2, uy: 3'd3},
    /* 17 */ '{k: 16'sd2032, a: -16'sd87, b: -16'sd19, ux: 3'd2, uy: 3'd3},
    /* 16 */ '{k: 16'sd2383, a: -16'sd67, b: -16'sd39, ux: 3'd2, uy: 3'd3},
    /* 15 */ '{k: 16'sd3242, a: -16'sd27, b: -16'sd87, ux: 3'd2, uy: 3'd3},
    /* 14 */ '{k: 16'sd3234, a: -16'sd15, b: -16'sd66, ux: 3'd2, uy: 3'd3},
    /* 13 */ '{k: -16'sd593, a: 16'sd21, b: 16'sd68, ux: 3'd2, uy: 3'd3},
    /* 12 */ '{k: -16'sd803, a: 16'sd38, b: 16'sd88, ux: 3'd2, uy: 3'd3},
    /* 11 */ '{k: -16'sd1388, a: 16'sd69, b: 16'sd31, ux: 3'd2, uy: 3'd3},
    /* 10 */ '{k: -16'sd1643, a: 16'sd83, b: 16'sd10, ux: 3'd2, uy: 3'd3},
    /*  9 */ '{k: 16'sd34, a: -16'sd17, b: 16'sd71, ux: 3'd2, uy: 3'd3},
    /*  8 */ '{k: 16'sd67, a: -16'sd31, b: 16'sd94, ux: 3'd2, uy: 3'd3},
    /*  7 */ '{k: 16'sd1127, a: -16'sd73, b: 16'sd36, ux: 3'd2, uy: 3'd3},
    /*  6 */ '{k: 16'sd1566, a: -16'sd90, b: 16'sd12, ux: 3'd2, uy: 3'd3},
    /*  5 */ '{k: -16'sd2129, a: 16'sd73, b: -16'sd25, ux: 3'd3, uy: 3'd3},
    /*  4 */ '{k: -16'sd2696, a: 16'sd25, b: -16'sd73, ux: 3'd3, uy: 3'd3},
    /*  3 */ '{k: -16'sd2413, a: 16'sd41, b: -16'sd41, ux: 3'd3, uy: 3'd3},
    /*  2 */ '{k: 16'sd2751, a: -16'sd40, b: -16'sd44, ux: 3'd3, uy: 3'd3},
    /*  1 */ '{k: -16'sd1143, a: 16'sd44, b: 16'sd40, ux: 3'd3, uy: 3'd3},
    /*  0 */ '{k: 16'sd804, a: -16'sd44, b: 16'sd44, ux: 3'd3, uy: 3'd3}
  };

  // word 0 = x, word 1 = y
  localparam bitsel_t [DEPTH-1:0] ORDER = '{
    '{word: 16'd0, bitpos: 8'd0}, '{word: 16'd1, bitpos: 8'd1},
    '{word: 16'd0, bitpos: 8'd1}, '{word: 16'd1, bitpos: 8'd2},
    '{word: 16'd0, bitpos: 8'd2}, '{word: 16'd1, bitpos: 8'd3},
    '{word: 16'd0, bitpos: 8'd3}, '{word: 16'd1, bitpos: 8'd4},
    '{word: 16'd0, bitpos: 8'd4}
  };

endpackage
