// det_tree_pkg: the example detector tree used as the default of
// tree_detector.
//
// The tree was grown with the greedy method of the design: white Gaussian
// noise of variance 256, goals P_F = 1e-4 and P_M = 1e-5, fixed bit order,
// each leaf deciding for the hypothesis more likely to reach it, and the
// leaf with the largest error share (P(leaf|H0)/P_F goal for an H1 leaf,
// P(leaf|H1)/P_M goal for an H0 leaf) split until both goals are met.
// Template and sample width are this design's own example values (an
// 8-sample damped oscillation, 8-bit two's complement samples); with them
// the tree reaches P_F = 9.4e-5 and P_M = 8.8e-6 using 44 internal nodes
// and 45 leaves, depth 18. Samples are assumed to saturate at the 8-bit
// range.
//
// Examination order: bit j of word i is ranked by |a_i| * 2^j, largest
// first (ties: lower word first), so a word's MSB always precedes its
// lower bits.
package det_tree_pkg;
  import tree_pkg::*;

  localparam int unsigned N_WORDS = 8;
  localparam int unsigned WORD_W  = 8;
  localparam int unsigned N_NODES = 44;
  localparam int unsigned DEPTH   = 18;   // internal levels; leaves are up to DEPTH deep

  localparam int TEMPLATE [N_WORDS] = '{85, 96, -51, -58, 31, 35, -19, -22};

  // c0: examined bit 0, c1: examined bit 1; leaf idx 1 = H1, 0 = H0
  localparam node_t [N_NODES-1:0] TREE = '{
    /* 43 */ '{c0: '{is_node: 1'b0, idx: 16'd1}, c1: '{is_node: 1'b0, idx: 16'd0}},
    /* 42 */ '{c0: '{is_node: 1'b0, idx: 16'd1}, c1: '{is_node: 1'b0, idx: 16'd0}},
    /* 41 */ '{c0: '{is_node: 1'b1, idx: 16'd43}, c1: '{is_node: 1'b0, idx: 16'd0}},
    /* 40 */ '{c0: '{is_node: 1'b0, idx: 16'd0}, c1: '{is_node: 1'b1, idx: 16'd42}},
    /* 39 */ '{c0: '{is_node: 1'b1, idx: 16'd41}, c1: '{is_node: 1'b0, idx: 16'd1}},
    /* 38 */ '{c0: '{is_node: 1'b1, idx: 16'd40}, c1: '{is_node: 1'b0, idx: 16'd1}},
    /* 37 */ '{c0: '{is_node: 1'b1, idx: 16'd39}, c1: '{is_node: 1'b0, idx: 16'd1}},
    /* 36 */ '{c0: '{is_node: 1'b0, idx: 16'd0}, c1: '{is_node: 1'b0, idx: 16'd1}},
    /* 35 */ '{c0: '{is_node: 1'b0, idx: 16'd0}, c1: '{is_node: 1'b1, idx: 16'd38}},
    /* 34 */ '{c0: '{is_node: 1'b0, idx: 16'd1}, c1: '{is_node: 1'b0, idx: 16'd1}},
    /* 33 */ '{c0: '{is_node: 1'b0, idx: 16'd0}, c1: '{is_node: 1'b1, idx: 16'd37}},
    /* 32 */ '{c0: '{is_node: 1'b0, idx: 16'd1}, c1: '{is_node: 1'b0, idx: 16'd1}},
    /* 31 */ '{c0: '{is_node: 1'b0, idx: 16'd0}, c1: '{is_node: 1'b1, idx: 16'd36}},
    /* 30 */ '{c0: '{is_node: 1'b0, idx: 16'd0}, c1: '{is_node: 1'b0, idx: 16'd1}},
    /* 29 */ '{c0: '{is_node: 1'b0, idx: 16'd0}, c1: '{is_node: 1'b1, idx: 16'd35}},
    /* 28 */ '{c0: '{is_node: 1'b1, idx: 16'd33}, c1: '{is_node: 1'b1, idx: 16'd34}},
    /* 27 */ '{c0: '{is_node: 1'b0, idx: 16'd0}, c1: '{is_node: 1'b1, idx: 16'd32}},
    /* 26 */ '{c0: '{is_node: 1'b0, idx: 16'd0}, c1: '{is_node: 1'b1, idx: 16'd31}},
    /* 25 */ '{c0: '{is_node: 1'b1, idx: 16'd29}, c1: '{is_node: 1'b1, idx: 16'd30}},
    /* 24 */ '{c0: '{is_node: 1'b1, idx: 16'd27}, c1: '{is_node: 1'b1, idx: 16'd28}},
    /* 23 */ '{c0: '{is_node: 1'b0, idx: 16'd0}, c1: '{is_node: 1'b1, idx: 16'd26}},
    /* 22 */ '{c0: '{is_node: 1'b0, idx: 16'd0}, c1: '{is_node: 1'b1, idx: 16'd25}},
    /* 21 */ '{c0: '{is_node: 1'b0, idx: 16'd0}, c1: '{is_node: 1'b1, idx: 16'd24}},
    /* 20 */ '{c0: '{is_node: 1'b0, idx: 16'd1}, c1: '{is_node: 1'b1, idx: 16'd23}},
    /* 19 */ '{c0: '{is_node: 1'b0, idx: 16'd1}, c1: '{is_node: 1'b1, idx: 16'd22}},
    /* 18 */ '{c0: '{is_node: 1'b0, idx: 16'd1}, c1: '{is_node: 1'b1, idx: 16'd21}},
    /* 17 */ '{c0: '{is_node: 1'b0, idx: 16'd1}, c1: '{is_node: 1'b1, idx: 16'd20}},
    /* 16 */ '{c0: '{is_node: 1'b0, idx: 16'd1}, c1: '{is_node: 1'b1, idx: 16'd19}},
    /* 15 */ '{c0: '{is_node: 1'b0, idx: 16'd1}, c1: '{is_node: 1'b1, idx: 16'd18}},
    /* 14 */ '{c0: '{is_node: 1'b1, idx: 16'd17}, c1: '{is_node: 1'b0, idx: 16'd0}},
    /* 13 */ '{c0: '{is_node: 1'b1, idx: 16'd15}, c1: '{is_node: 1'b1, idx: 16'd16}},
    /* 12 */ '{c0: '{is_node: 1'b1, idx: 16'd13}, c1: '{is_node: 1'b1, idx: 16'd14}},
    /* 11 */ '{c0: '{is_node: 1'b0, idx: 16'd1}, c1: '{is_node: 1'b0, idx: 16'd0}},
    /* 10 */ '{c0: '{is_node: 1'b1, idx: 16'd12}, c1: '{is_node: 1'b0, idx: 16'd1}},
    /*  9 */ '{c0: '{is_node: 1'b0, idx: 16'd0}, c1: '{is_node: 1'b0, idx: 16'd1}},
    /*  8 */ '{c0: '{is_node: 1'b0, idx: 16'd0}, c1: '{is_node: 1'b1, idx: 16'd11}},
    /*  7 */ '{c0: '{is_node: 1'b1, idx: 16'd10}, c1: '{is_node: 1'b0, idx: 16'd1}},
    /*  6 */ '{c0: '{is_node: 1'b1, idx: 16'd9}, c1: '{is_node: 1'b0, idx: 16'd1}},
    /*  5 */ '{c0: '{is_node: 1'b1, idx: 16'd8}, c1: '{is_node: 1'b0, idx: 16'd1}},
    /*  4 */ '{c0: '{is_node: 1'b1, idx: 16'd6}, c1: '{is_node: 1'b1, idx: 16'd7}},
    /*  3 */ '{c0: '{is_node: 1'b0, idx: 16'd0}, c1: '{is_node: 1'b1, idx: 16'd5}},
    /*  2 */ '{c0: '{is_node: 1'b1, idx: 16'd3}, c1: '{is_node: 1'b1, idx: 16'd4}},
    /*  1 */ '{c0: '{is_node: 1'b1, idx: 16'd2}, c1: '{is_node: 1'b0, idx: 16'd0}},
    /*  0 */ '{c0: '{is_node: 1'b1, idx: 16'd1}, c1: '{is_node: 1'b0, idx: 16'd0}}
  };

  // ORDER[k] is the bit examined at depth k
  localparam bitsel_t [DEPTH-1:0] ORDER = '{
    '{word: 16'd2, bitpos: 8'd5}, '{word: 16'd3, bitpos: 8'd5},
    '{word: 16'd4, bitpos: 8'd6}, '{word: 16'd5, bitpos: 8'd6},
    '{word: 16'd6, bitpos: 8'd7}, '{word: 16'd0, bitpos: 8'd5},
    '{word: 16'd7, bitpos: 8'd7}, '{word: 16'd1, bitpos: 8'd5},
    '{word: 16'd2, bitpos: 8'd6}, '{word: 16'd3, bitpos: 8'd6},
    '{word: 16'd4, bitpos: 8'd7}, '{word: 16'd5, bitpos: 8'd7},
    '{word: 16'd0, bitpos: 8'd6}, '{word: 16'd1, bitpos: 8'd6},
    '{word: 16'd2, bitpos: 8'd7}, '{word: 16'd3, bitpos: 8'd7},
    '{word: 16'd0, bitpos: 8'd7}, '{word: 16'd1, bitpos: 8'd7}
  };

endpackage
