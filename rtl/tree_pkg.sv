// tree_pkg: types shared by the sparse tree classifier blocks.
//
// A tree is described node by node. Each internal node has two branches:
// c0 is taken when the examined bit is 0 (the node's Voutl), c1 when it is
// 1 (Voutr). A branch leads either to another internal node (is_node = 1,
// idx = that node's number) or to a leaf (is_node = 0, idx = the value the
// leaf returns to the root: 1/0 for an H1/H0 detector leaf, or a leaf
// number for an estimator). Nodes are numbered breadth first, root = 0, so a
// node's depth equals the position of its bit in the examination order.
// The examination order is a list of (word, bit position) pairs.
package tree_pkg;

  localparam int unsigned IDX_W = 16;

  typedef struct packed {
    logic             is_node;
    logic [IDX_W-1:0] idx;
  } branch_t;

  typedef struct packed {
    branch_t c1;   // bit = 1 (right)
    branch_t c0;   // bit = 0 (left)
  } node_t;

  typedef struct packed {
    logic [15:0] word;
    logic [7:0]  bitpos;
  } bitsel_t;

endpackage
