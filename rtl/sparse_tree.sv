// sparse_tree: the parallel layout of a sparse binary tree classifier.
//
// N_NODES copies of tree_node are wired according to TREE (see tree_pkg):
// the stream din and the enable vin enter node 0, the root; every other
// node takes its din from its parent's dout and its vin from the parent's
// voutl (reached by a 0 bit) or voutr (reached by a 1 bit). Leaves need no
// hardware of their own: the parent's routl/routr input is the child's rout
// when the branch leads to a node, and the branch's enable ANDed with the
// leaf value when it leads to a leaf. Only the nodes on the active path
// ever see vin high, so only they toggle. rout at the root is the value of
// the leaf that was reached (0 while no leaf with a nonzero value is
// enabled).
//
// Timing: a node at depth L is enabled 2L clocks after the root and
// examines the bit that entered din L clocks after vin rose. A leaf at
// depth D drives rout from 2D clocks after vin rose until vin falls.
// node_vin shows the enable of every node, for observing activity.
//
// TREE must be numbered so that every node is reached from exactly one
// parent with a smaller number; an elaboration check enforces it.
module sparse_tree
  import tree_pkg::*;
#(
  parameter int unsigned N_NODES = det_tree_pkg::N_NODES,
  parameter int unsigned RW      = 1,
  parameter node_t [N_NODES-1:0] TREE = det_tree_pkg::TREE
) (
  input  logic               clk,
  input  logic               din,
  input  logic               vin,
  output logic [RW-1:0]      rout,
  output logic [N_NODES-1:0] node_vin
);

  // Parent of node n and the branch (0/1) that leads to it; -1 for the root.
  function automatic int parent_of(int n);
    int p;
    p = -1;
    for (int unsigned i = 0; i < N_NODES; i++) begin
      if (TREE[i].c0.is_node && int'(TREE[i].c0.idx) == n) p = int'(i);
      if (TREE[i].c1.is_node && int'(TREE[i].c1.idx) == n) p = int'(i);
    end
    return p;
  endfunction

  function automatic int parent_count(int n);
    int c;
    c = 0;
    for (int unsigned i = 0; i < N_NODES; i++) begin
      if (TREE[i].c0.is_node && int'(TREE[i].c0.idx) == n) c++;
      if (TREE[i].c1.is_node && int'(TREE[i].c1.idx) == n) c++;
    end
    return c;
  endfunction

  function automatic bit parent_branch(int n);
    bit b;
    b = 1'b0;
    for (int unsigned i = 0; i < N_NODES; i++)
      if (TREE[i].c1.is_node && int'(TREE[i].c1.idx) == n) b = 1'b1;
    return b;
  endfunction

  logic [N_NODES-1:0] n_din, n_dout, n_voutl, n_voutr;
  logic [RW-1:0]      n_rout  [N_NODES];
  logic [RW-1:0]      n_routl [N_NODES];
  logic [RW-1:0]      n_routr [N_NODES];

  for (genvar n = 0; n < N_NODES; n++) begin : g_node
    localparam int PARENT = parent_of(n);
    localparam bit BRANCH = parent_branch(n);
    localparam int CHILD0 = int'(TREE[n].c0.idx);
    localparam int CHILD1 = int'(TREE[n].c1.idx);

    if (n == 0) begin : g_root
      if (PARENT != -1) begin : g_err
        $error("sparse_tree: the root must have no parent");
      end
      assign n_din[n]    = din;
      assign node_vin[n] = vin;
    end else begin : g_child
      if (parent_count(n) != 1 || PARENT >= n) begin : g_err
        $error("sparse_tree: node %0d needs exactly one parent with a smaller number", n);
      end
      assign n_din[n]    = n_dout[PARENT];
      assign node_vin[n] = BRANCH ? n_voutr[PARENT] : n_voutl[PARENT];
    end

    // bit-0 branch
    if (TREE[n].c0.is_node) begin : g_l_node
      assign n_routl[n] = n_rout[CHILD0];
    end else begin : g_l_leaf
      assign n_routl[n] = {RW{n_voutl[n]}} & RW'(TREE[n].c0.idx);
    end
    // bit-1 branch
    if (TREE[n].c1.is_node) begin : g_r_node
      assign n_routr[n] = n_rout[CHILD1];
    end else begin : g_r_leaf
      assign n_routr[n] = {RW{n_voutr[n]}} & RW'(TREE[n].c1.idx);
    end

    tree_node #(.RW(RW)) u_node (
      .clk   (clk),
      .din   (n_din[n]),
      .vin   (node_vin[n]),
      .dout  (n_dout[n]),
      .voutl (n_voutl[n]),
      .voutr (n_voutr[n]),
      .routl (n_routl[n]),
      .routr (n_routr[n]),
      .rout  (n_rout[n])
    );
  end

  assign rout = n_rout[0];

endmodule
