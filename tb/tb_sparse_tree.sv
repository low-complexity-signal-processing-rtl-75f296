// tb_sparse_tree: drives the two example trees directly (stream and enable,
// no feeder) and checks, for a path to every leaf and for random streams:
//   - the root result stays 0 until 2*D clocks after Vin rose (D = depth of
//     the leaf reached) and equals the leaf's value from then on,
//   - at that time exactly the D internal nodes on the path are enabled,
//     and no other node was ever enabled during the descent.
// A second series runs descents back to back, Vin low for a single clock,
// where the result is checked at the sampling time 2*DEPTH only.
// The reference is a walk of the tree table (tb_ref_pkg).
module tb_sparse_tree;
  import tree_pkg::*;
  import tb_ref_pkg::*;

  localparam int DN = det_tree_pkg::N_NODES;
  localparam int AN = atan_tree_pkg::N_NODES;
  localparam int DD = det_tree_pkg::DEPTH;
  localparam int AD = atan_tree_pkg::DEPTH;

  logic          clk = 1'b0;
  logic          d_din, d_vin, a_din, a_vin;
  logic          d_rout;
  logic [5:0]    a_rout;
  logic [DN-1:0] d_nv;
  logic [AN-1:0] a_nv;
  int            checks = 0, failures = 0;

  sparse_tree #(.N_NODES(DN), .RW(1), .TREE(det_tree_pkg::TREE)) u_det (
    .clk(clk), .din(d_din), .vin(d_vin), .rout(d_rout), .node_vin(d_nv));
  sparse_tree #(.N_NODES(AN), .RW(6), .TREE(atan_tree_pkg::TREE)) u_atan (
    .clk(clk), .din(a_din), .vin(a_vin), .rout(a_rout), .node_vin(a_nv));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s got %0h exp %0h", $time, what, got, exp);
    end
  endtask

  // one descent of the detector tree for window x
  task automatic run_det(input logic [7:0][7:0] x, input bit strict);
    walk_t         w;
    logic [DN-1:0] seen;
    w = det_walk(x);
    seen = '0;
    if (strict) repeat (2 * DD + 2) @(negedge clk);
    for (int t = 0; t <= 2 * DD; t++) begin
      @(negedge clk);
      d_vin = 1'b1;
      d_din = (t < DD) ? x[det_tree_pkg::ORDER[t].word][det_tree_pkg::ORDER[t].bitpos[2:0]] : 1'($urandom);
      #1;
      seen |= d_nv;
      if (strict || t == 2 * DD) check("det rout", longint'(d_rout), (t >= 2 * int'(w.depth)) ? longint'(w.value) : 0);
      if (strict && t == 2 * int'(w.depth)) check("det path", longint'(d_nv), longint'(w.path[DN-1:0]));
    end
    if (strict) check("det activity", longint'(seen), longint'(w.path[DN-1:0]));
    @(negedge clk);
    d_vin = 1'b0;
    if (strict) repeat (2 * DD + 2) @(negedge clk);
  endtask

  task automatic run_atan(input logic [4:0] x, input logic [4:0] y, input bit strict);
    walk_t         w;
    logic [AN-1:0] seen;
    logic          b;
    w = atan_walk(x, y);
    seen = '0;
    if (strict) repeat (2 * AD + 2) @(negedge clk);
    for (int t = 0; t <= 2 * AD; t++) begin
      @(negedge clk);
      a_vin = 1'b1;
      if (t < AD) begin
        b = (atan_tree_pkg::ORDER[t].word == 0) ? x[atan_tree_pkg::ORDER[t].bitpos[2:0]]
                                                : y[atan_tree_pkg::ORDER[t].bitpos[2:0]];
        a_din = b;
      end else a_din = 1'($urandom);
      #1;
      seen |= a_nv;
      if (strict || t == 2 * AD) check("atan rout", longint'(a_rout), (t >= 2 * int'(w.depth)) ? longint'(w.value) : 0);
      if (strict && t == 2 * int'(w.depth)) check("atan path", longint'(a_nv), longint'(w.path[AN-1:0]));
    end
    if (strict) check("atan activity", longint'(seen), longint'(w.path[AN-1:0]));
    @(negedge clk);
    a_vin = 1'b0;
    if (strict) repeat (2 * AD + 2) @(negedge clk);
  endtask

  // the window that leads to a given detector leaf: set the bits of the
  // path from the root, random elsewhere
  function automatic logic [7:0][7:0] det_path_to(input int node, input bit side);
    logic [7:0][7:0] x;
    int n, d, p;
    bit s;
    int depth_of [DN];
    x = {$urandom, $urandom};
    depth_of[0] = 0;
    for (int i = 0; i < DN; i++) begin
      if (det_tree_pkg::TREE[i].c0.is_node) depth_of[det_tree_pkg::TREE[i].c0.idx] = depth_of[i] + 1;
      if (det_tree_pkg::TREE[i].c1.is_node) depth_of[det_tree_pkg::TREE[i].c1.idx] = depth_of[i] + 1;
    end
    n = node; s = side;
    while (1) begin
      d = depth_of[n];
      x[det_tree_pkg::ORDER[d].word][det_tree_pkg::ORDER[d].bitpos[2:0]] = s;
      if (n == 0) break;
      p = -1;
      for (int i = 0; i < DN; i++) begin
        if (det_tree_pkg::TREE[i].c0.is_node && int'(det_tree_pkg::TREE[i].c0.idx) == n) begin p = i; s = 1'b0; end
        if (det_tree_pkg::TREE[i].c1.is_node && int'(det_tree_pkg::TREE[i].c1.idx) == n) begin p = i; s = 1'b1; end
      end
      n = p;
    end
    return x;
  endfunction

  int leaves_hit = 0;
  int atan_leaf_seen [64];

  initial begin
    d_vin = 1'b0; d_din = 1'b0; a_vin = 1'b0; a_din = 1'b0;
    repeat (2 * DD + 4) @(negedge clk);   // clear the reset-less nodes
    // every detector leaf
    for (int i = 0; i < DN; i++) begin
      for (int s = 0; s < 2; s++) begin
        branch_t br;
        br = s ? det_tree_pkg::TREE[i].c1 : det_tree_pkg::TREE[i].c0;
        if (!br.is_node) begin
          logic [7:0][7:0] x;
          walk_t w;
          x = det_path_to(i, 1'(s));
          w = det_walk(x);
          check("det path builder", longint'(w.value), longint'(br.idx));
          run_det(x, 1'b1);
          leaves_hit++;
        end
      end
    end
    check("det leaves", leaves_hit, DN + 1);
    repeat (200) run_det({$urandom, $urandom}, 1'b1);
    // back to back: Vin low for one clock only; the result is checked
    // when the feeder samples it, 2*DEPTH clocks after Vin rose
    repeat (400) run_det({$urandom, $urandom}, 1'b0);
    // every arctangent input
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) begin
        run_atan(5'(x), 5'(y), 1'b1);
        run_atan(5'($urandom), 5'($urandom), 1'b0);
        atan_leaf_seen[atan_walk(5'(x), 5'(y)).value]++;
      end
    for (int l = 0; l < int'(atan_tree_pkg::N_LEAVES); l++)
      if (atan_leaf_seen[l] == 0) begin failures++; $display("FAIL atan leaf %0d never reached", l); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
