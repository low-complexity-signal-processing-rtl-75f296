// tb_sparse_tree_325: a sparse tree of the size quoted for the 64-sample
// rifle-signature detector, 325 internal nodes and 326 leaves. The tree
// shape and the H1/H0 leaf labels are pseudo-random (built at elaboration
// by a linear congruential generator, breadth first, each branch becoming
// a node with probability 5/8 until 325 nodes exist). Random bit streams
// are sent down the tree, half of them steered toward deep leaves; the root result at 2*depth clocks, the set of
// enabled nodes and the absence of activity elsewhere are checked against
// a walk of the same table.
module tb_sparse_tree_325;
  import tree_pkg::*;

  localparam int N = 325;

  typedef node_t [N-1:0] tree_t;

  function automatic tree_t make_tree();
    tree_t       t;
    int unsigned seed;
    int          next;
    seed = 32'd12345;
    next = 1;
    for (int i = 0; i < N; i++) begin
      for (int s = 0; s < 2; s++) begin
        branch_t br;
        bit      grow;
        seed = seed * 32'd1103515245 + 32'd12345;
        grow = ((seed >> 16) % 8) < 5;
        // keep the tree growing until all N nodes exist
        if (next == i + 1 && s == 1 && next < N) grow = 1'b1;
        if (grow && next < N) begin
          br.is_node = 1'b1;
          br.idx     = IDX_W'(next);
          next++;
        end else begin
          seed = seed * 32'd1103515245 + 32'd12345;
          br.is_node = 1'b0;
          br.idx     = IDX_W'((seed >> 20) & 1);
        end
        if (s == 0) t[i].c0 = br; else t[i].c1 = br;
      end
    end
    return t;
  endfunction

  localparam tree_t TREE = make_tree();

  function automatic int tree_depth();
    int d [N];
    int m;
    d[0] = 0;
    m = 0;
    for (int i = 0; i < N; i++) begin
      if (TREE[i].c0.is_node) d[TREE[i].c0.idx] = d[i] + 1;
      if (TREE[i].c1.is_node) d[TREE[i].c1.idx] = d[i] + 1;
      if (d[i] + 1 > m) m = d[i] + 1;
    end
    return m;
  endfunction

  localparam int D = tree_depth();

  logic         clk = 1'b0;
  logic         din, vin, rout;
  logic [N-1:0] nv;
  int           checks = 0, failures = 0;

  sparse_tree #(.N_NODES(N), .RW(1), .TREE(TREE)) dut (
    .clk(clk), .din(din), .vin(vin), .rout(rout), .node_vin(nv));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000 * (4 * D + 8)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s got %0d exp %0d", $time, what, got, exp);
    end
  endtask

  int leaves = 0, h1 = 0, maxd = 0;
  int leaf_seen [N][2];

  initial begin
    logic [255:0] bits;
    logic [N-1:0] path, seen;
    int           node, depth, value;
    branch_t      br;
    for (int i = 0; i < N; i++) begin
      if (!TREE[i].c0.is_node) begin leaves++; h1 += TREE[i].c0.idx; end
      if (!TREE[i].c1.is_node) begin leaves++; h1 += TREE[i].c1.idx; end
    end
    check("leaf count", leaves, N + 1);
    $display("tree: %0d internal nodes, %0d leaves (%0d H1), depth %0d", N, leaves, h1, D);
    din = 1'b0; vin = 1'b0;
    repeat (2 * D + 4) @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      bits = {8{$urandom}};
      // reference walk
      path = '0; node = 0; depth = 0; value = 0;
      while (1) begin
        path[node] = 1'b1;
        // every other descent prefers branches that lead deeper
        if (n % 2 == 1 && TREE[node].c0.is_node != TREE[node].c1.is_node && ($urandom % 8) != 0)
          bits[depth] = TREE[node].c1.is_node;
        br = bits[depth] ? TREE[node].c1 : TREE[node].c0;
        depth++;
        if (!br.is_node) begin
          value = int'(br.idx);
          leaf_seen[node][bits[depth-1]] = 1;
          break;
        end
        node = int'(br.idx);
      end
      if (depth > maxd) maxd = depth;
      seen = '0;
      for (int t = 0; t <= 2 * D; t++) begin
        @(negedge clk);
        vin = 1'b1;
        din = (t < 256) ? bits[t] : 1'b0;
        #1;
        seen |= nv;
        check("rout", longint'(rout), (t >= 2 * depth) ? longint'(value) : 0);
        if (t == 2 * depth) begin
          checks++;
          if (nv != path) begin failures++; if (failures < 10) $display("FAIL path"); end
        end
      end
      checks++;
      if (seen != path) begin failures++; if (failures < 10) $display("FAIL off-path activity"); end
      @(negedge clk);
      vin = 1'b0;
      repeat (2 * D + 2) @(negedge clk);
    end
    $display("deepest leaf reached: %0d", maxd);
    checks++;
    if (maxd < D - 5) begin failures++; $display("FAIL deep leaves not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
