// tb_ref_pkg: reference models for the testbenches.
//
// They evaluate the example trees by walking the tree tables directly
// (no clocked hardware), compute the arctangent approximation from the
// rectangle bounds with plain integer arithmetic, and provide the clocking
// and noise helpers the testbenches share.
package tb_ref_pkg;
  import tree_pkg::*;

  typedef struct {
    int unsigned value;   // leaf value (H1 = 1 / leaf number)
    int unsigned depth;   // leaf depth = bits examined
    logic [63:0] path;    // internal nodes visited
  } walk_t;

  // Detector tree walk; x[i] is sample i.
  function automatic walk_t det_walk(input logic [det_tree_pkg::N_WORDS-1:0][det_tree_pkg::WORD_W-1:0] x);
    walk_t   w;
    int      node;
    branch_t br;
    logic    b;
    w.path = '0;
    node = 0;
    for (int d = 0; d < int'(det_tree_pkg::DEPTH); d++) begin
      w.path[node] = 1'b1;
      b  = x[det_tree_pkg::ORDER[d].word][det_tree_pkg::ORDER[d].bitpos[2:0]];
      br = b ? det_tree_pkg::TREE[node].c1 : det_tree_pkg::TREE[node].c0;
      if (!br.is_node) begin
        w.value = br.idx;
        w.depth = d + 1;
        return w;
      end
      node = int'(br.idx);
    end
    $fatal(1, "det_walk: ran past DEPTH");
    return w;
  endfunction

  // Arctangent tree walk; word 0 = x, word 1 = y.
  function automatic walk_t atan_walk(input logic [4:0] x, input logic [4:0] y);
    walk_t   w;
    int      node;
    branch_t br;
    logic    b;
    w.path = '0;
    node = 0;
    for (int d = 0; d < int'(atan_tree_pkg::DEPTH); d++) begin
      w.path[node] = 1'b1;
      b  = (atan_tree_pkg::ORDER[d].word == 0) ? x[atan_tree_pkg::ORDER[d].bitpos[2:0]]
                                               : y[atan_tree_pkg::ORDER[d].bitpos[2:0]];
      br = b ? atan_tree_pkg::TREE[node].c1 : atan_tree_pkg::TREE[node].c0;
      if (!br.is_node) begin
        w.value = br.idx;
        w.depth = d + 1;
        return w;
      end
      node = int'(br.idx);
    end
    $fatal(1, "atan_walk: ran past DEPTH");
    return w;
  endfunction

  // k + a*xu + b*yu, with xu = (x - (-16)) mod 2^ux: the distance of x from
  // the bottom of its aligned block of 2^ux values.
  function automatic int atan_expected(input int leaf, input logic [4:0] x, input logic [4:0] y);
    atan_tree_pkg::leaf_coef_t c;
    int xs, ys, xu, yu;
    c  = atan_tree_pkg::COEF[leaf];
    xs = int'($signed(x));
    ys = int'($signed(y));
    xu = (xs + 16) % (1 << c.ux);
    yu = (ys + 16) % (1 << c.uy);
    return int'(c.k) + int'(c.a) * xu + int'(c.b) * yu;
  endfunction

  // Gaussian sample (Box-Muller) with standard deviation sigma.
  function automatic real gauss(input real sigma);
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return sigma * $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic logic [7:0] quant8(input real v);
    int q;
    q = (v >= 0.0) ? int'(v + 0.5) : -int'(-v + 0.5);
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return 8'(q);
  endfunction

endpackage
