// tb_tree_atan2: end-to-end test of the tree arctangent. All 1024 (x, y)
// pairs are offered back to back, then 1000 random pairs with random idle
// gaps. Each result must carry the leaf found by walking the tree table and
// the angle computed from that leaf's rectangle, arrive 2*DEPTH+3 clocks
// after acceptance, and the pairs must be taken every 2*DEPTH+2 clocks when
// offered continuously. The exhaustive pass must reach all 41 rectangles and
// give a mean-square error below 6e-4 rad^2 against atan2.
module tb_tree_atan2;
  import tb_ref_pkg::*;

  localparam int D = atan_tree_pkg::DEPTH;

  logic               clk = 1'b0;
  logic               rst_n, in_valid, in_ready, out_valid;
  logic [4:0]         x, y;
  logic [5:0]         leaf;
  logic signed [15:0] angle;
  int                 checks = 0, failures = 0;

  tree_atan2 dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2100 * (2 * D + 8) + 1000) @(posedge clk);
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

  logic [9:0] q_xy [$];
  longint     q_t  [$];
  longint     cyc = 0, last_accept = -1;
  bit         continuous = 1'b1;
  int         done = 0, leaf_hits [64];
  real        se = 0.0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      if (continuous && last_accept >= 0) check("accept interval", cyc - last_accept, 2 * D + 2);
      last_accept = cyc;
      q_xy.push_back({y, x});
      q_t.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      logic [9:0] xy;
      int         l;
      real        err;
      xy = q_xy.pop_front();
      check("latency", cyc - q_t.pop_front(), 2 * D + 3);
      l = int'(atan_walk(xy[4:0], xy[9:5]).value);
      check("leaf", longint'(leaf), longint'(l));
      check("angle", longint'(angle), longint'(atan_expected(l, xy[4:0], xy[9:5])));
      if (done < 1024) begin
        leaf_hits[l]++;
        err = real'(angle) / 1024.0 - $atan2(real'($signed(xy[9:5])), real'($signed(xy[4:0])));
        se += err * err;
      end
      done++;
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x = '0; y = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1024; n++) begin
      x = 5'(n); y = 5'(n >> 5);
      in_valid = 1'b1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    continuous = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      repeat ($urandom % 3) @(negedge clk);
      x = 5'($urandom); y = 5'($urandom);
      in_valid = 1'b1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 1'b0;
    end
    repeat (2 * D + 6) @(negedge clk);
    check("all results", done, 2024);
    for (int l = 0; l < int'(atan_tree_pkg::N_LEAVES); l++) begin
      checks++;
      if (leaf_hits[l] == 0) begin failures++; $display("FAIL rectangle %0d never used", l); end
    end
    $display("mean-square error %0.6f rad^2", se / 1024.0);
    checks++;
    if (se / 1024.0 > 6.0e-4) begin failures++; $display("FAIL mse"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
