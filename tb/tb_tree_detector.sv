// tb_tree_detector: end-to-end test of the tree detector.
//
// Windows of template plus white Gaussian noise (variance 256, H1) and of
// noise alone (H0) are offered back to back. Every decision must equal the
// walk of the tree table for that window, arrive 2*DEPTH+2 clocks after
// acceptance, and a new window must be taken every 2*DEPTH+2 clocks. The
// false-alarm and miss counts must be consistent with the design goals
// (P_F = 1e-4, P_M = 1e-5: at most 3 of each in 2000 trials). The mean
// number of levels descended under each hypothesis is reported.
module tb_tree_detector;
  import tree_pkg::*;
  import tb_ref_pkg::*;

  localparam int NW = det_tree_pkg::N_WORDS;
  localparam int D  = det_tree_pkg::DEPTH;
  localparam int NN = det_tree_pkg::N_NODES;
  localparam int TRIALS = 2000;

  logic                  clk = 1'b0;
  logic                  rst_n, in_valid, in_ready, out_valid, detect;
  logic [NW-1:0][7:0]    x;
  logic [NN-1:0]         node_active;
  int                    checks = 0, failures = 0;

  tree_detector dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2 * TRIALS * (2 * D + 4) + 1000) @(posedge clk);
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

  // scoreboard
  logic [NW-1:0][7:0] q_x   [$];
  longint             q_t   [$];
  bit                 q_h1  [$];
  longint             cyc = 0;
  longint             last_accept = -1;
  int fa = 0, miss = 0, done = 0, corr_agree = 0;
  longint levels [2] = '{0, 0};
  int     count  [2] = '{0, 0};

  always @(posedge clk) cyc <= cyc + 1;

  // monitor: acceptance and results
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      if (last_accept >= 0) check("accept interval", cyc - last_accept, 2 * D + 2);
      last_accept = cyc;
      q_x.push_back(x);
      q_t.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      walk_t w;
      logic [NW-1:0][7:0] xv;
      bit h1;
      int c, e;
      xv = q_x.pop_front();
      h1 = q_h1.pop_front();
      check("latency", cyc - q_t.pop_front(), 2 * D + 2);
      w = det_walk(xv);
      check("decision", longint'(detect), longint'(w.value));
      if (h1 && !detect) miss++;
      if (!h1 && detect) fa++;
      levels[h1] += w.depth;
      count[h1]++;
      // informational: exact correlator at the midpoint threshold
      c = 0;
      e = 0;
      for (int i = 0; i < NW; i++) e += det_tree_pkg::TEMPLATE[i] * det_tree_pkg::TEMPLATE[i];
      for (int i = 0; i < NW; i++) c += det_tree_pkg::TEMPLATE[i] * int'($signed(xv[i]));
      if ((2 * c >= e) == detect) corr_agree++;   // threshold: half the template energy
      done++;
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2 * TRIALS; n++) begin
      bit h1;
      h1 = (n % 2) == 1;
      for (int i = 0; i < NW; i++)
        x[i] = quant8((h1 ? real'(det_tree_pkg::TEMPLATE[i]) : 0.0) + gauss(16.0));
      q_h1.push_back(h1);
      in_valid = 1'b1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (2 * D + 4) @(negedge clk);
    check("all decided", done, 2 * TRIALS);
    checks++;
    if (fa > 3 || miss > 3) begin
      failures++;
      $display("FAIL false alarms %0d misses %0d", fa, miss);
    end
    $display("false alarms %0d / %0d, misses %0d / %0d, correlator agreement %0d / %0d",
             fa, count[0], miss, count[1], corr_agree, done);
    $display("mean levels descended: H0 %0.2f, H1 %0.2f",
             real'(levels[0]) / real'(count[0]), real'(levels[1]) / real'(count[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
