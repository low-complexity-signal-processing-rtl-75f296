// tb_tree_classifier_top: runs both engines of the top level at their
// default sizes, at the same time, and checks every result against the
// reference walks of the tree tables.
//
// Detector: noisy windows with and without the template, offered back to
// back or with idle gaps. Arctangent: every (x, y) pair once, then random
// pairs. Each mechanism of the design is counted and must occur:
//   flush      - after reset neither engine is ready for 2*DEPTH+2 clocks
//   h1 / h0    - detections and rejections
//   early      - a decision at depth <= 2 (most of the tree never enabled)
//   deep       - a decision at depth >= 10
//   idle nodes - during a descent no node off the path (or the previous
//                path, still draining) is ever enabled
//   gap1       - a new descent started after Vin was low for one clock
//   rect       - every arctangent rectangle used
//   wrap       - both sides of the +-pi cut (x < 0, y = 0 and y = -1)
module tb_tree_classifier_top;
  import tb_ref_pkg::*;

  localparam int NW = det_tree_pkg::N_WORDS;
  localparam int DD = det_tree_pkg::DEPTH;
  localparam int NN = det_tree_pkg::N_NODES;
  localparam int AD = atan_tree_pkg::DEPTH;
  localparam int N_DET = 3000;

  logic               clk = 1'b0;
  logic               rst_n;
  logic               det_in_valid, det_in_ready, det_out_valid, det_detect;
  logic [NW-1:0][7:0] det_x;
  logic [NN-1:0]      det_node_active;
  logic               atan_in_valid, atan_in_ready, atan_out_valid;
  logic [4:0]         atan_x, atan_y;
  logic [5:0]         atan_leaf;
  logic signed [15:0] atan_angle;
  int                 checks = 0, failures = 0;

  tree_classifier_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N_DET * (2 * DD + 6) + 2000) @(posedge clk);
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

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_flush = 0, n_h1 = 0, n_h0 = 0, n_early = 0, n_deep = 0, n_idle_ok = 0;
  int n_gap1 = 0, n_wrap_pos = 0, n_wrap_neg = 0, rect_hits [64];

  // ---------------- detector scoreboard ----------------
  logic [NW-1:0][7:0] dq_x [$];
  longint             dq_t [$];
  logic [63:0]        prev_path = '0, cur_path = '0, seen = '0;
  int                 d_done = 0;
  bit                 flushed = 1'b0;

  always @(posedge clk) begin
    // activity is watched from the end of the flush on: before it the
    // reset-less nodes may hold any power-up state
    if (rst_n && det_in_ready) flushed <= 1'b1;
    if (!flushed) seen <= '0;
    else seen <= seen | 64'(det_node_active);
    if (rst_n && det_in_valid && det_in_ready) begin
      if (det_out_valid) n_gap1++;   // accepted in the clock the previous result appeared
      dq_x.push_back(det_x);
      dq_t.push_back(cyc);
    end
    if (rst_n && det_out_valid) begin
      walk_t w;
      w = det_walk(dq_x.pop_front());
      check("det latency", cyc - dq_t.pop_front(), 2 * DD + 2);
      check("det decision", longint'(det_detect), longint'(w.value));
      if (det_detect) n_h1++; else n_h0++;
      if (w.depth <= 2) n_early++;
      if (w.depth >= 10) n_deep++;
      // nodes enabled since the previous result: this path and the tail of
      // the previous one only
      checks++;
      if ((seen & ~(w.path | prev_path)) != 0) begin
        failures++;
        $display("FAIL off-path node enabled: %h", seen & ~(w.path | prev_path));
      end else n_idle_ok++;
      prev_path = w.path;
      seen <= 64'(det_node_active);
      d_done++;
    end
  end

  // ---------------- arctangent scoreboard ----------------
  logic [9:0] aq [$];
  longint     aq_t [$];
  int         a_done = 0;

  always @(posedge clk) begin
    if (rst_n && atan_in_valid && atan_in_ready) begin
      aq.push_back({atan_y, atan_x});
      aq_t.push_back(cyc);
    end
    if (rst_n && atan_out_valid) begin
      logic [9:0] xy;
      int         l;
      xy = aq.pop_front();
      check("atan latency", cyc - aq_t.pop_front(), 2 * AD + 3);
      l = int'(atan_walk(xy[4:0], xy[9:5]).value);
      check("atan leaf", longint'(atan_leaf), longint'(l));
      check("atan angle", longint'(atan_angle), longint'(atan_expected(l, xy[4:0], xy[9:5])));
      rect_hits[l]++;
      if ($signed(xy[4:0]) < 0 && xy[9:5] == 5'd0 && atan_angle > 16'sd3000) n_wrap_pos++;
      if ($signed(xy[4:0]) < 0 && xy[9:5] == 5'h1f && atan_angle < -16'sd3000) n_wrap_neg++;
      a_done++;
    end
  end

  // ---------------- stimulus ----------------
  initial begin : det_stim
    int fl;
    rst_n = 1'b0; det_in_valid = 1'b0; det_x = '0;
    atan_in_valid = 1'b0; atan_x = '0; atan_y = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fl = 0;
    #1;
    while (!det_in_ready) begin
      if (fl < 2 * AD + 2) check("flush: atan not ready", longint'(atan_in_ready), 0);
      if (fl == 2 * AD + 2) check("flush: atan ready", longint'(atan_in_ready), 1);
      @(negedge clk); #1;
      fl++;
    end
    check("det flush length", fl, 2 * DD + 2);
    if (fl == 2 * DD + 2) n_flush++;
    for (int n = 0; n < N_DET; n++) begin
      bit h1;
      h1 = ($urandom % 2) == 1;
      for (int i = 0; i < NW; i++)
        det_x[i] = quant8((h1 ? real'(det_tree_pkg::TEMPLATE[i]) : 0.0) + gauss(16.0));
      det_in_valid = 1'b1;
      @(posedge clk);
      while (!det_in_ready) @(posedge clk);
      @(negedge clk);
      det_in_valid = 1'b0;
      if ($urandom % 4 == 0) repeat (1 + $urandom % 60) @(negedge clk);
    end
    repeat (2 * DD + 6) @(negedge clk);
    check("det results", d_done, N_DET);
    check("atan results", a_done, 3024);
    for (int l = 0; l < int'(atan_tree_pkg::N_LEAVES); l++) begin
      checks++;
      if (rect_hits[l] == 0) begin failures++; $display("FAIL rectangle %0d never used", l); end
    end
    $display("mechanisms: flush %0d h1 %0d h0 %0d early %0d deep %0d idle_nodes_ok %0d gap1 %0d wrap+ %0d wrap- %0d",
             n_flush, n_h1, n_h0, n_early, n_deep, n_idle_ok, n_gap1, n_wrap_pos, n_wrap_neg);
    if (n_flush == 0) begin failures++; $display("FAIL mechanism flush never seen"); end
    if (n_h1 == 0) begin failures++; $display("FAIL mechanism h1 never seen"); end
    if (n_h0 == 0) begin failures++; $display("FAIL mechanism h0 never seen"); end
    if (n_early == 0) begin failures++; $display("FAIL mechanism early never seen"); end
    if (n_deep == 0) begin failures++; $display("FAIL mechanism deep never seen"); end
    if (n_idle_ok == 0) begin failures++; $display("FAIL mechanism idle nodes never seen"); end
    if (n_gap1 == 0) begin failures++; $display("FAIL mechanism gap1 never seen"); end
    if (n_wrap_pos == 0 || n_wrap_neg == 0) begin failures++; $display("FAIL mechanism wrap never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : atan_stim
    @(posedge rst_n);
    for (int n = 0; n < 3024; n++) begin
      @(negedge clk);
      if (n < 1024) begin atan_x = 5'(n); atan_y = 5'(n >> 5); end
      else begin atan_x = 5'($urandom); atan_y = 5'($urandom); end
      atan_in_valid = 1'b1;
      @(posedge clk);
      while (!atan_in_ready) @(posedge clk);
      @(negedge clk);
      atan_in_valid = 1'b0;
    end
  end
endmodule
