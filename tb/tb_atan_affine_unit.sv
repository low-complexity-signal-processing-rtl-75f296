// tb_atan_affine_unit: checks the per-leaf affine evaluation.
//   - For every (x, y) with the leaf the tree would choose: the angle must
//     equal k + a*xu + b*yu computed from the rectangle bounds, one clock
//     after in_valid, and its error against atan2(y, x) must give a
//     mean-square error below 6e-4 rad^2 (the offline fit reaches 5.2e-4).
//   - For random (leaf, x, y) pairs, the same integer formula.
module tb_atan_affine_unit;
  import tb_ref_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n, in_valid, out_valid;
  logic [5:0]        leaf;
  logic [4:0]        x, y;
  logic signed [15:0] angle;
  int                checks = 0, failures = 0;

  atan_affine_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  task automatic one(input int l, input logic [4:0] xi, input logic [4:0] yi, output int got);
    @(negedge clk);
    in_valid = 1'b1; leaf = 6'(l); x = xi; y = yi;
    @(negedge clk);
    in_valid = 1'b0;
    check("out_valid", longint'(out_valid), 1);
    check("angle", longint'(angle), longint'(atan_expected(l, xi, yi)));
    got = int'(angle);
  endtask

  initial begin
    real se, err, mse, maxe;
    int  got;
    rst_n = 1'b0; in_valid = 1'b0; leaf = '0; x = '0; y = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    se = 0.0; maxe = 0.0;
    for (int xi = -16; xi < 16; xi++)
      for (int yi = -16; yi < 16; yi++) begin
        one(int'(atan_walk(5'(xi), 5'(yi)).value), 5'(xi), 5'(yi), got);
        err = real'(got) / 1024.0 - $atan2(real'(yi), real'(xi));
        se += err * err;
        if (err > maxe) maxe = err;
        if (-err > maxe) maxe = -err;
      end
    mse = se / 1024.0;
    $display("mean-square error %0.6f rad^2, max error %0.4f rad", mse, maxe);
    checks++;
    if (mse > 6.0e-4) begin failures++; $display("FAIL mse %0.6f", mse); end
    repeat (2000) one(int'($urandom % atan_tree_pkg::N_LEAVES), 5'($urandom), 5'($urandom), got);
    @(negedge clk);
    check("idle out_valid", longint'(out_valid), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
