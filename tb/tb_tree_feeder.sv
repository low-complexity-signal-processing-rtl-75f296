// tb_tree_feeder: checks the tree control logic on its own, with the tree
// replaced by a random result input. After reset Vin must stay low and
// in_ready low for 2*DEPTH+2 clocks. For every accepted vector Vin must be
// high for exactly 2*DEPTH+1 clocks, Din must carry bit ORDER[k] of the
// vector in the k-th of them, the result must be the tree output of the
// last of them, and out_valid must come 2*DEPTH+2 clocks after acceptance
// together with the vector. Vectors are offered back to back and with
// random idle gaps.
module tb_tree_feeder;
  import tree_pkg::*;

  localparam int NW = det_tree_pkg::N_WORDS;
  localparam int WW = det_tree_pkg::WORD_W;
  localparam int D  = det_tree_pkg::DEPTH;

  logic                   clk = 1'b0;
  logic                   rst_n, in_valid, in_ready, tree_din, tree_vin, tree_rout;
  logic                   out_valid, out_result;
  logic [NW-1:0][WW-1:0]  in_words, out_words;
  int                     checks = 0, failures = 0;

  tree_feeder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  int flush_cycles, back_to_back = 0, gaps = 0;

  initial begin
    logic [NW-1:0][WW-1:0] v;
    logic                  exp_res;
    rst_n = 1'b0; in_valid = 1'b0; in_words = '0; tree_rout = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    flush_cycles = 0;
    #1;
    while (!in_ready) begin
      check("flush vin", longint'(tree_vin), 0);
      @(negedge clk); #1;
      flush_cycles++;
    end
    check("flush length", flush_cycles, 2 * D + 2);
    for (int n = 0; n < 500; n++) begin
      // offer a vector in this clock (in_ready is high)
      v = {$urandom, $urandom};
      in_valid = 1'b1;
      in_words = v;
      check("ready", longint'(in_ready), 1);
      check("idle vin", longint'(tree_vin), 0);
      for (int k = 0; k <= 2 * D; k++) begin
        @(negedge clk);
        in_valid  = 1'($urandom);       // ignored while busy
        in_words  = {$urandom, $urandom};
        tree_rout = 1'($urandom);
        #1;
        if (k == 2 * D) exp_res = tree_rout;
        check("run vin", longint'(tree_vin), 1);
        check("run ready", longint'(in_ready), 0);
        check("run out_valid", longint'(out_valid), 0);
        if (k < D)
          check("din", longint'(tree_din), longint'(v[det_tree_pkg::ORDER[k].word][det_tree_pkg::ORDER[k].bitpos[2:0]]));
      end
      @(negedge clk);
      in_valid = 1'b0;
      #1;
      check("out_valid", longint'(out_valid), 1);
      check("result", longint'(out_result), longint'(exp_res));
      check("words", longint'(out_words), longint'(v));
      check("vin low", longint'(tree_vin), 0);
      // next vector right away or after an idle gap
      if ($urandom % 2) begin
        back_to_back++;
      end else begin
        gaps++;
        repeat (1 + $urandom % 4) begin
          @(negedge clk); #1;
          check("gap vin", longint'(tree_vin), 0);
          check("gap out_valid", longint'(out_valid), 0);
        end
      end
    end
    if (back_to_back == 0 || gaps == 0) begin failures++; $display("FAIL no back-to-back or no gap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
