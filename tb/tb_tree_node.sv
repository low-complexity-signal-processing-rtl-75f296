// tb_tree_node: checks one tree node cycle by cycle against a model of its
// timing: Dout is Din one clock later (zero while disabled), the branch
// outputs follow Vin two clocks later, the bit present when Vin rose
// chooses Voutr (1) or Voutl (0), and Rout is the OR of the child results.
// Vin is toggled with random run lengths, including one-clock gaps.
module tb_tree_node;
  localparam int RW = 3;

  logic          clk = 1'b0;
  logic          din, vin, dout, voutl, voutr;
  logic [RW-1:0] routl, routr, rout;
  int            checks = 0, failures = 0;

  tree_node #(.RW(RW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [RW-1:0] got, input logic [RW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s got %0h exp %0h", $time, what, got, exp);
    end
  endtask

  // input history: index 1 = previous cycle, 2 = two cycles ago, ...
  logic vin_h [1:3];
  logic din_h [1:3];
  logic lb;       // bit latched by the model
  int   run_left;
  int   rises = 0, takes_r = 0, takes_l = 0;

  initial begin
    vin = 1'b0; din = 1'b0; routl = '0; routr = '0;
    for (int i = 1; i <= 3; i++) begin vin_h[i] = 1'b0; din_h[i] = 1'b0; end
    lb = 1'b0;
    run_left = 0;
    // flush: the node has no reset
    repeat (4) @(negedge clk);
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // new inputs for this cycle
      if (run_left == 0) begin
        if (vin) begin
          vin = 1'b0;
          run_left = 1 + ($urandom % 3);    // low for 1..3 clocks
        end else begin
          vin = 1'b1;
          run_left = 1 + ($urandom % 8);    // high for 1..8 clocks
        end
      end
      run_left--;
      din   = 1'($urandom);
      routl = RW'($urandom);
      routr = RW'($urandom);
      // model: latch when Vin went 0->1 two clocks earlier
      if (vin_h[2] && !vin_h[3]) lb = din_h[2];
      #1;
      check("dout",  RW'(dout),  RW'(1'(din_h[1] & vin_h[1])));
      check("voutr", RW'(voutr), RW'(1'(vin_h[2] & lb)));
      check("voutl", RW'(voutl), RW'(1'(vin_h[2] & ~lb)));
      check("rout",  rout, routl | routr);
      if (vin && !vin_h[1]) rises++;
      if (voutr) takes_r++;
      if (voutl) takes_l++;
      vin_h[3] = vin_h[2]; vin_h[2] = vin_h[1]; vin_h[1] = vin;
      din_h[3] = din_h[2]; din_h[2] = din_h[1]; din_h[1] = din;
    end
    if (rises < 100 || takes_r == 0 || takes_l == 0) begin
      failures++;
      $display("FAIL too little activity: rises %0d right %0d left %0d", rises, takes_r, takes_l);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
