// tree_feeder: the control logic in front of a sparse tree.
//
// It accepts an input vector (N_WORDS words of WORD_W bits) with a
// valid/ready handshake, loads the bits named by ORDER into a shift
// register, and then drives the tree root: tree_vin high for 2*DEPTH+1
// clocks while the shift register puts bit ORDER[k] on tree_din in the
// k-th clock. In the last of those clocks the deepest leaf is reached and
// tree_rout is sampled; out_valid pulses one clock later with the sampled
// value and the vector it belongs to. tree_vin then stays low for at least
// one clock (the clock in which the next vector is accepted), which re-arms
// every node for the next descent.
//
// Timing: a vector accepted in clock t gives out_valid in clock
// t + 2*DEPTH + 2; in_ready is high again in that same clock, so a vector
// can be accepted every 2*DEPTH+2 clocks.
//
// The tree nodes have no reset. After rst_n the feeder holds tree_vin low
// for 2*DEPTH+2 clocks (FLUSH) before it accepts anything, so every node
// has seen its vin low long enough to return to idle.
//
// The design calls only for "external logic" supplying data, enable and
// clock to the root; the handshake, the flush and the sampling time are
// this implementation's choices.
module tree_feeder
  import tree_pkg::*;
#(
  parameter int unsigned N_WORDS = det_tree_pkg::N_WORDS,
  parameter int unsigned WORD_W  = det_tree_pkg::WORD_W,
  parameter int unsigned DEPTH   = det_tree_pkg::DEPTH,
  parameter int unsigned RW      = 1,
  parameter bitsel_t [DEPTH-1:0] ORDER = det_tree_pkg::ORDER
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [N_WORDS-1:0][WORD_W-1:0] in_words,
  output logic                           tree_din,
  output logic                           tree_vin,
  input  logic [RW-1:0]                  tree_rout,
  output logic                           out_valid,
  output logic [RW-1:0]                  out_result,
  output logic [N_WORDS-1:0][WORD_W-1:0] out_words
);

  localparam int unsigned RUN_CYCLES = 2 * DEPTH + 1;
  localparam int unsigned CNT_W = $clog2(RUN_CYCLES + 2);

  typedef enum logic [1:0] {FLUSH, IDLE, RUN} state_e;

  state_e             state_q;
  logic [CNT_W-1:0]   cnt_q;
  logic [DEPTH-1:0]   sr_q;
  logic [DEPTH-1:0]   sr_load;

  // bits of the vector in examination order
  always_comb begin
    for (int k = 0; k < int'(DEPTH); k++)
      sr_load[k] = in_words[int'(ORDER[k].word)][int'(ORDER[k].bitpos)];
  end

  assign in_ready = (state_q == IDLE);
  assign tree_vin = (state_q == RUN);
  assign tree_din = sr_q[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= FLUSH;
      cnt_q      <= '0;
      sr_q       <= '0;
      out_valid  <= 1'b0;
      out_result <= '0;
      out_words  <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state_q)
        FLUSH: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == CNT_W'(RUN_CYCLES)) begin
            state_q <= IDLE;
            cnt_q   <= '0;
          end
        end
        IDLE: begin
          if (in_valid) begin
            state_q   <= RUN;
            cnt_q     <= '0;
            sr_q      <= sr_load;
            out_words <= in_words;
          end
        end
        RUN: begin
          sr_q  <= sr_q >> 1;
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == CNT_W'(RUN_CYCLES - 1)) begin
            state_q    <= IDLE;
            out_valid  <= 1'b1;
            out_result <= tree_rout;
          end
        end
        default: state_q <= FLUSH;
      endcase
    end
  end

  // result is a single-clock pulse, and the root enable is low whenever a
  // result is presented (the one-clock gap every node needs to re-arm)
  a_pulse: assert property (@(posedge clk) disable iff (!rst_n) out_valid |=> !out_valid);
  a_gap:   assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> !tree_vin);
  // the root enable is never high for longer than one descent
  a_run:   assert property (@(posedge clk) disable iff (!rst_n)
                            $rose(tree_vin) |-> tree_vin [*RUN_CYCLES] ##1 !tree_vin);

endmodule
