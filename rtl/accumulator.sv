// accumulator: combines the leaf results of all DTUs into the forest result.
//
// Every DTU may deliver one leaf result per cycle; the accumulator takes all
// N_DTU of them each cycle in a two-stage pipeline:
//   stage 1 registers, per DTU, the result converted for the active mode:
//           regression  - the 14-bit float as an exact signed fixed-point
//                         number (units of 2^-22, see rf_pkg::fp14_to_fixed),
//           classification - a one-hot vote for class result[CLS_W-1:0];
//   stage 2 adds the N_DTU values (adder tree) into the 64-bit sum, or the
//           vote counts into the per-class counters, and counts the leaves.
// A result at the inputs in cycle t is in sum/votes from cycle t+2.
// clear (one cycle, before a run) zeroes the sum and counters; mode must
// stay stable during a run. win_class/win_votes give the class with most
// votes, the lowest index winning a tie. Dividing the sum by the number of
// trees (the mean) is left to the host: the register holds the exact sum.
// The Accumulator's role (sum or average for regression, majority for
// classification) is from the architecture; the fixed-point format, the
// class-label encoding and the division by the host are this design's.
module accumulator
  import rf_pkg::*;
#(
  parameter int unsigned N_DTU     = 15,
  parameter int unsigned N_CLASSES = 16,
  parameter int unsigned CNT_W     = 16,
  parameter int unsigned CLS_W     = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         mode,          // 0 regression, 1 classification
  input  logic [N_DTU-1:0]             leaf_valid,
  input  logic [RES_W-1:0]             leaf_result [N_DTU],
  output logic signed [ACC_W-1:0]      sum,
  output logic [CNT_W-1:0]             votes [N_CLASSES],
  output logic [CLS_W-1:0]             win_class,
  output logic [CNT_W-1:0]             win_votes,
  output logic [CNT_W-1:0]             leaf_count,
  output logic                         idle
);

  logic signed [ACC_W-1:0] s1_val  [N_DTU];
  logic [N_CLASSES-1:0]    s1_vote [N_DTU];
  logic [N_DTU-1:0]        s1_valid;

  logic signed [ACC_W-1:0] add_sum;
  logic [CNT_W-1:0]        add_votes [N_CLASSES];
  logic [CNT_W-1:0]        add_leaves;

  // Stage 1: per-DTU conversion.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= '0;
      for (int i = 0; i < int'(N_DTU); i++) begin
        s1_val[i]  <= '0;
        s1_vote[i] <= '0;
      end
    end else begin
      s1_valid <= clear ? '0 : leaf_valid;
      for (int i = 0; i < int'(N_DTU); i++) begin
        s1_val[i]  <= (leaf_valid[i] && !mode) ? fp14_to_fixed(leaf_result[i]) : '0;
        s1_vote[i] <= '0;
        if (leaf_valid[i] && mode)
          s1_vote[i][leaf_result[i][CLS_W-1:0]] <= 1'b1;
      end
    end
  end

  // Stage 2: reduction over the DTUs.
  always_comb begin
    add_sum    = '0;
    add_leaves = '0;
    for (int c = 0; c < int'(N_CLASSES); c++) add_votes[c] = '0;
    for (int i = 0; i < int'(N_DTU); i++) begin
      add_sum    = add_sum + s1_val[i];
      add_leaves = add_leaves + CNT_W'(s1_valid[i]);
      for (int c = 0; c < int'(N_CLASSES); c++)
        add_votes[c] = add_votes[c] + CNT_W'(s1_vote[i][c]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum        <= '0;
      leaf_count <= '0;
      for (int c = 0; c < int'(N_CLASSES); c++) votes[c] <= '0;
    end else if (clear) begin
      sum        <= '0;
      leaf_count <= '0;
      for (int c = 0; c < int'(N_CLASSES); c++) votes[c] <= '0;
    end else begin
      sum        <= sum + add_sum;
      leaf_count <= leaf_count + add_leaves;
      for (int c = 0; c < int'(N_CLASSES); c++) votes[c] <= votes[c] + add_votes[c];
    end
  end

  // Majority: first class with the largest count.
  always_comb begin
    win_class = '0;
    win_votes = votes[0];
    for (int c = 1; c < int'(N_CLASSES); c++)
      if (votes[c] > win_votes) begin
        win_class = CLS_W'(c);
        win_votes = votes[c];
      end
  end

  assign idle = ~|s1_valid;

endmodule
