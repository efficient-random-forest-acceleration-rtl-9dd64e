// tb_accumulator: self-checking test of the Accumulator.
//
// Drives random leaf results from 15 DTUs for many cycles, in regression
// and in classification mode, and compares the sum (reference computed
// through real arithmetic), the leaf count, the per-class votes and the
// majority class with a model. Also checks the two-cycle latency of a single
// result, that clear zeroes everything, and the idle flag.
module tb_accumulator;
  import rf_pkg::*;
  `include "tb_forest.svh"

  localparam int N = 15, NC = 16;
  logic clk = 0, rst_n = 0;
  logic clear, mode, idle;
  logic [N-1:0] leaf_valid;
  logic [13:0] leaf_result [N];
  logic signed [63:0] sum;
  logic [15:0] votes [NC];
  logic [3:0] win_class;
  logic [15:0] win_votes, leaf_count;
  int checks = 0, failures = 0;

  accumulator #(.N_DTU(N), .N_CLASSES(NC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(bit m, int ncyc);
    longint esum;
    int ecnt, ev [NC], best, bestc;
    esum = 0; ecnt = 0;
    for (int c = 0; c < NC; c++) ev[c] = 0;
    @(negedge clk);
    mode = m; clear = 1;
    @(negedge clk);
    clear = 0;
    check(sum == 0 && leaf_count == 0, "cleared");
    for (int k = 0; k < ncyc; k++) begin
      for (int i = 0; i < N; i++) begin
        leaf_valid[i] = ($urandom_range(0, 2) != 0);
        if (m) leaf_result[i] = 14'($urandom_range(0, NC - 1)) | (14'($urandom) & 14'h3ff0);
        else leaf_result[i] = {1'($urandom), 5'($urandom_range(0, 30)), 8'($urandom)};
        if (leaf_valid[i]) begin
          ecnt++;
          if (m) ev[leaf_result[i][3:0]]++;
          else esum += r14_fixed(leaf_result[i]);
        end
      end
      @(negedge clk);
    end
    leaf_valid = '0;
    check(!idle, "busy right after the last input");
    @(negedge clk);
    @(negedge clk);
    check(idle, "idle after drain");
    check(leaf_count == 16'(ecnt), $sformatf("leaf count %0d exp %0d", leaf_count, ecnt));
    if (!m) check(sum == esum, $sformatf("sum %0d exp %0d", sum, esum));
    else begin
      best = 0; bestc = ev[0];
      for (int c = 0; c < NC; c++) begin
        check(votes[c] == 16'(ev[c]), $sformatf("votes[%0d] %0d exp %0d", c, votes[c], ev[c]));
        if (ev[c] > bestc) begin best = c; bestc = ev[c]; end
      end
      check(win_class == 4'(best) && win_votes == 16'(bestc), "majority class");
      check(sum == 0, "no sum in classification mode");
    end
  endtask

  initial begin
    clear = 0; mode = 0; leaf_valid = '0;
    foreach (leaf_result[i]) leaf_result[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // latency of one result: in at cycle t, visible from t+2
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    leaf_valid[3] = 1; leaf_result[3] = 14'h0f00;   // 1.0
    @(negedge clk); leaf_valid = '0;
    check(sum == 0, "not visible after one cycle");
    @(negedge clk);
    check(sum == 64'sd4194304, "1.0 visible after two cycles");
    run(0, 200);
    run(1, 200);
    run(0, 50);
    // classification tie: lowest class wins
    @(negedge clk); mode = 1; clear = 1; @(negedge clk); clear = 0;
    leaf_valid = 15'b11; leaf_result[0] = 14'd9; leaf_result[1] = 14'd4;
    @(negedge clk); leaf_valid = '0;
    @(negedge clk); @(negedge clk);
    check(win_class == 4'd4 && win_votes == 16'd1, "tie goes to the lower class");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
