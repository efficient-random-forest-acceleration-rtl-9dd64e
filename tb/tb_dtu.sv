// tb_dtu: self-checking test of the Decision Tree Unit.
//
// Loads random forests (depth up to 9, 32 features) into the unit's tree
// memory through port A, runs it on random samples and checks
//   * the multiset of leaf results against a reference walk of each tree,
//   * one leaf result per tree,
//   * the exact number of cycles from start to done (five cycles per node
//     visited by the busiest subset, plus the start-up),
//   * busy during the run, and a read-back of the memory through port A.
// Forests of 12, 5, 3 and 1 trees cover full subsets, subsets of n and n+1
// trees, and empty subsets whose header words are ignored.
module tb_dtu;
  import rf_pkg::*;
  `include "tb_forest.svh"

  localparam int MEM_DEPTH = 8192;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, leaf_valid;
  logic [13:0] leaf_result;
  logic [15:0] features [32];
  logic mem_en, mem_we; logic [3:0] mem_strb; logic [12:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0;
  int cyc = 0;

  dtu #(.MEM_DEPTH(MEM_DEPTH), .N_FEAT(32)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic [13:0] got [$];
  always @(posedge clk) if (leaf_valid) got.push_back(leaf_result);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic load(logic [31:0] img [], int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      mem_en = 1; mem_we = 1; mem_strb = 4'hf; mem_addr = 13'(i); mem_wdata = img[i];
    end
    @(negedge clk);
    mem_en = 0; mem_we = 0;
    // read back a few words (two-cycle latency)
    for (int k = 0; k < 8; k++) begin
      int i;
      i = $urandom_range(0, n - 1);
      mem_en = 1; mem_addr = 13'(i);
      @(negedge clk); mem_en = 0;
      @(negedge clk);
      check(mem_rdata == img[i], "port A read-back");
    end
  endtask

  task automatic run_forest(int ntrees, int maxd, int nsamples);
    Tree trees [$];
    logic [31:0] img [];
    int n;
    img = new[MEM_DEPTH];
    foreach (img[i]) img[i] = 0;
    for (int t = 0; t < ntrees; t++) begin
      Tree tr;
      tr = new(maxd, 32, 0, 0);
      trees.push_back(tr);
    end
    n = build_image(trees, img);
    load(img, n);
    for (int s = 0; s < nsamples; s++) begin
      logic [13:0] expv [$];
      int exp_cyc, t0, t_done;
      for (int f = 0; f < 32; f++) features[f] = rand_h();
      exp_cyc = expect_run(trees, features, expv);
      got.delete();
      @(negedge clk);
      start = 1; t0 = cyc;
      @(negedge clk);
      start = 0;
      check(busy, "busy after start");
      while (!done) @(negedge clk);
      t_done = cyc;
      check(t_done - t0 == exp_cyc,
            $sformatf("cycles start->done %0d, expected %0d", t_done - t0, exp_cyc));
      @(negedge clk);
      check(!busy, "idle after done");
      expv.sort(); got.sort();
      check(got.size() == ntrees, $sformatf("%0d leaves for %0d trees", got.size(), ntrees));
      check(got == expv, "leaf results differ from the reference walk");
    end
  endtask

  initial begin
    start = 0; mem_en = 0; mem_we = 0; mem_strb = 0; mem_addr = 0; mem_wdata = 0;
    foreach (features[i]) features[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_forest(12, 9, 6);
    run_forest(5, 6, 4);
    run_forest(3, 4, 4);
    run_forest(1, 9, 4);
    run_forest(7, 2, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
