// tb_dtu_controller: self-checking test of the DTU controller on its own.
//
// The controller is closed into a loop with a behavioural model of the rest
// of the DTU pipeline: a tree memory read, delayed so that each issued read
// returns exactly five cycles later, and a comparison of the sample's
// feature with the node threshold done in real arithmetic. The test checks
// that the reads issued walk each tree exactly as a reference walk does
// (the leaf reached in every tree), that exactly the header words 0..4 are
// read first, and that done comes at the expected cycle.
module tb_dtu_controller;
  import rf_pkg::*;
  `include "tb_forest.svh"

  localparam int MEM_DEPTH = 8192;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  slot_tag_t iss_tag, ret_tag;
  word_t ret_word;
  logic ret_le;
  logic [15:0] features [32];
  logic [31:0] img [];
  int checks = 0, failures = 0;
  int cyc = 0;

  dtu_controller dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // pipeline model: five-cycle loop
  slot_tag_t dl [5];
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) dl[i] <= '0;
    end else begin
      dl[0] <= iss_tag;
      for (int i = 1; i < 5; i++) dl[i] <= dl[i - 1];
    end
  end
  always_comb begin
    ret_tag  = dl[4];
    ret_word = (ret_tag.kind != REQ_NONE) ? img[ret_tag.addr[12:0]] : '0;
    ret_le   = h2r(features[ret_word[21:17]]) <= h2r(ret_word[16:1]);
  end

  logic [13:0] got [$];
  int hdr_reads [$];
  always @(posedge clk) begin
    if (ret_tag.kind == REQ_NODE && ret_word[0]) got.push_back(ret_word[15:2]);
    if (iss_tag.kind == REQ_HEADER) hdr_reads.push_back(int'(iss_tag.addr));
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run_forest(int ntrees, int maxd, int nsamples);
    Tree trees [$];
    img = new[MEM_DEPTH];
    foreach (img[i]) img[i] = 0;
    for (int t = 0; t < ntrees; t++) begin
      Tree tr;
      tr = new(maxd, 32, 0, 0);
      trees.push_back(tr);
    end
    void'(build_image(trees, img));
    for (int s = 0; s < nsamples; s++) begin
      logic [13:0] expv [$];
      int exp_cyc, t0;
      for (int f = 0; f < 32; f++) features[f] = rand_h();
      exp_cyc = expect_run(trees, features, expv);
      got.delete(); hdr_reads.delete();
      @(negedge clk);
      start = 1; t0 = cyc;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      check(cyc - t0 == exp_cyc, $sformatf("cycles %0d, expected %0d", cyc - t0, exp_cyc));
      check(hdr_reads.size() == 5, "five header reads");
      foreach (hdr_reads[i]) check(hdr_reads[i] == i, "header read order");
      expv.sort(); got.sort();
      check(got == expv, $sformatf("leaves differ (%0d vs %0d)", got.size(), expv.size()));
      @(negedge clk);
      check(!busy, "idle after done");
    end
  endtask

  initial begin
    start = 0;
    foreach (features[i]) features[i] = 0;
    img = new[MEM_DEPTH];
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_forest(10, 9, 5);
    run_forest(4, 5, 4);
    run_forest(2, 3, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
