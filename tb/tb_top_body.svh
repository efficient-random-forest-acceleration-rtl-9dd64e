// tb_top_body.svh: end-to-end test of rf_accel_top, shared by the reduced
// and the full-size testbench. The including module defines the DUT
// parameters (P_N_DTU, P_MEM_DEPTH, P_SAMPLE_DEPTH), the test sizes (NT
// trees, MAXD maximum depth, NF features used, NSAMP samples loaded, NRUN
// runs per forest), clk/rst_n, the AXI signals, `done`, checks/failures,
// and instantiates the DUT as `dut`.
//
// Host model: the trees are spread over the DTUs (tree t to DTU t % N_DTU,
// then to subset (t / N_DTU) % 5 inside it), every image is written through
// AXI4-Lite, the samples likewise; each run writes SAMPLE, DTU_EN and CTRL,
// polls STATUS and reads the results. A reference walk of every tree in real
// arithmetic gives the expected regression sum, leaf count, majority class
// and the exact cycle count (CYCLES = 6 + the longest DTU walk).

`include "tb_forest.svh"
`include "tb_axil_master.svh"

localparam logic [31:0] XR_BASE = 32'h0000_0000;
int rshift = 16;   // log2 of the region size, read from CONFIG

function automatic logic [31:0] region_base(int r);
  return 32'(r) << rshift;
endfunction

// reads CONFIG, checks it and sets the address map
task automatic read_config();
  logic [31:0] d;
  axi_read(XR_BASE + 4 * rf_pkg::XR_CONFIG, d);
  check(d[7:0] == 8'(P_N_DTU) && d[15:8] == 8'd32, $sformatf("CONFIG %h", d));
  check(32'(d[20:16]) == rf_pkg::region_lsb(P_MEM_DEPTH, P_SAMPLE_DEPTH, 32), "CONFIG region size");
  rshift = int'(d[20:16]);
endtask

Tree per_dtu [P_N_DTU][$];
logic [15:0] samples [NSAMP][32];

// mechanism counters
int n_left = 0, n_right = 0, n_next_tree = 0, n_subset_end = 0, n_empty_subset = 0;
int n_multi_leaf = 0, n_regression = 0, n_classification = 0, n_dtu_disabled = 0;
int n_mem_readback = 0;
int last_cycles = 0, max_words = 0;

for (genvar d = 0; d < P_N_DTU; d++) begin : g_probe
  always @(posedge clk) if (rst_n) begin
    if (dut.g_dtu[d].u_dtu.u_ctrl.ret_tag.kind == rf_pkg::REQ_NODE) begin
      if (!dut.g_dtu[d].u_dtu.u_ctrl.ret_word[0]) begin
        if (dut.g_dtu[d].u_dtu.u_ctrl.ret_le) n_left++; else n_right++;
      end else if (!dut.g_dtu[d].u_dtu.u_ctrl.ret_word[1]) n_next_tree++;
      else n_subset_end++;
    end
    if (dut.g_dtu[d].u_dtu.u_ctrl.ret_tag.kind == rf_pkg::REQ_HEADER &&
        dut.g_dtu[d].u_dtu.u_ctrl.kill_rest) n_empty_subset++;
  end
end
always @(posedge clk) if (rst_n && $countones(dut.leaf_valid) > 1) n_multi_leaf++;

task automatic check(bit ok, string msg);
  checks++;
  if (!ok) begin failures++; $display("FAIL: %s", msg); end
endtask

task automatic load_forest(int ntrees, int maxd, bit cls, int leaf_pct = 20);
  logic [31:0] img [];
  logic [31:0] d;
  for (int k = 0; k < P_N_DTU; k++) per_dtu[k].delete();
  for (int t = 0; t < ntrees; t++) begin
    Tree tr;
    tr = new(maxd, NF, cls, 16, leaf_pct);
    per_dtu[t % P_N_DTU].push_back(tr);
  end
  axi_gap = 0;
  for (int k = 0; k < P_N_DTU; k++) begin
    int n;
    img = new[P_MEM_DEPTH];
    foreach (img[i]) img[i] = 0;
    // build_image puts tree j of the list in subset j % 5
    n = build_image(per_dtu[k], img);
    check(n <= P_MEM_DEPTH, $sformatf("DTU %0d image of %0d words fits", k, n));
    if (n > max_words) max_words = n;
    for (int i = 0; i < n; i++) axi_write(region_base(2 + k) + 32'(4 * i), img[i]);
    // read back two words through the bus
    for (int j = 0; j < 2; j++) begin
      int i;
      i = $urandom_range(0, n - 1);
      axi_read(region_base(2 + k) + 32'(4 * i), d);
      check(d == img[i], "tree memory read-back");
      n_mem_readback++;
    end
  end
  axi_gap = 3;
endtask

task automatic load_samples();
  axi_gap = 0;
  for (int s = 0; s < NSAMP; s++) begin
    for (int f = 0; f < 32; f++) samples[s][f] = rand_h();
    for (int w = 0; w < 16; w++)
      axi_write(region_base(1) + 32'(64 * s + 4 * w), {samples[s][2 * w + 1], samples[s][2 * w]});
  end
  axi_gap = 3;
endtask

task automatic run(int s, bit cls, logic [P_N_DTU-1:0] en);
  logic [31:0] d, lo, hi;
  logic [13:0] leaves [$];
  longint esum;
  int ecyc, votes [16], best, bestc, polls;
  esum = 0; ecyc = 0;
  for (int c = 0; c < 16; c++) votes[c] = 0;
  for (int k = 0; k < P_N_DTU; k++) if (en[k]) begin
    int e;
    e = expect_run(per_dtu[k], samples[s], leaves);
    if (e > ecyc) ecyc = e;
  end
  foreach (leaves[i]) begin
    esum += r14_fixed(leaves[i]);
    votes[leaves[i][3:0]]++;
  end
  best = 0; bestc = votes[0];
  for (int c = 1; c < 16; c++) if (votes[c] > bestc) begin best = c; bestc = votes[c]; end

  axi_write(XR_BASE + 4 * rf_pkg::XR_SAMPLE, 32'(s));
  axi_write(XR_BASE + 4 * rf_pkg::XR_DTU_EN, 32'(en));
  axi_write(XR_BASE + 4 * rf_pkg::XR_CTRL, {30'd0, cls, 1'b1});
  polls = 0;
  do begin
    axi_read(XR_BASE + 4 * rf_pkg::XR_STATUS, d);
    polls++;
  end while (d[1] == 1'b0 && polls < 100000);
  check(d == 32'h2 && done, "run completes");
  axi_read(XR_BASE + 4 * rf_pkg::XR_LEAVES, d);
  check(d == 32'(leaves.size()), $sformatf("leaves %0d exp %0d", d, leaves.size()));
  axi_read(XR_BASE + 4 * rf_pkg::XR_CYCLES, d);
  check(d == 32'(6 + ecyc), $sformatf("cycles %0d exp %0d", d, 6 + ecyc));
  last_cycles = int'(d);
  if (!cls) begin
    axi_read(XR_BASE + 4 * rf_pkg::XR_SUM_LO, lo);
    axi_read(XR_BASE + 4 * rf_pkg::XR_SUM_HI, hi);
    check($signed({hi, lo}) == esum, $sformatf("sum %0d exp %0d", $signed({hi, lo}), esum));
    n_regression++;
  end else begin
    axi_read(XR_BASE + 4 * rf_pkg::XR_CLASS, d);
    check(d == {16'(bestc), 16'(best)}, $sformatf("class %h exp %0d/%0d", d, best, bestc));
    n_classification++;
  end
  if (en != '1) n_dtu_disabled++;
endtask

task automatic report_mechanisms();
  check(n_left > 0, "left branches taken");
  check(n_right > 0, "right branches taken");
  check(n_next_tree > 0, "jumps to the next tree of a subset");
  check(n_subset_end > 0, "subsets finished by isLast");
  check(n_empty_subset > 0, "empty subsets skipped");
  check(n_multi_leaf > 0, "several DTUs delivering leaves in one cycle");
  check(n_regression > 0, "regression runs");
  check(n_classification > 0, "classification runs");
  check(n_dtu_disabled > 0, "runs with DTUs disabled");
  check(n_mem_readback > 0, "tree memory read back over the bus");
  check(axi_bad_resp == 0, "all AXI responses OKAY");
  $display("mechanisms: left=%0d right=%0d next_tree=%0d subset_end=%0d empty_subset=%0d multi_leaf=%0d regression=%0d classification=%0d dtu_disabled=%0d readback=%0d",
           n_left, n_right, n_next_tree, n_subset_end, n_empty_subset, n_multi_leaf,
           n_regression, n_classification, n_dtu_disabled, n_mem_readback);
endtask
