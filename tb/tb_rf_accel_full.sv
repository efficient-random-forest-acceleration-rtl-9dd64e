// tb_rf_accel_full: the accelerator at its default size (15 DTUs, 8192-word
// tree memories, 1024-sample buffer, 32 features) on a forest shaped like
// the regression workload it was designed for: 100 trees of depth up to 9
// on 8 features, grown nearly complete (3 % chance of an early leaf per
// node), as trees of that depth trained on a large data set are. Loads the
// forest and a few samples through AXI4-Lite, runs each sample and checks
// sum, leaf count and exact cycle count against a reference walk; prints
// the fullest tree memory and the cycles per sample.
module tb_rf_accel_full;
  localparam int P_N_DTU = 15, P_MEM_DEPTH = 8192, P_SAMPLE_DEPTH = 1024;
  localparam int NF = 8, NSAMP = 6;
  logic clk = 0, rst_n = 0;
  logic [31:0] s_awaddr; logic s_awvalid, s_awready;
  logic [31:0] s_wdata; logic [3:0] s_wstrb; logic s_wvalid, s_wready;
  logic [1:0] s_bresp; logic s_bvalid, s_bready;
  logic [31:0] s_araddr; logic s_arvalid, s_arready;
  logic [31:0] s_rdata; logic [1:0] s_rresp; logic s_rvalid, s_rready;
  logic done;
  int checks = 0, failures = 0;

  rf_accel_top dut (.*);

  always #5 clk = ~clk;

  `include "tb_top_body.svh"

  initial begin
    logic [31:0] d;
    axi_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    read_config();
    load_samples();
    load_forest(100, 9, 0, 3);
    $display("largest tree image: %0d of %0d words", max_words, P_MEM_DEPTH);
    for (int s = 0; s < NSAMP; s++) begin
      run(s, 0, '1);
      $display("sample %0d: %0d cycles", s, last_cycles);
    end
    check(n_regression == NSAMP, "all runs done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
