// tb_rf_accel_top: end-to-end test of the accelerator at reduced size.
//
// Four DTUs with 2048-word tree memories and a 64-sample buffer. A
// regression forest of 22 trees (depth up to 9) is loaded and run on
// samples with all DTUs and with some disabled; then a classification
// forest of 3 trees (so some DTUs hold one tree and leave subsets empty)
// is loaded and run. Results, leaf counts and exact cycle counts are
// compared with a reference walk; every mechanism of the design must occur.
module tb_rf_accel_top;
  localparam int P_N_DTU = 4, P_MEM_DEPTH = 2048, P_SAMPLE_DEPTH = 64;
  localparam int NF = 32, NSAMP = 8;
  logic clk = 0, rst_n = 0;
  logic [31:0] s_awaddr; logic s_awvalid, s_awready;
  logic [31:0] s_wdata; logic [3:0] s_wstrb; logic s_wvalid, s_wready;
  logic [1:0] s_bresp; logic s_bvalid, s_bready;
  logic [31:0] s_araddr; logic s_arvalid, s_arready;
  logic [31:0] s_rdata; logic [1:0] s_rresp; logic s_rvalid, s_rready;
  logic done;
  int checks = 0, failures = 0;

  rf_accel_top #(.N_DTU(P_N_DTU), .MEM_DEPTH(P_MEM_DEPTH), .SAMPLE_DEPTH(P_SAMPLE_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  `include "tb_top_body.svh"

  initial begin
    logic [31:0] d;
    axi_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    read_config();
    load_samples();
    load_forest(22, 9, 0);
    for (int s = 0; s < 5; s++) run(s, 0, '1);
    run(5, 0, 4'b1011);
    run(6, 0, 4'b0001);
    load_forest(30, 7, 1);
    for (int s = 0; s < 3; s++) run(s, 1, '1);
    load_forest(3, 5, 1);
    run(7, 1, 4'b0111);
    run(1, 0, 4'b0111);
    report_mechanisms();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
