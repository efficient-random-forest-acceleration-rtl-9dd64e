// tb_rf_workload_cfg: one accelerator configuration running the regression
// workload (100 trees of depth up to 9 on 8 features, grown nearly
// complete), with its own host model. Used by tb_rf_workload, which runs
// several DTU counts side by side; reports its checks, failures and the
// cycles of its last run through the ports.
module tb_rf_workload_cfg #(
  parameter int P_N_DTU     = 15,
  parameter int P_MEM_DEPTH = 8192
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cycles,
  output int   words
);
  localparam int P_SAMPLE_DEPTH = 1024;
  localparam int NF = 8, NSAMP = 3;
  logic rst_n = 0;
  logic [31:0] s_awaddr; logic s_awvalid, s_awready;
  logic [31:0] s_wdata; logic [3:0] s_wstrb; logic s_wvalid, s_wready;
  logic [1:0] s_bresp; logic s_bvalid, s_bready;
  logic [31:0] s_araddr; logic s_arvalid, s_arready;
  logic [31:0] s_rdata; logic [1:0] s_rresp; logic s_rvalid, s_rready;
  logic done;

  rf_accel_top #(.N_DTU(P_N_DTU), .MEM_DEPTH(P_MEM_DEPTH)) dut (.*);

  `include "tb_top_body.svh"

  initial begin
    finished = 0; checks = 0; failures = 0; cycles = 0; words = 0;
    axi_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    read_config();
    load_samples();
    load_forest(100, 9, 0, 3);
    for (int s = 0; s < NSAMP; s++) run(s, 0, '1);
    cycles = last_cycles;
    words = max_words;
    finished = 1;
  end
endmodule
