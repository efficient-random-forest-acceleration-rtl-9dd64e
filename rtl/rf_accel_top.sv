// rf_accel_top: random-forest inference accelerator (programmable-logic part).
//
// N_DTU Decision Tree Units each walk their own share of the forest's trees,
// stored in their own Block-RAM, on the same sample; the Accumulator merges
// all leaf results into a sum (regression) or a majority vote
// (classification). The host and its DMA reach everything through one
// AXI4-Lite slave:
//   region 0       exchange registers (xregs, word offsets in rf_pkg)
//   region 1       sample buffer (two binary16 features per word,
//                  N_FEAT/2 words per sample), write only
//   region 2 + d   tree memory of DTU d (32-bit node words)
// The region number is addr[R+4:R]; a region spans 2^R bytes, with
// R = REGION_LSB = 16 (64 KiB) unless a tree memory or the sample buffer
// is larger (rf_pkg::region_lsb). CONFIG[20:16] reports R to the host.
// A run: the host loads the trees and samples, writes the sample index and
// mode, writes CTRL.start, polls STATUS.done (or waits for `done`) and reads
// SUM or CLASS. The run takes 2 cycles to fetch the sample, then the longest
// DTU's walk (about five cycles per node its busiest subset visits), then a
// few cycles of draining. All reads of the slave have a latency of two
// cycles; the sample buffer reads as zero.
// The structure (DTUs, xRegs, local sample buffer, Accumulator, AXI-lite)
// is that of the architecture; the address map is this design's.
module rf_accel_top
  import rf_pkg::*;
#(
  parameter int unsigned N_DTU        = 15,
  parameter int unsigned MEM_DEPTH    = 8192,
  parameter int unsigned N_FEAT       = 32,
  parameter int unsigned SAMPLE_DEPTH = 1024,
  parameter int unsigned N_CLASSES    = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [31:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  output logic        done
);

  localparam int unsigned MEM_AW = $clog2(MEM_DEPTH);
  localparam int unsigned IDX_W  = $clog2(SAMPLE_DEPTH);
  localparam int unsigned WA_W   = $clog2(SAMPLE_DEPTH * N_FEAT / 2);
  localparam int unsigned CLS_W  = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1;
  localparam int unsigned CNT_W  = 16;
  localparam int unsigned REGION_LSB = region_lsb(MEM_DEPTH, SAMPLE_DEPTH, N_FEAT);

  bus_req_t              req;
  logic [REGION_W-1:0]   region, region_d1, region_d2;
  logic [31:0]           rdata;
  logic [31:0]           xr_rdata;
  logic [31:0]           dtu_rdata [N_DTU];

  logic                  sample_rd;
  logic [IDX_W-1:0]      sample_idx;
  logic [15:0]           features [N_FEAT];

  logic [N_DTU-1:0]      dtu_start, dtu_busy, dtu_done;
  logic [N_DTU-1:0]      leaf_valid;
  logic [RES_W-1:0]      leaf_result [N_DTU];

  logic                  acc_clear, mode, acc_idle;
  logic signed [ACC_W-1:0] acc_sum;
  logic [CNT_W-1:0]      votes [N_CLASSES];
  logic [CLS_W-1:0]      win_class;
  logic [CNT_W-1:0]      win_votes, leaf_count;

  axil_slave #(.READ_LAT(2)) u_axil (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .req, .rdata
  );

  // Region decode and read-data return (two-cycle latency everywhere).
  assign region = req.addr[REGION_LSB +: REGION_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      region_d1 <= '0;
      region_d2 <= '0;
    end else begin
      region_d1 <= region;
      region_d2 <= region_d1;
    end
  end

  always_comb begin
    rdata = '0;
    if (region_d2 == REGION_W'(REG_XREGS)) rdata = xr_rdata;
    for (int d = 0; d < int'(N_DTU); d++)
      if (region_d2 == REGION_W'(REG_DTU0 + d)) rdata = dtu_rdata[d];
  end

  xregs #(.N_DTU(N_DTU), .N_FEAT(N_FEAT), .IDX_W(IDX_W), .CLS_W(CLS_W), .CNT_W(CNT_W),
          .REGION_LSB(REGION_LSB)) u_xregs (
    .clk, .rst_n,
    .req_en    (req.valid && region == REGION_W'(REG_XREGS)),
    .req_we    (req.we),
    .req_word  (req.addr[5:2]),
    .req_wdata (req.wdata),
    .rdata     (xr_rdata),
    .sample_rd, .sample_idx,
    .dtu_start, .dtu_busy,
    .acc_clear, .mode, .acc_idle,
    .acc_sum, .acc_class(win_class), .acc_votes(win_votes), .acc_leaves(leaf_count),
    .done
  );

  sample_buffer #(.DEPTH(SAMPLE_DEPTH), .N_FEAT(N_FEAT)) u_samples (
    .clk, .rst_n,
    .wr_en  (req.valid && req.we && region == REGION_W'(REG_SAMPLE)),
    .wr_addr(req.addr[2 +: WA_W]),
    .wr_data(req.wdata),
    .wr_strb(req.strb),
    .rd_en  (sample_rd),
    .rd_idx (sample_idx),
    .features
  );

  for (genvar d = 0; d < int'(N_DTU); d++) begin : g_dtu
    dtu #(.MEM_DEPTH(MEM_DEPTH), .N_FEAT(N_FEAT)) u_dtu (
      .clk, .rst_n,
      .start      (dtu_start[d]),
      .features,
      .busy       (dtu_busy[d]),
      .done       (dtu_done[d]),
      .leaf_valid (leaf_valid[d]),
      .leaf_result(leaf_result[d]),
      .mem_en     (req.valid && region == REGION_W'(REG_DTU0 + d)),
      .mem_we     (req.we),
      .mem_strb   (req.strb),
      .mem_addr   (req.addr[2 +: MEM_AW]),
      .mem_wdata  (req.wdata),
      .mem_rdata  (dtu_rdata[d])
    );
  end

  accumulator #(.N_DTU(N_DTU), .N_CLASSES(N_CLASSES), .CNT_W(CNT_W)) u_acc (
    .clk, .rst_n,
    .clear(acc_clear), .mode,
    .leaf_valid, .leaf_result,
    .sum(acc_sum), .votes, .win_class, .win_votes, .leaf_count,
    .idle(acc_idle)
  );

  // Static limits of the address map.
  initial begin
    assert (N_DTU >= 1 && N_DTU <= MAX_DTUS) else $error("N_DTU out of range");
    assert (N_FEAT >= 2 && N_FEAT <= 32) else $error("N_FEAT out of range");
    assert (REGION_LSB + REGION_W <= 32) else $error("address map exceeds 32 bits");
  end

endmodule
