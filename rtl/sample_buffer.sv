// sample_buffer: local buffer of the samples the DTUs classify.
//
// Holds DEPTH samples of N_FEAT binary16 features. The bus (DMA / host)
// fills it with 32-bit words, two features per word: word w belongs to
// sample w / (N_FEAT/2), the low half is feature 2*(w % (N_FEAT/2)) and the
// high half the next one; the byte strobes of each half gate its write.
// Each run of the accelerator reads one whole sample (all features at once)
// into the output register `features` (rd_en at cycle t -> features valid
// from t+1); the register holds it while all DTUs walk their trees, and
// every DTU picks its features from it in parallel.
// A local sample buffer shared by the DTUs is from the architecture; its
// size, the wide-row organisation and the packing are this design's.
module sample_buffer #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned N_FEAT = 32,        // power of two, at least 2
  parameter int unsigned IDX_W  = $clog2(DEPTH),
  parameter int unsigned WA_W   = $clog2(DEPTH * N_FEAT / 2)
) (
  input  logic             clk,
  input  logic             rst_n,
  // bus write port
  input  logic             wr_en,
  input  logic [WA_W-1:0]  wr_addr,   // word address
  input  logic [31:0]      wr_data,
  input  logic [3:0]       wr_strb,
  // sample read port
  input  logic             rd_en,
  input  logic [IDX_W-1:0] rd_idx,
  output logic [15:0]      features [N_FEAT]
);

  localparam int unsigned PAIR_W = $clog2(N_FEAT / 2);

  logic [N_FEAT*16-1:0] mem [DEPTH];
  logic [IDX_W-1:0]     wr_sample;
  logic [PAIR_W-1:0]    wr_pair;

  assign wr_sample = wr_addr[WA_W-1 -: IDX_W];
  assign wr_pair   = wr_addr[PAIR_W-1:0];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      if (wr_strb[1:0] != 2'b00)
        mem[wr_sample][32*wr_pair +: 16]      <= wr_data[15:0];
      if (wr_strb[3:2] != 2'b00)
        mem[wr_sample][32*wr_pair + 16 +: 16] <= wr_data[31:16];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_FEAT); i++) features[i] <= '0;
    end else if (rd_en) begin
      for (int i = 0; i < int'(N_FEAT); i++) features[i] <= mem[rd_idx][16*i +: 16];
    end
  end

endmodule
