// xregs: exchange registers and run sequencing of the accelerator.
//
// The host passes arguments and starts the DTUs through these registers and
// polls them for completion (word offsets in rf_pkg, XR_*):
//   CTRL   [0] start (write 1), [1] mode (0 regression, 1 classification)
//   STATUS [0] busy, [1] done (cleared by the next start)
//   SAMPLE index of the sample to classify
//   DTU_EN one enable bit per DTU (reset: all ones); a disabled DTU is not
//          started, so its memory need not hold trees
//   SUM_LO/SUM_HI regression sum, signed, units of 2^-22
//   CLASS  [15:0] majority class, [31:16] its votes
//   LEAVES number of leaf results accumulated
//   CYCLES clock cycles from start to done of the last run
//   CONFIG [7:0] N_DTU, [15:8] N_FEAT, [20:16] log2 of the region size
//          of the address map (read only)
// A start runs the sequence: clear the accumulator and read the sample row
// (1 cycle), wait for the row (1 cycle), pulse start to the enabled DTUs,
// wait until none is busy, wait until the accumulator pipeline is empty,
// then latch the results and set done. Register reads have a latency of two
// cycles (req at t -> rdata valid at t+2), like the DTU memories.
// The role of the xRegs (arguments, start and completion of the DTUs) is
// from the architecture; the register map and the sequence are this
// design's.
module xregs
  import rf_pkg::*;
#(
  parameter int unsigned N_DTU     = 15,
  parameter int unsigned N_FEAT    = 32,
  parameter int unsigned IDX_W     = 10,
  parameter int unsigned CLS_W     = 4,
  parameter int unsigned CNT_W     = 16,
  parameter int unsigned REGION_LSB = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // bus side
  input  logic                    req_en,
  input  logic                    req_we,
  input  logic [3:0]              req_word,
  input  logic [31:0]             req_wdata,
  output logic [31:0]             rdata,
  // sample buffer
  output logic                    sample_rd,
  output logic [IDX_W-1:0]        sample_idx,
  // DTUs
  output logic [N_DTU-1:0]        dtu_start,
  input  logic [N_DTU-1:0]        dtu_busy,
  // accumulator
  output logic                    acc_clear,
  output logic                    mode,
  input  logic                    acc_idle,
  input  logic signed [ACC_W-1:0] acc_sum,
  input  logic [CLS_W-1:0]        acc_class,
  input  logic [CNT_W-1:0]        acc_votes,
  input  logic [CNT_W-1:0]        acc_leaves,
  // completion flag (may serve as an interrupt)
  output logic                    done
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_ROW, S_START, S_WAIT, S_DRAIN} state_t;

  state_t           state;
  logic [N_DTU-1:0] dtu_en;
  logic [ACC_W-1:0] sum_q;
  logic [31:0]      class_q, leaves_q, cycles_q, cyc_cnt;
  logic [31:0]      rd_mux, rd_q;
  logic             start_wr;

  assign start_wr = req_en && req_we && req_word == 4'(XR_CTRL) && req_wdata[0];

  assign sample_rd = (state == S_LOAD);
  assign acc_clear = (state == S_LOAD);
  assign dtu_start = (state == S_START) ? dtu_en : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      mode       <= 1'b0;
      sample_idx <= '0;
      dtu_en     <= '1;
      done       <= 1'b0;
      sum_q      <= '0;
      class_q    <= '0;
      leaves_q   <= '0;
      cycles_q   <= '0;
      cyc_cnt    <= '0;
    end else begin
      // argument writes are taken only while idle
      if (req_en && req_we && state == S_IDLE) begin
        unique case (req_word)
          4'(XR_CTRL):   mode       <= req_wdata[1];
          4'(XR_SAMPLE): sample_idx <= req_wdata[IDX_W-1:0];
          4'(XR_DTU_EN): dtu_en     <= req_wdata[N_DTU-1:0];
          default: ;
        endcase
      end
      if (state != S_IDLE) cyc_cnt <= cyc_cnt + 32'd1;
      unique case (state)
        S_IDLE:  if (start_wr) begin
                   state   <= S_LOAD;
                   done    <= 1'b0;
                   cyc_cnt <= 32'd1;
                 end
        S_LOAD:  state <= S_ROW;
        S_ROW:   state <= S_START;
        S_START: state <= S_WAIT;
        S_WAIT:  if (dtu_busy == '0) state <= S_DRAIN;
        S_DRAIN: if (acc_idle) begin
                   state    <= S_IDLE;
                   done     <= 1'b1;
                   sum_q    <= acc_sum;
                   class_q  <= {16'(acc_votes), 16'(acc_class)};
                   leaves_q <= 32'(acc_leaves);
                   cycles_q <= cyc_cnt + 32'd1;
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rd_mux = '0;
    unique case (req_word)
      4'(XR_CTRL):   rd_mux = {30'd0, mode, 1'b0};
      4'(XR_STATUS): rd_mux = {30'd0, done, state != S_IDLE};
      4'(XR_SAMPLE): rd_mux = 32'(sample_idx);
      4'(XR_DTU_EN): rd_mux = 32'(dtu_en);
      4'(XR_SUM_LO): rd_mux = sum_q[31:0];
      4'(XR_SUM_HI): rd_mux = sum_q[63:32];
      4'(XR_CLASS):  rd_mux = class_q;
      4'(XR_LEAVES): rd_mux = leaves_q;
      4'(XR_CYCLES): rd_mux = cycles_q;
      4'(XR_CONFIG): rd_mux = {11'd0, 5'(REGION_LSB), 8'(N_FEAT), 8'(N_DTU)};
      default:       rd_mux = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      rdata <= '0;
    end else begin
      rd_q  <= req_en ? rd_mux : '0;
      rdata <= rd_q;
    end
  end

endmodule
