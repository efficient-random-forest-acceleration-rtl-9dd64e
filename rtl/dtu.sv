// dtu: Decision Tree Unit, a five-stage pipeline that walks decision trees.
//
// The trees given to a unit are split into five subsets stored in its own
// Block-RAM (layout in rf_pkg). Five trees, one from each subset, are in the
// pipeline at once, so the unit reads one node per cycle while every tree
// advances one node every five cycles:
//   stage 1  the controller selects the node address (dtu_controller),
//   stage 2  Block-RAM read, second cycle (the RAM has two-cycle latency),
//   stage 3  the node word is out: an internal node's feature is picked
//            from the sample and enters the comparator with the threshold;
//            a leaf's result is sent to the Accumulator (leaf_valid, one
//            cycle later, registered),
//   stages 4-5  comparator (three cycles in all, fp16_cmp_pipe),
// after which the controller uses the comparison to pick the next address.
// Interface: start (one-cycle pulse) begins a run on the sample held on
// `features` (it must stay stable until busy falls); done pulses when all
// five subsets are finished. Port A of the tree memory (mem_*) is the bus
// side, with two-cycle read latency. Leaf results leave on leaf_valid /
// leaf_result, at most one per cycle.
// The pipeline split follows the DTU architecture; the leaf output timing
// and the handling of a feature index beyond N_FEAT (reads zero) are this
// design's.
module dtu
  import rf_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 8192,
  parameter int unsigned N_FEAT    = 32,
  parameter int unsigned MEM_AW    = $clog2(MEM_DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [15:0]         features [N_FEAT],
  output logic                busy,
  output logic                done,
  output logic                leaf_valid,
  output logic [RES_W-1:0]    leaf_result,
  // tree memory, bus side
  input  logic                mem_en,
  input  logic                mem_we,
  input  logic [3:0]          mem_strb,
  input  logic [MEM_AW-1:0]   mem_addr,
  input  logic [31:0]         mem_wdata,
  output logic [31:0]         mem_rdata
);

  slot_tag_t iss_tag, tag1, tag2, tag3, tag4, tag5;
  word_t     rd_word, word3, word4, word5;
  node_t     n2;
  logic      cmp_valid, cmp_le;
  logic [15:0] feat_val;

  dtu_controller u_ctrl (
    .clk, .rst_n, .start,
    .ret_tag (tag5),
    .ret_word(word5),
    .ret_le  (cmp_le),
    .iss_tag,
    .busy,
    .done
  );

  dtu_node_ram #(.DEPTH(MEM_DEPTH), .AW(MEM_AW)) u_ram (
    .clk,
    .a_en   (mem_en),
    .a_we   (mem_we),
    .a_strb (mem_strb),
    .a_addr (mem_addr),
    .a_wdata(mem_wdata),
    .a_rdata(mem_rdata),
    .b_en   (iss_tag.kind != REQ_NONE),
    .b_addr (iss_tag.addr[MEM_AW-1:0]),
    .b_rdata(rd_word)
  );

  // Stage 3: decode the node word and select the feature.
  assign n2 = decode_node(rd_word);
  always_comb begin
    feat_val = '0;
    for (int i = 0; i < int'(N_FEAT); i++)
      if (n2.feat == FEAT_IDX_W'(i)) feat_val = features[i];
  end

  fp16_cmp_pipe u_cmp (
    .clk, .rst_n,
    .in_valid (tag2.kind == REQ_NODE && !n2.is_leaf),
    .a        (feat_val),
    .b        (n2.thr),
    .out_valid(cmp_valid),
    .out_le   (cmp_le)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag1 <= '0; tag2 <= '0; tag3 <= '0; tag4 <= '0; tag5 <= '0;
      word3 <= '0; word4 <= '0; word5 <= '0;
      leaf_valid  <= 1'b0;
      leaf_result <= '0;
    end else begin
      tag1 <= iss_tag;
      tag2 <= tag1;
      tag3 <= tag2;  word3 <= rd_word;
      tag4 <= tag3;  word4 <= word3;
      tag5 <= tag4;  word5 <= word4;
      leaf_valid  <= tag2.kind == REQ_NODE && n2.is_leaf;
      leaf_result <= n2.result;
    end
  end

  // A comparison result must come back exactly with its internal node.
  a_cmp_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    cmp_valid == (tag5.kind == REQ_NODE && !word5[0]));

endmodule
