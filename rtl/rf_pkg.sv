// rf_pkg: types and constants shared by the random-forest accelerator.
//
// Node word layout of the DTU tree memory (one 32-bit word per node):
//   internal node (bit 0 = 0): [31:22] relative address of the right child,
//                              [21:17] feature index, [16:1] threshold
//                              (IEEE 754 binary16), [0] isLeaf = 0.
//                              The left child is always the next word.
//   leaf node     (bit 0 = 1): [31:18] relative address of the next tree in
//                              the same subset, [17:16] reserved (zero),
//                              [15:2] 14-bit floating-point result,
//                              [1] isLast, [0] isLeaf = 1.
//   subset header (words 0..4): [31:1] absolute start address of the
//                              subset, [0] final-subset flag.
// Field widths follow the memory structure of the architecture; the bit
// positions of the result and of the header address are this design's
// choice. The 14-bit result is binary16 with its two lowest mantissa bits
// dropped (1 sign, 5 exponent, 8 mantissa bits); in classification mode the
// same field is read as an unsigned class label.
package rf_pkg;

  localparam int unsigned N_SUBSETS  = 5;   // pipeline depth = trees in flight
  localparam int unsigned RIGHT_W    = 10;  // right-child relative address
  localparam int unsigned FEAT_IDX_W = 5;   // up to 32 features
  localparam int unsigned THR_W      = 16;  // binary16 threshold
  localparam int unsigned NEXT_W     = 14;  // next-tree relative address
  localparam int unsigned RES_W      = 14;  // leaf result
  localparam int unsigned SLOT_W     = 3;   // slot index 0..4

  // Fixed-point format used to sum regression results exactly: every
  // 14-bit float is an integer multiple of 2^-22.
  localparam int unsigned ACC_FRAC   = 22;
  localparam int unsigned ACC_W      = 64;

  typedef logic [31:0] word_t;

  typedef enum logic [1:0] {
    REQ_NONE   = 2'd0,  // bubble
    REQ_HEADER = 2'd1,  // read of a subset-address word
    REQ_NODE   = 2'd2   // read of a tree node
  } req_kind_t;

  // Metadata that travels down the DTU pipeline beside each memory read.
  typedef struct packed {
    req_kind_t         kind;
    logic [SLOT_W-1:0] slot;
    logic [31:0]       addr;
  } slot_tag_t;

  // Decoded node word.
  typedef struct packed {
    logic                  is_leaf;
    logic                  is_last;
    logic [RIGHT_W-1:0]    right_rel;
    logic [FEAT_IDX_W-1:0] feat;
    logic [THR_W-1:0]      thr;
    logic [NEXT_W-1:0]     next_rel;
    logic [RES_W-1:0]      result;
  } node_t;

  // Word-addressed request from the bus slave to one memory region.
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [31:0] addr;   // byte address
    logic [31:0] wdata;
    logic [3:0]  strb;
  } bus_req_t;

  // Address map of the slave: regions of 2^region_lsb bytes (at least
  // 64 KiB, more when a tree memory or the sample buffer needs it),
  // selected by the REGION_W address bits above them.
  localparam int unsigned REGION_W   = 5;
  localparam int unsigned REG_XREGS  = 0;
  localparam int unsigned REG_SAMPLE = 1;
  localparam int unsigned REG_DTU0   = 2;   // DTU d memory is region 2 + d
  localparam int unsigned MAX_DTUS   = 30;

  // xRegs word offsets.
  localparam int unsigned XR_CTRL     = 0;  // [0] start (W1), [1] mode: 1 = classification
  localparam int unsigned XR_STATUS   = 1;  // [0] busy, [1] done
  localparam int unsigned XR_SAMPLE   = 2;  // sample index
  localparam int unsigned XR_DTU_EN   = 3;  // one bit per DTU
  localparam int unsigned XR_SUM_LO   = 4;  // regression sum, Q(64-22).22
  localparam int unsigned XR_SUM_HI   = 5;
  localparam int unsigned XR_CLASS    = 6;  // [15:0] winning class, [31:16] its votes
  localparam int unsigned XR_LEAVES   = 7;  // leaf results accumulated
  localparam int unsigned XR_CYCLES   = 8;  // cycles of the last run
  localparam int unsigned XR_CONFIG   = 9;  // [7:0] number of DTUs, [15:8] features
  localparam int unsigned XR_WORDS    = 10;

  function automatic int unsigned region_lsb(int unsigned mem_depth,
                                             int unsigned sample_depth,
                                             int unsigned n_feat);
    int unsigned r;
    r = 16;
    if ($clog2(mem_depth * 4) > r) r = $clog2(mem_depth * 4);
    if ($clog2(sample_depth * n_feat * 2) > r) r = $clog2(sample_depth * n_feat * 2);
    return r;
  endfunction

  function automatic node_t decode_node(word_t w);
    node_t n;
    n.is_leaf   = w[0];
    n.is_last   = w[1];
    n.right_rel = w[31:22];
    n.feat      = w[21:17];
    n.thr       = w[16:1];
    n.next_rel  = w[31:18];
    n.result    = w[15:2];
    return n;
  endfunction

  function automatic word_t enc_internal(logic [RIGHT_W-1:0] right_rel,
                                         logic [FEAT_IDX_W-1:0] feat,
                                         logic [THR_W-1:0] thr);
    return {right_rel, feat, thr, 1'b0};
  endfunction

  function automatic word_t enc_leaf(logic [NEXT_W-1:0] next_rel,
                                     logic [RES_W-1:0] result,
                                     logic is_last);
    return {next_rel, 2'b00, result, is_last, 1'b1};
  endfunction

  // 14-bit float (s, e[4:0], m[7:0]) to a signed multiple of 2^-22.
  // Normal:    (256 + m) * 2^(e-1) * 2^-22 ; subnormal: m * 2^-22.
  // e = 31 is treated as an ordinary exponent (no Inf/NaN in leaves).
  function automatic logic signed [ACC_W-1:0] fp14_to_fixed(logic [RES_W-1:0] v);
    logic [4:0]       e;
    logic [8:0]       mant;
    logic [ACC_W-1:0] mag;
    e    = v[12:8];
    mant = {(e != 5'd0), v[7:0]};
    mag  = ACC_W'(mant) << ((e == 5'd0) ? 5'd0 : (e - 5'd1));
    return v[13] ? -$signed(mag) : $signed(mag);
  endfunction

endpackage
