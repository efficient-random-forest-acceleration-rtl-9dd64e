// fp16_cmp_pipe: three-cycle pipelined floating-point comparator of the DTU.
//
// Computes le = (a <= b) for two IEEE 754 binary16 operands: a is the
// sample's feature value, b the node's threshold. A true result sends the
// DTU to the left child (the next memory word), false to the right child.
// The comparator accepts one operand pair per cycle and returns the result
// exactly three cycles later (in_valid at cycle t -> out_valid at t+3):
//   stage 1 registers the operands,
//   stage 2 compares the magnitudes and classifies the operands
//           (zero, NaN, signs),
//   stage 3 combines them into the ordered result.
// +0 and -0 compare equal; a comparison involving NaN is false (the sample
// goes right). A three-stage comparator with one result per cycle follows
// the DTU architecture; the stage split and the NaN rule are this design's.
module fp16_cmp_pipe (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic        out_valid,
  output logic        out_le
);

  // Stage 1: operand registers.
  logic        v1;
  logic [15:0] a1, b1;

  // Stage 2: classified operands.
  logic v2, mag_lt2, mag_eq2, sa2, sb2, both_zero2, nan2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      a1 <= '0;
      b1 <= '0;
      v2 <= 1'b0;
      mag_lt2 <= 1'b0;
      mag_eq2 <= 1'b0;
      sa2 <= 1'b0;
      sb2 <= 1'b0;
      both_zero2 <= 1'b0;
      nan2 <= 1'b0;
      out_valid <= 1'b0;
      out_le <= 1'b0;
    end else begin
      v1 <= in_valid;
      a1 <= a;
      b1 <= b;

      v2         <= v1;
      mag_lt2    <= a1[14:0] < b1[14:0];
      mag_eq2    <= a1[14:0] == b1[14:0];
      sa2        <= a1[15];
      sb2        <= b1[15];
      both_zero2 <= (a1[14:0] == 15'd0) && (b1[14:0] == 15'd0);
      nan2       <= ((a1[14:10] == 5'h1f) && (a1[9:0] != 10'd0)) ||
                    ((b1[14:10] == 5'h1f) && (b1[9:0] != 10'd0));

      out_valid <= v2;
      if (nan2)
        out_le <= 1'b0;
      else if (both_zero2)
        out_le <= 1'b1;
      else if (sa2 != sb2)
        out_le <= sa2;                      // negative <= positive
      else if (!sa2)
        out_le <= mag_lt2 || mag_eq2;       // both positive
      else
        out_le <= !mag_lt2;                 // both negative: |a| >= |b|
    end
  end

endmodule
