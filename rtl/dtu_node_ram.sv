// dtu_node_ram: the DTU's Block-RAM tree storage.
//
// A true dual-port memory of DEPTH 32-bit words. Port A belongs to the bus
// (the DMA / host writes the trees through it and may read them back);
// port B is read by the DTU pipeline. Both ports read with a latency of two
// cycles, as a Block-RAM with its optional output register: the address is
// registered at the first clock edge, the word is registered at the second,
// and a new read can start every cycle. Writes on port A take effect at the
// clock edge where a_en && a_we. A write on port A and a read of the same
// word on port B in the same cycle return the old word.
// Two ports and the two-cycle pipelined read follow the DTU architecture;
// the byte write enables are this design's.
module dtu_node_ram #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: bus side
  input  logic          a_en,
  input  logic          a_we,
  input  logic [3:0]    a_strb,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  // port B: DTU side
  input  logic          b_en,
  input  logic [AW-1:0] b_addr,
  output logic [31:0]   b_rdata
);

  logic [31:0] mem [DEPTH];
  logic [31:0] a_q, b_q;

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) begin
        for (int i = 0; i < 4; i++)
          if (a_strb[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      end
      a_q <= mem[a_addr];
    end
    a_rdata <= a_q;
  end

  always_ff @(posedge clk) begin
    if (b_en) b_q <= mem[b_addr];
    b_rdata <= b_q;
  end

endmodule
