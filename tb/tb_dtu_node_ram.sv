// tb_dtu_node_ram: self-checking test of the dual-port tree memory.
//
// Writes random words (some with partial byte strobes) through port A into
// a shadow array, then reads back on both ports with one new read per cycle
// and checks every word arrives exactly two cycles after its address.
module tb_dtu_node_ram;
  localparam int DEPTH = 256;
  logic clk = 0;
  logic a_en, a_we; logic [3:0] a_strb; logic [7:0] a_addr; logic [31:0] a_wdata, a_rdata;
  logic b_en; logic [7:0] b_addr; logic [31:0] b_rdata;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  dtu_node_ram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  // expected words of reads in flight, per port
  logic [31:0] ea [$], eb [$];
  int ta [$], tb [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (ea.size() > 0 && cyc - ta[0] == 2) begin
      checks++;
      if (a_rdata !== ea[0]) begin failures++; $display("A: got %h exp %h", a_rdata, ea[0]); end
      void'(ea.pop_front()); void'(ta.pop_front());
    end
    if (eb.size() > 0 && cyc - tb[0] == 2) begin
      checks++;
      if (b_rdata !== eb[0]) begin failures++; $display("B: got %h exp %h", b_rdata, eb[0]); end
      void'(eb.pop_front()); void'(tb.pop_front());
    end
  end

  initial begin
    a_en = 0; a_we = 0; a_strb = 0; a_addr = 0; a_wdata = 0; b_en = 0; b_addr = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      a_en = 1; a_we = 1; a_strb = 4'hf; a_addr = 8'(i); a_wdata = $urandom;
      shadow[i] = a_wdata;
      @(negedge clk);
    end
    for (int i = 0; i < 64; i++) begin
      int k;
      k = $urandom_range(0, DEPTH - 1);
      a_en = 1; a_we = 1; a_strb = 4'($urandom); a_addr = 8'(k); a_wdata = $urandom;
      for (int j = 0; j < 4; j++) if (a_strb[j]) shadow[k][8*j +: 8] = a_wdata[8*j +: 8];
      @(negedge clk);
    end
    a_we = 0;
    for (int i = 0; i < 600; i++) begin
      int ka, kb;
      ka = $urandom_range(0, DEPTH - 1); kb = $urandom_range(0, DEPTH - 1);
      a_en = 1; a_addr = 8'(ka); b_en = 1; b_addr = 8'(kb);
      ea.push_back(shadow[ka]); ta.push_back(cyc);
      eb.push_back(shadow[kb]); tb.push_back(cyc);
      @(negedge clk);
    end
    a_en = 0; b_en = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (ea.size() != 0 || eb.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
