// tb_sample_buffer: self-checking test of the local sample buffer.
//
// Uses 64 samples of 8 features (the feature count of the regression data
// set the design was evaluated with). Fills the buffer with random words,
// some written with partial strobes, keeping a shadow copy per feature;
// then reads every sample and checks that all features appear one cycle
// after rd_en and stay while rd_en is low.
module tb_sample_buffer;
  localparam int DEPTH = 64, NF = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en; logic [7:0] wr_addr; logic [31:0] wr_data; logic [3:0] wr_strb;
  logic rd_en; logic [5:0] rd_idx;
  logic [15:0] features [NF];
  logic [15:0] shadow [DEPTH][NF];
  int checks = 0, failures = 0;

  sample_buffer #(.DEPTH(DEPTH), .N_FEAT(NF)) dut (.*);

  always #5 clk = ~clk;

  task automatic wr(int w, logic [31:0] d, logic [3:0] s);
    @(negedge clk);
    wr_en = 1; wr_addr = 8'(w); wr_data = d; wr_strb = s;
    if (s[1:0] != 0) shadow[w / (NF / 2)][2 * (w % (NF / 2))]     = d[15:0];
    if (s[3:2] != 0) shadow[w / (NF / 2)][2 * (w % (NF / 2)) + 1] = d[31:16];
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0; wr_strb = 0; rd_en = 0; rd_idx = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < DEPTH * NF / 2; w++) wr(w, $urandom, 4'hf);
    for (int k = 0; k < 100; k++) wr($urandom_range(0, DEPTH * NF / 2 - 1), $urandom, 4'($urandom));
    for (int k = 0; k < 3 * DEPTH; k++) begin
      int s;
      s = (k < DEPTH) ? k : $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      rd_en = 1; rd_idx = 6'(s);
      @(negedge clk);
      rd_en = 0; rd_idx = 6'(s + 1);
      for (int f = 0; f < NF; f++) begin
        checks++;
        if (features[f] != shadow[s][f]) begin
          failures++; $display("sample %0d feature %0d: %h exp %h", s, f, features[f], shadow[s][f]);
        end
      end
      @(negedge clk);
      checks++;
      if (features[NF - 1] != shadow[s][NF - 1]) begin failures++; $display("not held"); end
    end
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
