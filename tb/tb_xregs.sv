// tb_xregs: self-checking test of the exchange registers and run sequence.
//
// Four DTUs are modelled in the testbench: each stays busy for a random
// number of cycles after its start pulse; the accumulator is modelled by an
// idle flag that drops for a few cycles after the last DTU finishes. The
// test writes the arguments, starts runs in both modes and checks the
// sample read, the accumulator clear, the start pulses (only to enabled
// DTUs, once each, three cycles after the start write), that done waits
// for every DTU and for the accumulator, the latched results, the cycle
// counter, the two-cycle register read latency and that arguments written
// during a run are ignored.
module tb_xregs;
  import rf_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic req_en, req_we; logic [3:0] req_word; logic [31:0] req_wdata, rdata;
  logic sample_rd; logic [9:0] sample_idx;
  logic [N-1:0] dtu_start, dtu_busy;
  logic acc_clear, mode, acc_idle;
  logic signed [63:0] acc_sum;
  logic [3:0] acc_class; logic [15:0] acc_votes, acc_leaves;
  logic done;
  int checks = 0, failures = 0;
  int cyc = 0;

  xregs #(.N_DTU(N), .N_FEAT(8), .IDX_W(10)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // DTU models
  int left [N];
  int starts [N];
  int n_rd, n_clr, t_start_pulse, t_rd;
  int last_busy_end;
  int idle_hold;
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (dtu_start[i]) begin
        left[i] <= $urandom_range(3, 40);
        starts[i] <= starts[i] + 1;
        t_start_pulse <= cyc;
      end else if (left[i] > 0) left[i] <= left[i] - 1;
    end
    if (sample_rd) begin n_rd <= n_rd + 1; t_rd <= cyc; end
    if (acc_clear) n_clr <= n_clr + 1;
  end
  always_comb for (int i = 0; i < N; i++) dtu_busy[i] = left[i] > 0;
  // accumulator model: not idle for 3 cycles after any DTU was busy
  always @(posedge clk) idle_hold <= (dtu_busy != 0) ? 3 : (idle_hold > 0 ? idle_hold - 1 : 0);
  assign acc_idle = idle_hold == 0;
  int done_rise, busy_fall;
  logic prev_done, prev_any;
  always @(posedge clk) begin
    prev_done <= done; prev_any <= (dtu_busy != 0);
    if (done && !prev_done) done_rise <= cyc;
    if (prev_any && dtu_busy == 0) busy_fall <= cyc;
  end

  task automatic bus_wr(int w, logic [31:0] d);
    @(negedge clk);
    req_en = 1; req_we = 1; req_word = 4'(w); req_wdata = d;
    @(negedge clk);
    req_en = 0; req_we = 0;
  endtask

  task automatic bus_rd(int w, output logic [31:0] d);
    @(negedge clk);
    req_en = 1; req_we = 0; req_word = 4'(w);
    @(negedge clk);
    req_en = 0;
    @(negedge clk);
    d = rdata;
  endtask

  task automatic one_run(bit m, int idx, logic [N-1:0] en);
    logic [31:0] d;
    int t_wr, st0 [N];
    bus_wr(XR_SAMPLE, idx);
    bus_wr(XR_DTU_EN, 32'(en));
    for (int i = 0; i < N; i++) st0[i] = starts[i];
    acc_sum = {$urandom, $urandom}; acc_class = 4'($urandom); acc_votes = 16'($urandom);
    acc_leaves = 16'($urandom);
    @(negedge clk);
    req_en = 1; req_we = 1; req_word = 4'(XR_CTRL); req_wdata = {30'd0, m, 1'b1};
    t_wr = cyc;
    @(negedge clk);
    req_en = 0; req_we = 0;
    // arguments written during the run are ignored
    bus_wr(XR_SAMPLE, idx + 1);
    check(!done, "done cleared by start");
    while (!done) @(negedge clk);
    @(negedge clk);   // let the monitors record the rising edge of done
    check(sample_idx == 10'(idx), "sample index kept during the run");
    check(t_rd == t_wr + 1, "sample read one cycle after the start write");
    check(t_start_pulse == t_wr + 3, "DTU start three cycles after the start write");
    for (int i = 0; i < N; i++)
      check(starts[i] - st0[i] == (en[i] ? 1 : 0), $sformatf("start pulses of DTU %0d", i));
    check(mode == m, "mode");
    check(done_rise >= busy_fall + 3, $sformatf("done waits for the accumulator (%0d %0d)", done_rise, busy_fall));
    bus_rd(XR_STATUS, d);  check(d == 32'h2, "STATUS done, not busy");
    bus_rd(XR_SUM_LO, d);  check(d == acc_sum[31:0], "SUM_LO");
    bus_rd(XR_SUM_HI, d);  check(d == acc_sum[63:32], "SUM_HI");
    bus_rd(XR_CLASS, d);   check(d == {acc_votes, 12'd0, acc_class}, "CLASS");
    bus_rd(XR_LEAVES, d);  check(d == 32'(acc_leaves), "LEAVES");
    bus_rd(XR_CYCLES, d);  check(d == 32'(done_rise - t_wr), $sformatf("CYCLES %0d exp %0d", d, done_rise - t_wr));
    bus_rd(XR_SAMPLE, d);  check(d == 32'(idx), "SAMPLE read-back");
    bus_rd(XR_DTU_EN, d);  check(d == 32'(en), "DTU_EN read-back");
  endtask

  initial begin
    logic [31:0] d;
    req_en = 0; req_we = 0; req_word = 0; req_wdata = 0;
    acc_sum = 0; acc_class = 0; acc_votes = 0; acc_leaves = 0;
    for (int i = 0; i < N; i++) begin left[i] = 0; starts[i] = 0; end
    n_rd = 0; n_clr = 0; idle_hold = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    bus_rd(XR_CONFIG, d); check(d == 32'h0010_0804, "CONFIG");
    bus_rd(XR_DTU_EN, d); check(d == 32'hf, "DTU_EN resets to all ones");
    one_run(0, 17, 4'hf);
    one_run(1, 5, 4'b0101);
    one_run(0, 1000, 4'b1000);
    check(n_rd == 3 && n_clr == 3, "one sample read and one clear per run");
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
