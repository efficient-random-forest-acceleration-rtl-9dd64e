// tb_fp16_cmp_pipe: self-checking test of the three-cycle binary16 comparator.
//
// Feeds one operand pair per cycle (random values, plus zeros, equal
// values, negatives, infinities and NaNs), keeps the expected result of each
// in a queue computed with real arithmetic, and checks that out_valid comes
// exactly three cycles after in_valid and that out_le matches (a <= b,
// false when either operand is NaN).
module tb_fp16_cmp_pipe;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [15:0] a, b;
  logic out_valid, out_le;
  int checks = 0, failures = 0;

  fp16_cmp_pipe dut (.*);

  always #5 clk = ~clk;

  function automatic real h2r(logic [15:0] h);
    real m;
    int e;
    e = int'(h[14:10]);
    if (e == 0) m = real'(h[9:0]) / 1024.0 * (2.0 ** -14);
    else        m = (1.0 + real'(h[9:0]) / 1024.0) * (2.0 ** (e - 15));
    return h[15] ? -m : m;
  endfunction

  function automatic bit is_nan(logic [15:0] h);
    return h[14:10] == 5'h1f && h[9:0] != 0;
  endfunction

  function automatic bit ref_le(logic [15:0] x, logic [15:0] y);
    if (is_nan(x) || is_nan(y)) return 0;
    // infinities: map to large reals
    return h2r(x) <= h2r(y);
  endfunction

  bit exp_q[$];
  int lat_q[$];
  int cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // checker
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected result"); end
      else begin
        bit e; int t0;
        e = exp_q.pop_front(); t0 = lat_q.pop_front();
        if (out_le !== e || cyc - t0 != 3) begin
          failures++;
          $display("FAIL le=%0b exp=%0b latency=%0d", out_le, e, cyc - t0);
        end
      end
    end
  end

  task automatic drive(logic [15:0] x, logic [15:0] y);
    @(negedge clk);
    in_valid = 1; a = x; b = y;
    exp_q.push_back(ref_le(x, y));
    lat_q.push_back(cyc);       // in_valid sampled at posedge cyc+1, result seen at posedge cyc+4
  endtask

  initial begin
    in_valid = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    drive(16'h0000, 16'h8000);  // +0 <= -0
    drive(16'h8000, 16'h0000);
    drive(16'h3c00, 16'h3c00);  // 1 <= 1
    drive(16'h3c01, 16'h3c00);  // slightly above
    drive(16'hbc00, 16'h3c00);  // -1 <= 1
    drive(16'h3c00, 16'hbc00);
    drive(16'hc000, 16'hbc00);  // -2 <= -1
    drive(16'hbc00, 16'hc000);
    drive(16'h7c00, 16'h7bff);  // +inf vs max
    drive(16'hfc00, 16'hfbff);  // -inf vs -max
    drive(16'h7e00, 16'h3c00);  // NaN
    drive(16'h3c00, 16'h7e01);
    drive(16'h0001, 16'h0002);  // subnormals
    for (int i = 0; i < 3000; i++) begin
      logic [15:0] x, y;
      x = 16'($urandom);
      y = (i % 4 == 0) ? x : (i % 4 == 1) ? {x[15], 15'(x[14:0] + 15'($urandom_range(0, 2)))} : 16'($urandom);
      drive(x, y);
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("results missing: %0d", exp_q.size()); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
