// tb_rf_workload: the evaluated regression workload (100 trees, depth up to
// 9, 8 features) on 1, 5, 10 and 15 DTUs, simulated side by side. Tree
// memories are sized so that each DTU's share of nearly complete depth-9
// trees fits (1 DTU: 131072 words, 5: 32768, 10: 16384, 15: 8192). Every
// configuration checks its sums, leaf counts and exact cycle counts against
// a reference walk; the testbench then checks that the compute time per
// sample falls as DTUs are added and prints it.
module tb_rf_workload;
  localparam int NCFG = 4;
  localparam int DTUS  [NCFG] = '{1, 5, 10, 15};
  localparam int DEPTH [NCFG] = '{131072, 32768, 16384, 8192};
  logic clk = 0;
  logic fin [NCFG];
  int chk [NCFG], fail [NCFG], cyc [NCFG], wds [NCFG];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    tb_rf_workload_cfg #(.P_N_DTU(DTUS[i]), .P_MEM_DEPTH(DEPTH[i])) u_cfg (
      .clk, .finished(fin[i]), .checks(chk[i]), .failures(fail[i]), .cycles(cyc[i]), .words(wds[i]));
  end

  initial begin
    #1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    for (int i = 0; i < NCFG; i++) begin
      checks += chk[i];
      failures += fail[i];
      $display("%2d DTUs: %5d cycles per sample, largest tree memory image %6d words",
               DTUS[i], cyc[i], wds[i]);
    end
    for (int i = 1; i < NCFG; i++) begin
      checks++;
      if (cyc[i] >= cyc[i - 1]) begin
        failures++;
        $display("FAIL: %0d DTUs not faster than %0d", DTUS[i], DTUS[i - 1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
