// tb_axil_slave: self-checking test of the AXI4-Lite slave.
//
// A memory model behind the slave's request port answers reads two cycles
// after the request. The test writes random words with random strobes and
// random channel delays (address before data, data before address, both
// together, late response ready), reads them back, and checks the data,
// the OKAY responses, that each transaction makes exactly one request, and
// the read latency seen on the request port.
module tb_axil_slave;
  import rf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] s_awaddr; logic s_awvalid, s_awready;
  logic [31:0] s_wdata; logic [3:0] s_wstrb; logic s_wvalid, s_wready;
  logic [1:0] s_bresp; logic s_bvalid, s_bready;
  logic [31:0] s_araddr; logic s_arvalid, s_arready;
  logic [31:0] s_rdata; logic [1:0] s_rresp; logic s_rvalid, s_rready;
  bus_req_t req;
  logic [31:0] rdata;
  int checks = 0, failures = 0;

  axil_slave #(.READ_LAT(2)) dut (.*);

  always #5 clk = ~clk;

  `include "tb_axil_master.svh"

  // memory model, two-cycle read
  logic [31:0] mem [256];
  logic [31:0] r1;
  int n_wr_req = 0, n_rd_req = 0;
  always @(posedge clk) begin
    if (req.valid && req.we) begin
      n_wr_req++;
      for (int i = 0; i < 4; i++) if (req.strb[i]) mem[req.addr[9:2]][8*i +: 8] <= req.wdata[8*i +: 8];
    end
    if (req.valid && !req.we) n_rd_req++;
    r1 <= (req.valid && !req.we) ? mem[req.addr[9:2]] : 32'hdead_beef;
    rdata <= r1;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] shadow [256];

  initial begin
    logic [31:0] d;
    axi_init();
    for (int i = 0; i < 256; i++) begin mem[i] = 0; shadow[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      int a; logic [31:0] v; logic [3:0] s;
      a = $urandom_range(0, 255); v = $urandom; s = (k < 100) ? 4'hf : 4'($urandom);
      axi_write(32'(a * 4), v, s);
      for (int i = 0; i < 4; i++) if (s[i]) shadow[a][8*i +: 8] = v[8*i +: 8];
    end
    check(n_wr_req == 300, $sformatf("%0d write requests for 300 writes", n_wr_req));
    for (int k = 0; k < 300; k++) begin
      int a;
      a = $urandom_range(0, 255);
      axi_read(32'(a * 4), d);
      check(d == shadow[a], $sformatf("read %0d: %h exp %h", a, d, shadow[a]));
    end
    check(n_rd_req == 300, "one request per read");
    check(axi_bad_resp == 0, "OKAY responses");
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
