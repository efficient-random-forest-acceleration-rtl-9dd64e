// tb_axil_master.svh: AXI4-Lite master tasks for testbenches. Included in a
// module that declares clk and the s_* AXI4-Lite signals. The address and
// data channels of a write are raised with independent random delays, and
// the response ready signals are delayed at random, to exercise the slave's
// handshakes. axi_gap = 0 turns the random delays off (fast bulk loads).

int axi_gap = 3;
int axi_bad_resp = 0;

task automatic axi_init();
  s_awaddr = 0; s_awvalid = 0; s_wdata = 0; s_wstrb = 0; s_wvalid = 0;
  s_bready = 0; s_araddr = 0; s_arvalid = 0; s_rready = 0;
endtask

task automatic axi_write(logic [31:0] addr, logic [31:0] data, logic [3:0] strb = 4'hf);
  int da, dw;
  bit aw_done, w_done;
  da = (axi_gap > 0) ? $urandom_range(0, axi_gap) : 0;
  dw = (axi_gap > 0) ? $urandom_range(0, axi_gap) : 0;
  aw_done = 0; w_done = 0;
  @(negedge clk);
  for (int c = 0; !(aw_done && w_done); c++) begin
    if (!aw_done && c >= da) begin s_awvalid = 1; s_awaddr = addr; end
    if (!w_done && c >= dw)  begin s_wvalid = 1; s_wdata = data; s_wstrb = strb; end
    @(posedge clk);
    if (s_awvalid && s_awready) aw_done = 1;
    if (s_wvalid && s_wready)   w_done = 1;
    @(negedge clk);
    if (aw_done) s_awvalid = 0;
    if (w_done)  s_wvalid = 0;
  end
  if (axi_gap > 0) repeat ($urandom_range(0, axi_gap)) @(negedge clk);
  s_bready = 1;
  @(posedge clk);
  while (!s_bvalid) @(posedge clk);
  if (s_bresp != 2'b00) axi_bad_resp++;
  @(negedge clk);
  s_bready = 0;
endtask

task automatic axi_read(logic [31:0] addr, output logic [31:0] data);
  @(negedge clk);
  s_arvalid = 1; s_araddr = addr;
  @(posedge clk);
  while (!s_arready) @(posedge clk);
  @(negedge clk);
  s_arvalid = 0;
  if (axi_gap > 0) repeat ($urandom_range(0, axi_gap)) @(negedge clk);
  s_rready = 1;
  @(posedge clk);
  while (!s_rvalid) @(posedge clk);
  data = s_rdata;
  if (s_rresp != 2'b00) axi_bad_resp++;
  @(negedge clk);
  s_rready = 0;
endtask
