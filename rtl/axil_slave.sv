// axil_slave: AXI4-Lite slave through which the host and the DMA reach the
// accelerator's local memories and registers.
//
// Each accepted AXI4-Lite transaction becomes a single-cycle request on
// `req` (byte address, data, strobes). A write is accepted when AWVALID and
// WVALID are both high (AWREADY and WREADY rise together in that cycle); the
// request goes out in the same cycle and BRESP=OKAY follows from the next
// cycle. A read is accepted when ARVALID is high and no write is pending;
// the read data is taken from `rdata` READ_LAT cycles after the request and
// returned with RRESP=OKAY. One transaction is in flight at a time; a write
// wins over a simultaneous read. Address decoding into regions is done by
// the enclosing design.
// AXI-lite as the bus is from the implementation described for the
// accelerator; the slave's timing is this design's.
module axil_slave
  import rf_pkg::*;
#(
  parameter int unsigned READ_LAT = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [31:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // memory-side request
  output bus_req_t    req,
  input  logic [31:0] rdata
);

  typedef enum logic [1:0] {A_IDLE, A_BRESP, A_RWAIT, A_RDATA} astate_t;

  astate_t     state;
  logic [3:0]  lat_cnt;
  logic        take_wr, take_rd;

  assign take_wr = (state == A_IDLE) && s_awvalid && s_wvalid;
  assign take_rd = (state == A_IDLE) && !take_wr && s_arvalid;

  assign s_awready = take_wr;
  assign s_wready  = take_wr;
  assign s_arready = take_rd;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign s_bvalid  = (state == A_BRESP);
  assign s_rvalid  = (state == A_RDATA);

  always_comb begin
    req.valid = take_wr || take_rd;
    req.we    = take_wr;
    req.addr  = take_wr ? s_awaddr : s_araddr;
    req.wdata = s_wdata;
    req.strb  = take_wr ? s_wstrb : 4'h0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= A_IDLE;
      lat_cnt <= '0;
      s_rdata <= '0;
    end else begin
      unique case (state)
        A_IDLE: begin
          if (take_wr) state <= A_BRESP;
          else if (take_rd) begin
            state   <= A_RWAIT;
            lat_cnt <= 4'(READ_LAT - 1);
          end
        end
        A_BRESP: if (s_bready) state <= A_IDLE;
        A_RWAIT: begin
          if (lat_cnt == 4'd0) begin
            state   <= A_RDATA;
            s_rdata <= rdata;
          end else lat_cnt <= lat_cnt - 4'd1;
        end
        A_RDATA: if (s_rready) state <= A_IDLE;
        default: state <= A_IDLE;
      endcase
    end
  end

  // AXI rule: a valid response is held until it is taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
  // At most one transaction in flight.
  a_single: assert property (@(posedge clk) disable iff (!rst_n)
    req.valid |-> state == A_IDLE);

endmodule
