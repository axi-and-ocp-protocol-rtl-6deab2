// axi_ocp_bridge: bridge from an AXI master to an OCP slave across two clock
// domains.
//
// An AXI master (AXI clock ACLK) reaches an OCP slave (OCP clock Clk) through
// three parts: axi_slave terminates the AXI channels and splits every burst
// into single-word requests; a request FIFO (async_fifo, AXI clock to OCP
// clock) carries them; ocp_master performs each as one OCP Write or Read. Read
// data returns through a second async_fifo (OCP clock to AXI clock) to the AXI
// R channel. The two clocks may be unrelated; each domain has its own
// active-low reset, and both resets must be applied together.
//
// Ports: the AXI slave channels (write address, write data, write response,
// read address, read data) and the basic OCP master signals (MCmd, MAddr,
// MData, SCmdAccept, SDataAccept, SResp, SData, MReset_n). Addresses and data
// are 32 bits on both sides.
//
// Timing: a write beat reaches the OCP interface after the request FIFO's
// synchronizer (2-3 OCP clock edges) plus two OCP cycles; the AXI write
// response is given as soon as the last beat is in the FIFO (posted writes).
// A read beat returns after the OCP transfer and the reply FIFO's
// synchronizer (2-3 AXI clock edges).
//
// The AXI slave / FIFO / OCP master structure is the source design's. The reply
// FIFO for read data is this design's addition, since the source design's block
// diagram shows the forward direction only.
module axi_ocp_bridge
  import bridge_pkg::*;
#(
  parameter int unsigned ID_W        = 4,
  parameter int unsigned FIFO_ADDR_W = 5
) (
  // AXI clock domain
  input  logic              ACLK,
  input  logic              ARESETn,
  input  logic [ID_W-1:0]   AWID,
  input  logic [ADDR_W-1:0] AWADDR,
  input  logic [3:0]        AWLEN,
  input  logic [2:0]        AWSIZE,
  input  logic [1:0]        AWBURST,
  input  logic [1:0]        AWLOCK,
  input  logic [3:0]        AWCACHE,
  input  logic              AWVALID,
  output logic              AWREADY,
  input  logic [DATA_W-1:0] WDATA,
  input  logic [STRB_W-1:0] WSTRB,
  input  logic              WLAST,
  input  logic              WVALID,
  output logic              WREADY,
  output logic [ID_W-1:0]   BID,
  output logic [1:0]        BRESP,
  output logic              BVALID,
  input  logic              BREADY,
  input  logic [ID_W-1:0]   ARID,
  input  logic [ADDR_W-1:0] ARADDR,
  input  logic [3:0]        ARLEN,
  input  logic [2:0]        ARSIZE,
  input  logic [1:0]        ARBURST,
  input  logic [1:0]        ARLOCK,
  input  logic [3:0]        ARCACHE,
  input  logic              ARVALID,
  output logic              ARREADY,
  output logic [ID_W-1:0]   RID,
  output logic [DATA_W-1:0] RDATA,
  output logic [1:0]        RRESP,
  output logic              RLAST,
  output logic              RVALID,
  input  logic              RREADY,
  // OCP clock domain
  input  logic              Clk,
  input  logic              Reset_n,
  output logic              MReset_n,
  output logic [2:0]        MCmd,
  output logic [ADDR_W-1:0] MAddr,
  output logic [DATA_W-1:0] MData,
  input  logic              SCmdAccept,
  input  logic              SDataAccept,
  input  logic [1:0]        SResp,
  input  logic [DATA_W-1:0] SData
);

  logic     req_push, req_full, req_pop, req_empty;
  req_t     req_wdata, req_rdata;
  logic     rsp_push, rsp_full, rsp_pop, rsp_empty;
  rsp_t     rsp_wdata, rsp_rdata;
  ocp_cmd_e mcmd;

  axi_slave #(.ID_W(ID_W)) u_axi_slave (
    .ACLK, .ARESETn,
    .AWID, .AWADDR, .AWLEN, .AWSIZE, .AWBURST, .AWLOCK, .AWCACHE, .AWVALID, .AWREADY,
    .WDATA, .WSTRB, .WLAST, .WVALID, .WREADY,
    .BID, .BRESP, .BVALID, .BREADY,
    .ARID, .ARADDR, .ARLEN, .ARSIZE, .ARBURST, .ARLOCK, .ARCACHE, .ARVALID, .ARREADY,
    .RID, .RDATA, .RRESP, .RLAST, .RVALID, .RREADY,
    .req_push (req_push), .req_data (req_wdata), .req_full (req_full),
    .rsp_pop  (rsp_pop),  .rsp_data (rsp_rdata), .rsp_empty (rsp_empty)
  );

  async_fifo #(.DATA_W(REQ_W), .ADDR_W(FIFO_ADDR_W)) u_req_fifo (
    .wclk (ACLK), .wrst_n (ARESETn), .winc (req_push), .wdata (req_wdata), .wfull (req_full),
    .rclk (Clk),  .rrst_n (Reset_n), .rinc (req_pop),  .rdata (req_rdata), .rempty (req_empty)
  );

  async_fifo #(.DATA_W(RSP_W), .ADDR_W(FIFO_ADDR_W)) u_rsp_fifo (
    .wclk (Clk),  .wrst_n (Reset_n), .winc (rsp_push), .wdata (rsp_wdata), .wfull (rsp_full),
    .rclk (ACLK), .rrst_n (ARESETn), .rinc (rsp_pop),  .rdata (rsp_rdata), .rempty (rsp_empty)
  );

  ocp_master u_ocp_master (
    .Clk, .rst_n (Reset_n),
    .req_pop (req_pop), .req_data (req_rdata), .req_empty (req_empty),
    .rsp_push (rsp_push), .rsp_data (rsp_wdata), .rsp_full (rsp_full),
    .MReset_n, .MCmd (mcmd), .MAddr, .MData,
    .SCmdAccept, .SDataAccept, .SResp (ocp_resp_e'(SResp)), .SData
  );

  assign MCmd = mcmd;

endmodule
