// bridge_pkg: types and constants shared by the AXI-to-OCP bridge.
//
// The bridge carries 32-bit addresses and 32-bit data on both sides. The
// OCP command and response codes follow the OCP specification (Idle, Write,
// Read, ... and Null, DVA, FAIL, ERR); the AXI burst and response codes follow
// the AMBA 3 AXI specification. Only the OCP Write and Read commands are
// issued by this bridge; the other five command extensions are listed so the
// encoding is complete. A request crossing from the AXI clock domain to the
// OCP clock domain is a req_t; a read reply crossing back is a rsp_t.
package bridge_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned STRB_W = DATA_W / 8;

  // OCP MCmd encoding
  typedef enum logic [2:0] {
    OCP_IDLE  = 3'd0,
    OCP_WR    = 3'd1,
    OCP_RD    = 3'd2,
    OCP_RDEX  = 3'd3,
    OCP_RDL   = 3'd4,
    OCP_WRNP  = 3'd5,
    OCP_WRC   = 3'd6,
    OCP_BCST  = 3'd7
  } ocp_cmd_e;

  // OCP SResp encoding
  typedef enum logic [1:0] {
    OCP_NULL = 2'd0,
    OCP_DVA  = 2'd1,
    OCP_FAIL = 2'd2,
    OCP_ERR  = 2'd3
  } ocp_resp_e;

  // AXI burst type
  typedef enum logic [1:0] {
    AXI_FIXED = 2'd0,
    AXI_INCR  = 2'd1,
    AXI_WRAP  = 2'd2,
    AXI_RSVD  = 2'd3
  } axi_burst_e;

  // AXI response
  typedef enum logic [1:0] {
    AXI_OKAY   = 2'd0,
    AXI_EXOKAY = 2'd1,
    AXI_SLVERR = 2'd2,
    AXI_DECERR = 2'd3
  } axi_resp_e;

  // One OCP transfer, written by the AXI slave and read by the OCP master.
  typedef struct packed {
    logic              is_read;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
  } req_t;

  // One read reply, written by the OCP master and read by the AXI slave.
  typedef struct packed {
    logic [DATA_W-1:0] data;
    axi_resp_e         resp;
  } rsp_t;

  localparam int unsigned REQ_W = $bits(req_t);
  localparam int unsigned RSP_W = $bits(rsp_t);

  // Address of beat n+1 of an AXI burst, from the address of beat n.
  function automatic logic [ADDR_W-1:0] axi_next_addr(
      input logic [ADDR_W-1:0] addr,
      input logic [2:0]        size,
      input logic [3:0]        len,
      input axi_burst_e        burst);
    logic [ADDR_W-1:0] step;
    logic [ADDR_W-1:0] incr;
    logic [ADDR_W-1:0] wrap_mask;
    step      = ADDR_W'(1) << size;
    incr      = (addr & ~(step - 1)) + step;
    // WRAP bursts are 2, 4, 8 or 16 beats: the wrap boundary is len+1 beats.
    wrap_mask = (ADDR_W'({1'b0, len} + 5'd1) << size) - 1;
    unique case (burst)
      AXI_FIXED: axi_next_addr = addr;
      AXI_WRAP:  axi_next_addr = (addr & ~wrap_mask) | (incr & wrap_mask);
      default:   axi_next_addr = incr;
    endcase
  endfunction

endpackage
