// axi_slave: AXI slave port of the AXI-to-OCP bridge.
//
// It faces an AXI master on the five AXI channels (write address, write data,
// write response, read address, read data) and turns every data beat into one
// single-word OCP transfer request (bridge_pkg::req_t), written into the
// request FIFO that crosses to the OCP clock domain. Read data comes back
// through a reply FIFO (bridge_pkg::rsp_t) and is returned on the R channel.
//
// One AXI transaction is handled at a time. From IDLE a valid write address is
// taken first, otherwise a valid read address. The burst's ID, address,
// length, size and type are kept; the address of each further beat is
// computed by bridge_pkg::axi_next_addr (FIXED, INCR and WRAP; the reserved
// type is treated as INCR).
//   Write: WREADY is high while the request FIFO has room; each beat is
//   pushed with its address. After the beat marked WLAST the write response is
//   offered on B with the burst's ID. Writes are posted: BRESP is OKAY once
//   all beats are in the FIFO, without waiting for the OCP side. The OCP
//   interface has no byte enables, so a beat with all strobes set is
//   forwarded, a beat with no strobe set is dropped, and a beat with only
//   some strobes set is dropped and makes BRESP SLVERR. A WLAST that does not
//   fall on beat AWLEN+1 also gives SLVERR.
//   Read: one read request per beat is pushed while the FIFO has room; the
//   replies are returned on R in order, RLAST on beat ARLEN+1, RRESP from the
//   reply.
// AWREADY and ARREADY are high in IDLE only, so an address is accepted one
// cycle after it is presented at the earliest. Active-low asynchronous reset.
//
// The write-channel signal set follows the source design's table of AXI slave
// signals; the read channels are the AXI read channels of the source design's
// channel diagram. Posting writes, the strobe rule and serving one
// transaction at a time are this design's choices.
module axi_slave
  import bridge_pkg::*;
#(
  parameter int unsigned ID_W = 4
) (
  input  logic              ACLK,
  input  logic              ARESETn,
  // write address channel
  input  logic [ID_W-1:0]   AWID,
  input  logic [ADDR_W-1:0] AWADDR,
  input  logic [3:0]        AWLEN,
  input  logic [2:0]        AWSIZE,
  input  logic [1:0]        AWBURST,
  input  logic [1:0]        AWLOCK,
  input  logic [3:0]        AWCACHE,
  input  logic              AWVALID,
  output logic              AWREADY,
  // write data channel
  input  logic [DATA_W-1:0] WDATA,
  input  logic [STRB_W-1:0] WSTRB,
  input  logic              WLAST,
  input  logic              WVALID,
  output logic              WREADY,
  // write response channel
  output logic [ID_W-1:0]   BID,
  output logic [1:0]        BRESP,
  output logic              BVALID,
  input  logic              BREADY,
  // read address channel
  input  logic [ID_W-1:0]   ARID,
  input  logic [ADDR_W-1:0] ARADDR,
  input  logic [3:0]        ARLEN,
  input  logic [2:0]        ARSIZE,
  input  logic [1:0]        ARBURST,
  input  logic [1:0]        ARLOCK,
  input  logic [3:0]        ARCACHE,
  input  logic              ARVALID,
  output logic              ARREADY,
  // read data channel
  output logic [ID_W-1:0]   RID,
  output logic [DATA_W-1:0] RDATA,
  output logic [1:0]        RRESP,
  output logic              RLAST,
  output logic              RVALID,
  input  logic              RREADY,
  // local interface to the request FIFO (write side)
  output logic              req_push,
  output req_t              req_data,
  input  logic              req_full,
  // local interface to the reply FIFO (read side)
  output logic              rsp_pop,
  input  rsp_t              rsp_data,
  input  logic              rsp_empty
);

  typedef enum logic [1:0] {S_IDLE, S_WDATA, S_WRESP, S_RDATA} state_e;

  state_e            state;
  logic [ID_W-1:0]   id_q;
  logic [ADDR_W-1:0] addr_q;
  logic [3:0]        len_q;
  logic [2:0]        size_q;
  axi_burst_e        burst_q;
  logic [4:0]        beat_q;     // write beats taken / read requests issued
  logic [4:0]        rbeat_q;    // read replies returned
  logic              err_q;

  logic aw_hs, ar_hs, w_hs, b_hs, r_hs;
  logic strb_full, strb_none;

  // AWLOCK/AWCACHE/ARLOCK/ARCACHE carry no meaning for an OCP target without
  // locking or caching; they are accepted and not forwarded.
  logic unused_attr;
  assign unused_attr = ^{AWLOCK, AWCACHE, ARLOCK, ARCACHE};

  assign AWREADY = (state == S_IDLE);
  assign ARREADY = (state == S_IDLE) && !AWVALID;
  assign WREADY  = (state == S_WDATA) && !req_full;
  assign BVALID  = (state == S_WRESP);
  assign BID     = id_q;
  assign BRESP   = err_q ? AXI_SLVERR : AXI_OKAY;

  assign RVALID  = (state == S_RDATA) && !rsp_empty;
  assign RID     = id_q;
  assign RDATA   = rsp_data.data;
  assign RRESP   = rsp_data.resp;
  assign RLAST   = (rbeat_q == {1'b0, len_q});
  assign rsp_pop = RVALID && RREADY;

  assign aw_hs = AWVALID && AWREADY;
  assign ar_hs = ARVALID && ARREADY;
  assign w_hs  = WVALID && WREADY;
  assign b_hs  = BVALID && BREADY;
  assign r_hs  = RVALID && RREADY;

  assign strb_full = &WSTRB;
  assign strb_none = ~|WSTRB;

  always_comb begin
    req_push         = 1'b0;
    req_data.is_read = (state == S_RDATA);
    req_data.addr    = addr_q;
    req_data.data    = WDATA;
    if (state == S_WDATA) begin
      req_push = w_hs && strb_full;
    end else if (state == S_RDATA) begin
      req_push = !req_full && (beat_q <= {1'b0, len_q});
      req_data.data = '0;
    end
  end

  always_ff @(posedge ACLK or negedge ARESETn) begin
    if (!ARESETn) begin
      state   <= S_IDLE;
      id_q    <= '0;
      addr_q  <= '0;
      len_q   <= '0;
      size_q  <= '0;
      burst_q <= AXI_FIXED;
      beat_q  <= '0;
      rbeat_q <= '0;
      err_q   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          beat_q  <= '0;
          rbeat_q <= '0;
          err_q   <= 1'b0;
          if (aw_hs) begin
            state   <= S_WDATA;
            id_q    <= AWID;
            addr_q  <= AWADDR;
            len_q   <= AWLEN;
            size_q  <= AWSIZE;
            burst_q <= axi_burst_e'(AWBURST);
          end else if (ar_hs) begin
            state   <= S_RDATA;
            id_q    <= ARID;
            addr_q  <= ARADDR;
            len_q   <= ARLEN;
            size_q  <= ARSIZE;
            burst_q <= axi_burst_e'(ARBURST);
          end
        end
        S_WDATA: begin
          if (w_hs) begin
            addr_q <= axi_next_addr(addr_q, size_q, len_q, burst_q);
            beat_q <= beat_q + 5'd1;
            if (!strb_full && !strb_none) err_q <= 1'b1;
            if (WLAST != (beat_q == {1'b0, len_q})) err_q <= 1'b1;
            if (WLAST) state <= S_WRESP;
          end
        end
        S_WRESP: begin
          if (b_hs) state <= S_IDLE;
        end
        S_RDATA: begin
          if (req_push) begin
            addr_q <= axi_next_addr(addr_q, size_q, len_q, burst_q);
            beat_q <= beat_q + 5'd1;
          end
          if (r_hs) begin
            rbeat_q <= rbeat_q + 5'd1;
            if (RLAST) state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // AXI rule: a valid response stays valid, and unchanged, until taken.
  a_b_stable: assert property (@(posedge ACLK) disable iff (!ARESETn)
      BVALID && !BREADY |=> BVALID && $stable(BID) && $stable(BRESP));
  a_r_stable: assert property (@(posedge ACLK) disable iff (!ARESETn)
      RVALID && !RREADY |=> RVALID && $stable(RDATA) && $stable(RLAST));
  // Never write into a full request FIFO.
  a_no_overflow: assert property (@(posedge ACLK) disable iff (!ARESETn)
      !(req_push && req_full));

endmodule
