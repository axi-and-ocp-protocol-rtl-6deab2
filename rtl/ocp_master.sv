// ocp_master: OCP master port of the AXI-to-OCP bridge.
//
// It takes single-word transfer requests (bridge_pkg::req_t) from the
// request FIFO, in the OCP clock domain, and performs each as one OCP
// transfer on a basic OCP interface: MCmd, MAddr and MData from the master;
// SCmdAccept, SDataAccept, SResp and SData from the slave. All signals are
// sampled on the rising edge of Clk.
//
// Sequence for one request:
//   IDLE  - when the request FIFO is not empty (and, for a read, the reply
//           FIFO has room), the head is loaded into the output registers and
//           popped.
//   REQ   - MCmd is Write (1) or Read (2) with MAddr; for a write MData is
//           driven too. The command is held until SCmdAccept is sampled high.
//   WDATA - a write whose command was accepted without SDataAccept keeps MData
//           driven, with MCmd back at Idle, until SDataAccept is sampled high.
//           When both accepts come in the same cycle this state is skipped.
//   RESP  - a read waits for SResp other than NULL and pushes SData with the
//           response (DVA gives AXI OKAY, FAIL and ERR give AXI SLVERR) into
//           the reply FIFO. A response sampled in the cycle the command is
//           accepted is taken at once.
// So one transfer occupies at least two Clk cycles (IDLE, REQ). Only one
// transfer is outstanding, and a read is started only when the reply FIFO
// has room, so a reply is never lost (the basic OCP interface cannot stall a
// response). Writes are posted: no write response is expected. MReset_n
// gives the OCP slave its reset, taken from the OCP-domain reset input.
//
// The signal set and the Write/Read command codes are the source design's; the
// state sequence, the meaning given to SDataAccept without a separate write
// data valid, and the response mapping are this design's choices.
module ocp_master
  import bridge_pkg::*;
(
  input  logic              Clk,
  input  logic              rst_n,
  // local interface to the request FIFO (read side)
  output logic              req_pop,
  input  req_t              req_data,
  input  logic              req_empty,
  // local interface to the reply FIFO (write side)
  output logic              rsp_push,
  output rsp_t              rsp_data,
  input  logic              rsp_full,
  // OCP master interface
  output logic              MReset_n,
  output ocp_cmd_e          MCmd,
  output logic [ADDR_W-1:0] MAddr,
  output logic [DATA_W-1:0] MData,
  input  logic              SCmdAccept,
  input  logic              SDataAccept,
  input  ocp_resp_e         SResp,
  input  logic [DATA_W-1:0] SData
);

  typedef enum logic [1:0] {M_IDLE, M_REQ, M_WDATA, M_RESP} state_e;

  state_e            state;
  logic              is_read_q;
  logic [ADDR_W-1:0] addr_q;
  logic [DATA_W-1:0] data_q;

  logic load;
  logic resp_seen;

  assign MReset_n = rst_n;

  assign load    = (state == M_IDLE) && !req_empty && !(req_data.is_read && rsp_full);
  assign req_pop = load;

  assign MCmd  = (state == M_REQ) ? (is_read_q ? OCP_RD : OCP_WR) : OCP_IDLE;
  assign MAddr = addr_q;
  assign MData = is_read_q ? '0 : data_q;

  assign resp_seen = (SResp != OCP_NULL) &&
                     ((state == M_RESP) || ((state == M_REQ) && is_read_q && SCmdAccept));

  assign rsp_push      = resp_seen;
  assign rsp_data.data = SData;
  assign rsp_data.resp = (SResp == OCP_DVA) ? AXI_OKAY : AXI_SLVERR;

  always_ff @(posedge Clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= M_IDLE;
      is_read_q <= 1'b0;
      addr_q    <= '0;
      data_q    <= '0;
    end else begin
      unique case (state)
        M_IDLE: begin
          if (load) begin
            state     <= M_REQ;
            is_read_q <= req_data.is_read;
            addr_q    <= req_data.addr;
            data_q    <= req_data.data;
          end
        end
        M_REQ: begin
          if (SCmdAccept) begin
            if (is_read_q)        state <= resp_seen ? M_IDLE : M_RESP;
            else if (SDataAccept) state <= M_IDLE;
            else                  state <= M_WDATA;
          end
        end
        M_WDATA: if (SDataAccept) state <= M_IDLE;
        M_RESP:  if (resp_seen)   state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

  // A command is held, unchanged, until the slave accepts it.
  a_cmd_hold: assert property (@(posedge Clk) disable iff (!rst_n)
      (MCmd != OCP_IDLE) && !SCmdAccept |=> (MCmd == $past(MCmd)) && $stable(MAddr) && $stable(MData));
  a_no_overflow: assert property (@(posedge Clk) disable iff (!rst_n)
      !(rsp_push && rsp_full));

endmodule
