// ocp_slave_model: behavioural OCP slave used by the testbenches.
//
// A memory keyed by byte address (a location never written reads as the
// bitwise inverse of its address). It answers the basic OCP signals on the
// rising edge of Clk, changing its outputs after the falling edge:
//  - SCmdAccept is given with probability accept_pct percent per cycle while
//    a command is presented, and never while 'hold' is high;
//  - a write's SDataAccept comes with the command accept or up to a few
//    cycles later (probability accept_pct per cycle); MData is stored then;
//  - a read's response (SResp with SData) comes in the accept cycle or 1 to 3
//    cycles later; addresses with the top nibble 4'hF answer ERR, others DVA.
// Counters record how often each case happened, for coverage checks.
module ocp_slave_model (
  input  logic        Clk,
  input  logic [2:0]  MCmd,
  input  logic [31:0] MAddr,
  input  logic [31:0] MData,
  output logic        SCmdAccept,
  output logic        SDataAccept,
  output logic [1:0]  SResp,
  output logic [31:0] SData,
  input  int          accept_pct,
  input  logic        hold
);
  logic [31:0] mem [logic [31:0]];

  int n_writes = 0, n_reads = 0, n_cmd_stall = 0, n_data_stall = 0;
  int n_resp_same = 0, n_resp_late = 0, n_err = 0;

  typedef enum {IDLE, WDATA, RWAIT} st_e;
  st_e         st = IDLE;
  logic [31:0] waddr, raddr;
  int          rlat;

  function automatic logic [31:0] rd(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : ~a;
  endfunction

  function automatic logic [1:0] code(input logic [31:0] a);
    return (a[31:28] == 4'hF) ? 2'd3 : 2'd1;
  endfunction

  initial begin
    SCmdAccept = 0; SDataAccept = 0; SResp = 0; SData = 0;
  end

  // drive outputs for the coming edge
  always @(negedge Clk) begin
    SCmdAccept  <= 0;
    SDataAccept <= 0;
    SResp       <= 0;
    SData       <= 0;
    unique case (st)
      IDLE: if (MCmd != 3'd0) begin
        if (!hold && ($urandom % 100) < accept_pct) begin
          SCmdAccept <= 1;
          if (MCmd == 3'd1) SDataAccept <= ($urandom % 2) == 0;
          if (MCmd == 3'd2) begin
            rlat = $urandom % 4;
            if (rlat == 0) begin
              SResp <= code(MAddr);
              SData <= rd(MAddr);
            end
          end
        end
      end
      WDATA: SDataAccept <= ($urandom % 100) < accept_pct;
      RWAIT: begin
        if (rlat <= 1) begin
          SResp <= code(raddr);
          SData <= rd(raddr);
        end
      end
      default: ;
    endcase
  end

  // sample at the edge
  always @(posedge Clk) begin
    unique case (st)
      IDLE: if (MCmd != 3'd0) begin
        if (!SCmdAccept) n_cmd_stall++;
        else if (MCmd == 3'd1) begin
          if (SDataAccept) begin mem[MAddr] = MData; n_writes++; end
          else begin st = WDATA; waddr = MAddr; n_data_stall++; end
        end else if (MCmd == 3'd2) begin
          n_reads++;
          if (SResp != 2'd0) begin
            n_resp_same++;
            if (SResp == 2'd3) n_err++;
          end else begin st = RWAIT; raddr = MAddr; end
        end
      end
      WDATA: if (SDataAccept) begin mem[waddr] = MData; n_writes++; st = IDLE; end
      RWAIT: begin
        if (SResp != 2'd0) begin
          n_resp_late++;
          if (SResp == 2'd3) n_err++;
          st = IDLE;
        end else rlat--;
      end
      default: ;
    endcase
  end
endmodule
