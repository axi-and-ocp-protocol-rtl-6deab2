// async_fifo: asynchronous FIFO between two unrelated clock domains.
//
// Words are written in the wclk domain and read in the rclk domain. The
// block is built from the parts the source design names: a dual-port memory
// (fifo_mem), a pointer with its flag in each domain (fifo_ptr, which uses
// fifo_cmp to compare pointers), and two synchronizers (ptr_sync) that carry
// each Gray-coded pointer into the other domain.
//
// Write side: when winc is high and wfull low at a wclk edge, wdata is stored.
// Read side: rdata shows the oldest word whenever rempty is low; raising rinc
// for one rclk edge removes it. A written word becomes visible to the reader
// after the write pointer has passed the two-stage synchronizer (two to three
// rclk edges); a freed slot becomes visible to the writer the same way.
// Both flags are conservative: full and empty may be seen late, never early.
// Each domain has its own active-low asynchronous reset; both must be
// applied together.
//
// Capacity is 2**ADDR_W words. The defaults (32-bit words, 5 address bits,
// 32 entries, 6-bit pointers) are the values shown in the source design's FIFO
// simulation.
module async_fifo #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 5
) (
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic              winc,
  input  logic [DATA_W-1:0] wdata,
  output logic              wfull,

  input  logic              rclk,
  input  logic              rrst_n,
  input  logic              rinc,
  output logic [DATA_W-1:0] rdata,
  output logic              rempty
);

  logic [ADDR_W-1:0] waddr, raddr;
  logic [ADDR_W:0]   wptr, rptr, wq2_rptr, rq2_wptr;

  fifo_mem #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_mem (
    .wclk  (wclk),
    .wen   (winc && !wfull),
    .waddr (waddr),
    .wdata (wdata),
    .raddr (raddr),
    .rdata (rdata)
  );

  ptr_sync #(.W(ADDR_W+1)) u_sync_r2w (
    .clk (wclk), .rst_n (wrst_n), .d (rptr), .q (wq2_rptr)
  );

  ptr_sync #(.W(ADDR_W+1)) u_sync_w2r (
    .clk (rclk), .rst_n (rrst_n), .d (wptr), .q (rq2_wptr)
  );

  fifo_ptr #(.ADDR_W(ADDR_W), .WRITE_SIDE(1'b1)) u_wptr_full (
    .clk (wclk), .rst_n (wrst_n), .inc (winc), .other_gray (wq2_rptr),
    .addr (waddr), .gray (wptr), .flag (wfull)
  );

  fifo_ptr #(.ADDR_W(ADDR_W), .WRITE_SIDE(1'b0)) u_rptr_empty (
    .clk (rclk), .rst_n (rrst_n), .inc (rinc), .other_gray (rq2_wptr),
    .addr (raddr), .gray (rptr), .flag (rempty)
  );

endmodule
