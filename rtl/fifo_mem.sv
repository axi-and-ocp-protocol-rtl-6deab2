// fifo_mem: the storage of the asynchronous FIFO, a dual-port RAM.
//
// The write port belongs to the write clock domain: on a rising edge of wclk
// with wen high, wdata is stored at waddr. The read port belongs to the read
// clock domain and is combinational: rdata always shows the word at raddr,
// so the FIFO's head is visible as soon as the read pointer moves
// (first-word fall-through). The memory has no reset; the FIFO never shows
// a word that was not written. Write-then-read latency is set by the pointer
// synchronizers, not by this block.
//
// The source design calls for a dual-port RAM shared by both clock domains; the
// combinational read port is this design's choice.
module fifo_mem #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 5
) (
  input  logic              wclk,
  input  logic              wen,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (wen) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
