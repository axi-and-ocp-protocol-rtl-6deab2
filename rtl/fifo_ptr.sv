// fifo_ptr: one side's pointer of the asynchronous FIFO, with its flag.
//
// Instanced once per clock domain. With WRITE_SIDE=1 it is the write pointer
// and its flag is 'full'; with WRITE_SIDE=0 it is the read pointer and its
// flag is 'empty'. The pointer is kept twice: as a binary count, whose low
// ADDR_W bits address the memory, and as its Gray code (bin ^ (bin >> 1)),
// which is what crosses to the other domain. 'inc' advances the pointer by
// one on the next clock edge unless the flag is set. The flag is registered:
// it is computed from the next pointer value and the synchronized pointer of
// the other side by fifo_cmp, so it is valid in the same cycle as the
// pointer. After an asynchronous active-low reset both pointers are zero,
// 'empty' is 1 and 'full' is 0.
//
// The source design places the read and write pointers and the full and empty
// flags in this block; the Gray/binary double register is this design's.
module fifo_ptr #(
  parameter int unsigned ADDR_W     = 5,
  parameter bit          WRITE_SIDE = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              inc,
  input  logic [ADDR_W:0]   other_gray,  // other side's pointer, synchronized
  output logic [ADDR_W-1:0] addr,
  output logic [ADDR_W:0]   gray,
  output logic              flag         // full (write side) or empty (read side)
);

  logic [ADDR_W:0] bin, bin_next, gray_next;
  logic            nxt_full, nxt_empty;

  always_comb begin
    bin_next  = bin + (ADDR_W+1)'(inc && !flag);
    gray_next = (bin_next >> 1) ^ bin_next;
  end

  fifo_cmp #(.ADDR_W(ADDR_W)) u_cmp (
    .own      (gray_next),
    .other    (other_gray),
    .is_full  (nxt_full),
    .is_empty (nxt_empty)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin  <= '0;
      gray <= '0;
      flag <= !WRITE_SIDE;
    end else begin
      bin  <= bin_next;
      gray <= gray_next;
      flag <= WRITE_SIDE ? nxt_full : nxt_empty;
    end
  end

  assign addr = bin[ADDR_W-1:0];

endmodule
