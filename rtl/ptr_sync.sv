// ptr_sync: two-flip-flop synchronizer for a Gray-coded FIFO pointer.
//
// Used twice in the asynchronous FIFO: once to bring the read pointer into
// the write clock domain, once to bring the write pointer into the read clock
// domain. The input is sampled by the destination clock through two
// registers and nothing else, so the output follows the input two
// destination-clock edges later. Because the input is Gray coded, at most one
// bit changes per step and a sampled value is always either the old or the
// new pointer. Reset (active low, asynchronous) clears both stages.
//
// That the synchronizers hold nothing but the synchronizing registers is the
// source design's; the depth of two stages is this design's choice.
module ptr_sync #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
