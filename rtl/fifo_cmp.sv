// fifo_cmp: compares two Gray-coded FIFO pointers for the full and empty
// conditions.
//
// Pointers are ADDR_W+1 bits wide: one bit more than the memory address, so
// that a full FIFO (write pointer one lap ahead) can be told from an empty
// one (pointers equal). In Gray code "one lap ahead" means the two most
// significant bits differ and all others are equal. The block is purely
// combinational: 'own' is the pointer of the domain that uses the result
// (normally its next value), 'other' the synchronized pointer of the other
// domain. is_empty means own == other; is_full means own is a full lap ahead
// of other.
//
// The source design gives the block's job (compare the pointers, tell full and
// empty); the Gray-code test is the standard one for this structure.
module fifo_cmp #(
  parameter int unsigned ADDR_W = 5
) (
  input  logic [ADDR_W:0] own,
  input  logic [ADDR_W:0] other,
  output logic            is_full,
  output logic            is_empty
);

  if (ADDR_W < 2) begin : g_bad_width
    $error("fifo_cmp needs ADDR_W >= 2");
  end

  always_comb begin
    is_empty = (own == other);
    is_full  = (own == {~other[ADDR_W:ADDR_W-1], other[ADDR_W-2:0]});
  end

endmodule
