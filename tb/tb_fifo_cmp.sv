// tb_fifo_cmp: self-checking test of the Gray-code pointer comparator.
// For every pair of pointers (4 address bits, so all 32 x 32 pairs) the
// expected flags are computed from the binary counts: empty when the counts
// are equal, full when they differ by exactly the FIFO depth.
module tb_fifo_cmp;
  localparam int unsigned ADDR_W = 4;
  localparam int unsigned N = 1 << (ADDR_W + 1);

  logic [ADDR_W:0] own, other;
  logic            is_full, is_empty;
  int checks = 0, failures = 0;

  fifo_cmp #(.ADDR_W(ADDR_W)) dut (.*);

  function automatic logic [ADDR_W:0] to_gray(input int unsigned b);
    logic [ADDR_W:0] v;
    v = (ADDR_W+1)'(b);
    return v ^ (v >> 1);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned a = 0; a < N; a++) begin
      for (int unsigned b = 0; b < N; b++) begin
        own = to_gray(a); other = to_gray(b);
        #1;
        checks++;
        if (is_empty !== (a == b) || is_full !== (((a - b) % N) == (N / 2))) begin
          failures++;
          $display("FAIL: a=%0d b=%0d full=%b empty=%b", a, b, is_full, is_empty);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
