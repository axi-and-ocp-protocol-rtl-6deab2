// tb_fifo_ptr: self-checking test of the FIFO pointer with its flag.
// A write-side and a read-side instance run from one clock. The test plays
// the other side of each: it moves the opposite count itself and feeds its
// Gray code. A reference count model, written from the FIFO rules alone
// (a write-side pointer never runs more than DEPTH ahead of the reader; a
// read-side pointer never passes the writer), predicts pointer, address and
// flag after every edge.
module tb_fifo_ptr;
  localparam int unsigned ADDR_W = 3;
  localparam int unsigned DEPTH  = 1 << ADDR_W;
  localparam int unsigned MOD    = 2 * DEPTH;

  logic clk = 1'b0;
  logic rst_n;
  // write side
  logic              w_inc;
  logic [ADDR_W:0]   w_other, w_gray;
  logic [ADDR_W-1:0] w_addr;
  logic              w_full;
  // read side
  logic              r_inc;
  logic [ADDR_W:0]   r_other, r_gray;
  logic [ADDR_W-1:0] r_addr;
  logic              r_empty;

  int unsigned wcnt, rd_for_w;   // write side model: own count, reader count fed
  int unsigned rcnt, wr_for_r;   // read side model: own count, writer count fed
  bit exp_full, exp_empty;
  int full_seen = 0, empty_seen = 0;
  int checks = 0, failures = 0;

  fifo_ptr #(.ADDR_W(ADDR_W), .WRITE_SIDE(1'b1)) u_w (
    .clk, .rst_n, .inc (w_inc), .other_gray (w_other),
    .addr (w_addr), .gray (w_gray), .flag (w_full));
  fifo_ptr #(.ADDR_W(ADDR_W), .WRITE_SIDE(1'b0)) u_r (
    .clk, .rst_n, .inc (r_inc), .other_gray (r_other),
    .addr (r_addr), .gray (r_gray), .flag (r_empty));

  always #5 clk = ~clk;

  function automatic logic [ADDR_W:0] to_gray(input int unsigned b);
    logic [ADDR_W:0] v;
    v = (ADDR_W+1)'(b);
    return v ^ (v >> 1);
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; w_inc = 0; r_inc = 0; w_other = '0; r_other = '0;
    wcnt = 0; rd_for_w = 0; rcnt = 0; wr_for_r = 0;
    exp_full = 0; exp_empty = 1;
    #12;
    check(!w_full && r_empty && w_gray == 0 && r_gray == 0, "reset state");
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // choose stimulus; in phases bias towards filling or draining
      w_inc = ($urandom % 100) < ((i / 200) % 2 ? 80 : 30);
      r_inc = ($urandom % 100) < ((i / 200) % 2 ? 30 : 80);
      // other side moves legally: the reader count stays within [wcnt-DEPTH, wcnt]
      if ((($urandom % 4) == 0) && rd_for_w != wcnt) rd_for_w = (rd_for_w + 1) % MOD;
      if ((($urandom % 4) == 0) && ((wr_for_r - rcnt + MOD) % MOD) < DEPTH) wr_for_r = (wr_for_r + 1) % MOD;
      w_other = to_gray(rd_for_w);
      r_other = to_gray(wr_for_r);
      @(posedge clk);
      if (w_inc && !exp_full) wcnt = (wcnt + 1) % MOD;
      if (r_inc && !exp_empty) rcnt = (rcnt + 1) % MOD;
      exp_full  = ((wcnt - rd_for_w + MOD) % MOD) == DEPTH;
      exp_empty = rcnt == wr_for_r;
      #1;
      check(w_gray == to_gray(wcnt) && w_addr == ADDR_W'(wcnt),
            $sformatf("write ptr %h want count %0d", w_gray, wcnt));
      check(w_full == exp_full, $sformatf("full=%b want %b", w_full, exp_full));
      check(r_gray == to_gray(rcnt) && r_addr == ADDR_W'(rcnt),
            $sformatf("read ptr %h want count %0d", r_gray, rcnt));
      check(r_empty == exp_empty, $sformatf("empty=%b want %b", r_empty, exp_empty));
      full_seen  += int'(exp_full);
      empty_seen += int'(exp_empty && i > 10);
    end
    check(full_seen > 0, "full reached");
    check(empty_seen > 0, "empty reached");
    $display("full seen %0d cycles, empty seen %0d cycles", full_seen, empty_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
