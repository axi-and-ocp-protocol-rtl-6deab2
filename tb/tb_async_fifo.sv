// tb_async_fifo: self-checking test of the asynchronous FIFO.
// Writer and reader run on unrelated clocks (10 ns and 13 ns). The test
//  1. checks the reset flags;
//  2. writes one word into the empty FIFO and checks it reaches the reader
//     within three read-clock edges, with the right data;
//  3. fills the FIFO with the reader stopped: exactly DEPTH words must be
//     taken before wfull, and further writes must be refused;
//  4. drains it, checking order and that rempty rises after the last word;
//  5. runs random traffic on both sides against a reference queue.
module tb_async_fifo;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned ADDR_W = 5;
  localparam int unsigned DEPTH  = 1 << ADDR_W;

  logic wclk = 1'b0, rclk = 1'b0;
  logic wrst_n, rrst_n;
  logic winc, rinc;
  logic [DATA_W-1:0] wdata, rdata;
  logic wfull, rempty;

  logic [DATA_W-1:0] model [$];
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0;
  bit rand_w = 0, rand_r = 0;

  async_fifo #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) dut (.*);

  always #5   wclk = ~wclk;
  always #6.5 rclk = ~rclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random-traffic writer
  always @(negedge wclk) begin
    if (rand_w) begin
      winc  <= ($urandom % 3) != 0;
      wdata <= $urandom;
    end
  end
  always @(posedge wclk) begin
    if (rand_w && winc && !wfull) begin
      model.push_back(wdata);
      n_wr++;
    end
  end
  // random-traffic reader
  always @(negedge rclk) if (rand_r) rinc <= ($urandom % 3) != 0;
  always @(posedge rclk) begin
    if (rand_r && rinc && !rempty) begin
      checks++;
      if (model.size() == 0 || rdata != model[0]) begin
        failures++;
        $display("FAIL: random read got %h", rdata);
      end
      if (model.size() != 0) void'(model.pop_front());
      n_rd++;
    end
  end

  int k;
  initial begin
    winc = 0; rinc = 0; wdata = '0;
    wrst_n = 0; rrst_n = 0;
    #30;
    check(rempty && !wfull, "reset flags");
    @(negedge wclk) wrst_n = 1; rrst_n = 1;
    // 2: single word latency
    @(negedge wclk) begin winc = 1; wdata = 32'h1234_5678; end
    @(negedge wclk) winc = 0;
    k = 0;
    while (rempty && k < 10) begin @(posedge rclk); #1; k++; end
    check(!rempty && k <= 3, $sformatf("word visible after %0d read edges", k));
    check(rdata == 32'h1234_5678, "single word data");
    @(negedge rclk) rinc = 1;
    @(negedge rclk) rinc = 0;
    check(rempty, "empty after single read");
    // 3: fill with reader stopped
    k = 0;
    for (int i = 0; i < DEPTH + 8; i++) begin
      @(negedge wclk);
      winc = 1; wdata = 32'hA000_0000 + i;
      @(posedge wclk);
      if (!wfull) begin model.push_back(wdata); k++; end
    end
    @(negedge wclk) winc = 0;
    check(k == DEPTH, $sformatf("took %0d words before full, want %0d", k, DEPTH));
    check(wfull, "full after DEPTH writes");
    // 4: drain
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge rclk);
      check(!rempty && rdata == model[0], $sformatf("drain %0d got %h want %h", i, rdata, model[0]));
      void'(model.pop_front());
      rinc = 1;
      @(negedge rclk) rinc = 0;
    end
    #1 check(rempty, "empty after drain");
    repeat (4) @(posedge wclk);
    #1 check(!wfull, "not full after drain");
    // 5: random traffic
    rand_w = 1; rand_r = 1;
    repeat (3000) @(posedge wclk);
    #1 rand_w = 0;
    @(negedge wclk) winc = 0;
    repeat (200) @(posedge rclk);
    #1 rand_r = 0;
    check(model.size() == 0, $sformatf("%0d words left over", model.size()));
    check(n_rd > 1000, $sformatf("random reads %0d", n_rd));
    $display("random traffic: %0d written, %0d read", n_wr, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
