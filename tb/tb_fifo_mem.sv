// tb_fifo_mem: self-checking test of the FIFO's dual-port memory.
// Fills every address with a random word, reads all back through the
// combinational read port, then checks that writes with wen low change
// nothing and that a single overwrite lands at its address only.
module tb_fifo_mem;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned ADDR_W = 5;
  localparam int unsigned DEPTH  = 1 << ADDR_W;

  logic              wclk = 1'b0;
  logic              wen;
  logic [ADDR_W-1:0] waddr, raddr;
  logic [DATA_W-1:0] wdata, rdata;
  logic [DATA_W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  fifo_mem #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) dut (.*);

  always #5 wclk = ~wclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (1000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wen = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge wclk);
      wen = 1'b1; waddr = ADDR_W'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    @(negedge wclk) wen = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = ADDR_W'(i);
      #1 check(rdata == ref_mem[i], $sformatf("read addr %0d got %h want %h", i, rdata, ref_mem[i]));
    end
    // writes with wen low must not change the memory
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge wclk);
      wen = 1'b0; waddr = ADDR_W'(i); wdata = ~ref_mem[i];
    end
    @(negedge wclk);
    for (int i = 0; i < DEPTH; i++) begin
      raddr = ADDR_W'(i);
      #1 check(rdata == ref_mem[i], $sformatf("wen=0 changed addr %0d", i));
    end
    // one overwrite
    @(negedge wclk);
    wen = 1'b1; waddr = 5'd17; wdata = 32'h5555_1111; ref_mem[17] = wdata;
    @(negedge wclk) wen = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = ADDR_W'(i);
      #1 check(rdata == ref_mem[i], $sformatf("after overwrite addr %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
