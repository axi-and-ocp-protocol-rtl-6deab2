// tb_fifo_pointer_walk: walks the asynchronous FIFO pointers through their
// first steps: four 32-bit words are written into the empty 32-entry FIFO,
// then read out. After each write the write pointer must step through the
// binary values 1, 2, 3, 4 and the Gray values 1, 3, 2, 6; the read pointer
// must do the same as the words are read, and the words must come out in
// order. Default FIFO parameters (32-bit words, 5 address bits).
module tb_fifo_pointer_walk;
  logic wclk = 1'b0, rclk = 1'b0;
  logic wrst_n, rrst_n, winc, rinc, wfull, rempty;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;

  localparam logic [5:0] BIN  [4] = '{6'h01, 6'h02, 6'h03, 6'h04};
  localparam logic [5:0] GRAY [4] = '{6'h01, 6'h03, 6'h02, 6'h06};
  logic [31:0] words [4];

  async_fifo dut (.*);

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    words = '{32'h0000_0100, 32'h0000_0011, 32'h0000_00F0, 32'h0000_0000};
    wrst_n = 0; rrst_n = 0; winc = 0; rinc = 0; wdata = 0;
    #30;
    check(dut.wptr == 0 && dut.rptr == 0 && rempty && !wfull, "reset");
    wrst_n = 1; rrst_n = 1;
    for (int i = 0; i < 4; i++) begin
      @(negedge wclk) begin winc = 1; wdata = words[i]; end
      @(posedge wclk) #1;
      check(dut.u_wptr_full.bin == BIN[i] && dut.wptr == GRAY[i],
            $sformatf("write %0d: pointer %h / %h", i, dut.u_wptr_full.bin, dut.wptr));
    end
    @(negedge wclk) winc = 0;
    repeat (4) @(posedge rclk);
    for (int i = 0; i < 4; i++) begin
      @(negedge rclk);
      check(!rempty && rdata == words[i], $sformatf("read %0d: %h", i, rdata));
      rinc = 1;
      @(posedge rclk) #1;
      check(dut.u_rptr_empty.bin == BIN[i] && dut.rptr == GRAY[i],
            $sformatf("read %0d: pointer %h / %h", i, dut.u_rptr_empty.bin, dut.rptr));
    end
    @(negedge rclk) rinc = 0;
    check(rempty, "empty after four reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
