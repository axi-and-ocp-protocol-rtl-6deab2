// tb_bridge_write_read: one short write-then-read through the whole bridge at
// its default parameters: the AXI master writes a four-beat INCR burst to
// 0x4800_0000, then reads one word that the OCP slave holds as 0x5555_1111.
// On the OCP side the test expects four Write commands (MCmd 1) with
// consecutive addresses and the written data, then one Read command
// (MCmd 2) answered with DVA (SResp 1); the AXI side must return the write
// response OKAY and the read data 0x5555_1111 with RLAST.
module tb_bridge_write_read;
  logic ACLK = 1'b0, ARESETn, Clk = 1'b0, Reset_n;
  logic [3:0] AWID, ARID, BID, RID;
  logic [31:0] AWADDR, ARADDR, WDATA, RDATA, MAddr, MData, SData;
  logic [3:0] AWLEN, ARLEN, AWCACHE, ARCACHE, WSTRB;
  logic [2:0] AWSIZE, ARSIZE, MCmd;
  logic [1:0] AWBURST, ARBURST, AWLOCK, ARLOCK, BRESP, RRESP, SResp;
  logic AWVALID, AWREADY, WLAST, WVALID, WREADY, BVALID, BREADY;
  logic ARVALID, ARREADY, RLAST, RVALID, RREADY;
  logic MReset_n, SCmdAccept, SDataAccept;
  int   accept_pct = 100;
  logic hold = 0;
  int checks = 0, failures = 0;

  logic [31:0] wd [4] = '{32'hE0B0_F6E6, 32'hD0C0_7B8D, 32'hEF7F_78F0, 32'h0000_0101};
  logic [2:0]  cmds  [$];
  logic [31:0] addrs [$];
  logic [31:0] datas [$];

  axi_ocp_bridge dut (.*);
  ocp_slave_model u_slave (.Clk, .MCmd, .MAddr, .MData, .SCmdAccept, .SDataAccept,
                           .SResp, .SData, .accept_pct, .hold);

  always #5 ACLK = ~ACLK;
  always #8 Clk  = ~Clk;

  // log every accepted OCP command
  always @(posedge Clk) if (MCmd != 3'd0 && SCmdAccept) begin
    cmds.push_back(MCmd); addrs.push_back(MAddr); datas.push_back(MData);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #50000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ARESETn = 0; Reset_n = 0;
    AWVALID = 0; WVALID = 0; WLAST = 0; BREADY = 0; ARVALID = 0; RREADY = 0;
    AWID = 4'h1; AWADDR = 0; AWLEN = 0; AWSIZE = 0; AWBURST = 0; AWLOCK = 0; AWCACHE = 0;
    ARID = 4'h2; ARADDR = 0; ARLEN = 0; ARSIZE = 0; ARBURST = 0; ARLOCK = 0; ARCACHE = 0;
    WDATA = 0; WSTRB = 4'hF;
    u_slave.mem[32'h4800_0010] = 32'h5555_1111;
    #40 ARESETn = 1; Reset_n = 1;
    @(negedge ACLK);
    AWADDR = 32'h4800_0000; AWLEN = 4'd3; AWSIZE = 3'd2; AWBURST = 2'd1; AWVALID = 1;
    do @(posedge ACLK); while (!AWREADY);
    #1 AWVALID = 0;
    for (int n = 0; n < 4; n++) begin
      WDATA = wd[n]; WLAST = (n == 3); WVALID = 1;
      do @(posedge ACLK); while (!WREADY);
      #1;
    end
    WVALID = 0; BREADY = 1;
    do @(posedge ACLK); while (!BVALID);
    check(BRESP == 2'b00 && BID == 4'h1, "write response OKAY");
    #1 BREADY = 0;
    @(negedge ACLK);
    ARADDR = 32'h4800_0010; ARLEN = 4'd0; ARSIZE = 3'd2; ARBURST = 2'd1; ARVALID = 1;
    do @(posedge ACLK); while (!ARREADY);
    #1 ARVALID = 0; RREADY = 1;
    do @(posedge ACLK); while (!RVALID);
    check(RDATA == 32'h5555_1111 && RRESP == 2'b00 && RLAST && RID == 4'h2,
          $sformatf("read data %h resp %b", RDATA, RRESP));
    #1 RREADY = 0;
    check(cmds.size() == 5, $sformatf("%0d OCP commands, want 5", cmds.size()));
    for (int n = 0; n < 4 && n < cmds.size(); n++)
      check(cmds[n] == 3'd1 && addrs[n] == 32'h4800_0000 + 4 * n && datas[n] == wd[n],
            $sformatf("OCP write %0d: cmd %0d addr %h data %h", n, cmds[n], addrs[n], datas[n]));
    if (cmds.size() == 5) check(cmds[4] == 3'd2 && addrs[4] == 32'h4800_0010, "OCP read command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
