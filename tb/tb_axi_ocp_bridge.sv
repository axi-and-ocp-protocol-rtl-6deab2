// tb_axi_ocp_bridge: end-to-end test of the AXI-to-OCP bridge at its default
// parameters (4-bit IDs, 32-entry FIFOs).
//
// The test drives the AXI side as an AXI master (ACLK, 10 ns) and puts the
// behavioural OCP slave (ocp_slave_model) on the OCP side (Clk, 13 ns, not
// related to ACLK). A reference memory, updated from the AXI writes by the AXI
// burst address rules, predicts every read beat. Phases:
//   1. random write and read bursts (FIXED, INCR, WRAP; 1 to 16 beats) with a
//      slave that stalls at random, every read beat checked;
//   2. the slave refuses all commands while three 16-beat write bursts are
//      sent: the request FIFO must fill (WREADY low) and drain afterwards;
//   3. reads from the slave's error region must return SLVERR on every beat;
//   4. a write with a partial byte strobe must return SLVERR;
//   5. the slave's memory must equal the reference memory;
//   6. more random bursts with the OCP clock at 5 ns, faster than ACLK,
//      and the memory compared again.
// Every mechanism (FIFO full, command stall, write-data stall, same-cycle and
// late read response, OCP error, each burst type, partial strobe) is counted
// and must occur at least once.
module tb_axi_ocp_bridge;
  localparam int unsigned ID_W = 4;

  logic ACLK = 1'b0, ARESETn, Clk = 1'b0, Reset_n;
  logic [ID_W-1:0] AWID, ARID, BID, RID;
  logic [31:0] AWADDR, ARADDR, WDATA, RDATA, MAddr, MData, SData;
  logic [3:0] AWLEN, ARLEN, AWCACHE, ARCACHE, WSTRB;
  logic [2:0] AWSIZE, ARSIZE, MCmd;
  logic [1:0] AWBURST, ARBURST, AWLOCK, ARLOCK, BRESP, RRESP, SResp;
  logic AWVALID, AWREADY, WLAST, WVALID, WREADY, BVALID, BREADY;
  logic ARVALID, ARREADY, RLAST, RVALID, RREADY;
  logic MReset_n, SCmdAccept, SDataAccept;
  int   accept_pct = 50;
  logic hold = 0;

  logic [31:0] ref_mem [logic [31:0]];
  int checks = 0, failures = 0;
  int n_full = 0, n_burst [3] = '{0, 0, 0}, n_strb_err = 0, n_rd_err = 0;
  int n_wbeats = 0, n_rbeats = 0;

  axi_ocp_bridge dut (.*);

  ocp_slave_model u_slave (
    .Clk, .MCmd, .MAddr, .MData, .SCmdAccept, .SDataAccept, .SResp, .SData,
    .accept_pct, .hold);

  always #5   ACLK = ~ACLK;
  realtime ocp_half = 6.5ns;
  always #(ocp_half) Clk = ~Clk;

  // the request FIFO reports full while a write burst is waiting
  always @(posedge ACLK) if (ARESETn && WVALID && !WREADY) n_full++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // AXI beat address, written out from the AXI burst rules
  function automatic logic [31:0] beat_addr(input logic [31:0] a, input int sz,
                                            input int len, input int bt, input int n);
    int unsigned nbytes = 1 << sz;
    int unsigned total  = nbytes * (len + 1);
    logic [31:0] aligned = (a / nbytes) * nbytes;
    logic [31:0] lower;
    if (bt == 0 || n == 0) return a;
    if (bt == 2) begin
      lower = (a / total) * total;
      return lower + ((aligned - lower + n * nbytes) % total);
    end
    return aligned + n * nbytes;
  endfunction

  function automatic logic [31:0] ref_rd(input logic [31:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : ~a;
  endfunction

  task automatic axi_write(input logic [3:0] id, input logic [31:0] a, input int len,
                           input int bt, input int bad_beat, output logic [1:0] resp);
    logic [31:0] d;
    @(negedge ACLK);
    AWID = id; AWADDR = a; AWLEN = 4'(len); AWSIZE = 3'd2; AWBURST = 2'(bt); AWVALID = 1;
    do @(posedge ACLK); while (!AWREADY);
    #1 AWVALID = 0;
    for (int n = 0; n <= len; n++) begin
      d = $urandom;
      WDATA = d; WLAST = (n == len); WVALID = 1;
      WSTRB = (n == bad_beat) ? 4'b1100 : 4'hF;
      if (n != bad_beat) ref_mem[beat_addr(a, 2, len, bt, n)] = d;
      do @(posedge ACLK); while (!WREADY);
      #1;
      n_wbeats++;
    end
    WVALID = 0; WLAST = 0; BREADY = 1;
    while (!BVALID) @(posedge ACLK);
    check(BID == id, $sformatf("BID %h want %h", BID, id));
    resp = BRESP;
    @(posedge ACLK) #1 BREADY = 0;
  endtask

  task automatic axi_read(input logic [3:0] id, input logic [31:0] a, input int len,
                          input int bt);
    logic [31:0] expd [16];
    logic [1:0]  expr;
    for (int n = 0; n <= len; n++) expd[n] = ref_rd(beat_addr(a, 2, len, bt, n));
    expr = (a[31:28] == 4'hF) ? 2'b10 : 2'b00;
    @(negedge ACLK);
    ARID = id; ARADDR = a; ARLEN = 4'(len); ARSIZE = 3'd2; ARBURST = 2'(bt); ARVALID = 1;
    do @(posedge ACLK); while (!ARREADY);
    #1 ARVALID = 0;
    for (int n = 0; n <= len; n++) begin
      do begin
        @(negedge ACLK) RREADY = ($urandom % 4) != 0;
        @(posedge ACLK);
      end while (!(RVALID && RREADY));
      check(RID == id && RLAST == (n == len) && RRESP == expr &&
            (expr != 2'b00 || RDATA == expd[n]),
            $sformatf("read %h beat %0d: data %h id %h last %b resp %b, want %h", a, n,
                      RDATA, RID, RLAST, RRESP, expd[n]));
      if (RRESP == 2'b10) n_rd_err++;
      n_rbeats++;
      #1 RREADY = 0;
    end
  endtask

  task automatic random_bursts(input int count);
    logic [1:0] resp;
    int len, bt;
    logic [31:0] a;
    for (int i = 0; i < count; i++) begin
      bt  = $urandom % 3;
      len = (bt == 2) ? (1 << ($urandom % 4)) - 1 : $urandom % 16;
      a   = 32'h4800_0000 + 32'((($urandom % 64) * 4));
      if (bt == 2) a = a & ~32'((len + 1) * 4 - 1) | 32'((($urandom % (len + 1)) * 4));
      if ($urandom % 2) begin
        axi_write(4'($urandom), a, len, bt, -1, resp);
        check(resp == 2'b00, "write OKAY");
      end else begin
        axi_read(4'($urandom), a, len, bt);
      end
      n_burst[bt]++;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] resp;
  int len, bt;
  logic [31:0] a;
  initial begin
    ARESETn = 0; Reset_n = 0;
    AWVALID = 0; WVALID = 0; WLAST = 0; BREADY = 0; ARVALID = 0; RREADY = 0;
    AWID = 0; AWADDR = 0; AWLEN = 0; AWSIZE = 0; AWBURST = 0; AWLOCK = 0; AWCACHE = 0;
    ARID = 0; ARADDR = 0; ARLEN = 0; ARSIZE = 0; ARBURST = 0; ARLOCK = 0; ARCACHE = 0;
    WDATA = 0; WSTRB = 0;
    #40;
    check(!MReset_n && MCmd == 3'd0 && !BVALID && !RVALID, "reset state");
    ARESETn = 1; Reset_n = 1;
    #20;
    check(MReset_n, "OCP slave reset released");
    // 1: random traffic
    random_bursts(80);
    // 2: the slave refuses commands while 48 beats are written
    hold = 1;
    fork
      begin
        for (int k = 0; k < 3; k++) begin
          axi_write(4'(k), 32'h4800_1000 + 32'(k * 64), 15, 1, -1, resp);
          check(resp == 2'b00, "write OKAY under back-pressure");
        end
      end
      begin
        repeat (200) @(posedge ACLK);
        check(WVALID && !WREADY, "request FIFO full stops the write burst");
        hold = 0;
      end
    join
    axi_read(4'h1, 32'h4800_1000, 15, 1);
    axi_read(4'h2, 32'h4800_1080, 15, 1);
    // 3: error region
    axi_read(4'h3, 32'hF000_0000, 3, 1);
    // 4: partial strobe on beat 1
    axi_write(4'h4, 32'h4800_2000, 3, 1, 1, resp);
    check(resp == 2'b10, "partial strobe SLVERR");
    n_strb_err += int'(resp == 2'b10);
    axi_read(4'h5, 32'h4800_2000, 3, 1);
    // 5: memory compare
    repeat (50) @(posedge ACLK);
    foreach (ref_mem[k])
      check(u_slave.mem.exists(k) && u_slave.mem[k] == ref_mem[k], $sformatf("memory at %h", k));
    // 6: OCP clock faster than the AXI clock (5 ns against 10 ns)
    ocp_half = 2.5ns;
    random_bursts(40);
    repeat (50) @(posedge ACLK);
    foreach (ref_mem[k])
      check(u_slave.mem.exists(k) && u_slave.mem[k] == ref_mem[k], $sformatf("memory at %h (fast OCP clock)", k));
    // mechanisms seen
    check(n_full > 0, "request FIFO full");
    check(u_slave.n_cmd_stall > 0, "SCmdAccept stall");
    check(u_slave.n_data_stall > 0, "SDataAccept stall");
    check(u_slave.n_resp_same > 0, "same-cycle read response");
    check(u_slave.n_resp_late > 0, "late read response");
    check(n_rd_err > 0 && u_slave.n_err > 0, "OCP error to SLVERR");
    check(n_burst[0] > 0 && n_burst[1] > 0 && n_burst[2] > 0, "all burst types");
    check(n_strb_err > 0, "partial strobe");
    $display("seen: fifo-full cycles %0d, cmd stalls %0d, data stalls %0d, resp same %0d, late %0d, err %0d",
             n_full, u_slave.n_cmd_stall, u_slave.n_data_stall, u_slave.n_resp_same,
             u_slave.n_resp_late, n_rd_err);
    $display("seen: bursts fixed %0d incr %0d wrap %0d, write beats %0d, read beats %0d",
             n_burst[0], n_burst[1], n_burst[2], n_wbeats, n_rbeats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
