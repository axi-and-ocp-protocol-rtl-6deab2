// tb_axi_slave: self-checking test of the bridge's AXI slave port.
// The two FIFOs are modelled by queues: the request FIFO reports full at
// random, the reply FIFO is filled by the test. Expected request addresses
// are computed independently from the AXI burst rules for FIXED, INCR and
// WRAP bursts. Checks: every pushed request (kind, address, data), dropped
// beats for empty or partial strobes, BID/BRESP (OKAY, SLVERR for partial
// strobes and for a misplaced WLAST), read replies on R with RID, RRESP,
// RLAST, and the one-beat-per-cycle write rate when the FIFO has room.
module tb_axi_slave;
  import bridge_pkg::*;
  localparam int unsigned ID_W = 4;

  logic ACLK = 1'b0, ARESETn;
  logic [ID_W-1:0] AWID, ARID, BID, RID;
  logic [ADDR_W-1:0] AWADDR, ARADDR;
  logic [3:0] AWLEN, ARLEN, AWCACHE, ARCACHE;
  logic [2:0] AWSIZE, ARSIZE;
  logic [1:0] AWBURST, ARBURST, AWLOCK, ARLOCK, BRESP, RRESP;
  logic AWVALID, AWREADY, WLAST, WVALID, WREADY, BVALID, BREADY;
  logic ARVALID, ARREADY, RLAST, RVALID, RREADY;
  logic [DATA_W-1:0] WDATA, RDATA;
  logic [STRB_W-1:0] WSTRB;
  logic req_push, req_full, rsp_pop, rsp_empty;
  req_t req_data;
  rsp_t rsp_data;

  req_t reqs [$];
  rsp_t rsps [$];
  bit   full_rand = 0;
  int   checks = 0, failures = 0;

  axi_slave #(.ID_W(ID_W)) dut (.*);

  always #5 ACLK = ~ACLK;

  // request FIFO model
  always @(posedge ACLK) if (req_push && !req_full) reqs.push_back(req_data);
  always @(negedge ACLK) req_full <= full_rand ? (($urandom % 3) == 0) : 1'b0;
  // reply FIFO model
  assign rsp_empty = (rsps.size() == 0);
  assign rsp_data  = rsps.size() ? rsps[0] : '0;
  always @(posedge ACLK) if (rsp_pop && rsps.size()) void'(rsps.pop_front());

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // reference beat address (AXI rules, written out directly)
  function automatic logic [31:0] beat_addr(input logic [31:0] a, input int sz,
                                            input int len, input int bt, input int n);
    int unsigned nbytes = 1 << sz;
    int unsigned total  = nbytes * (len + 1);
    logic [31:0] aligned = (a / nbytes) * nbytes;
    logic [31:0] lower;
    if (bt == 0) return a;
    if (n == 0) return a;
    if (bt == 2) begin
      lower = (a / total) * total;
      return lower + ((aligned - lower + n * nbytes) % total);
    end
    return aligned + n * nbytes;
  endfunction

  task automatic axi_write(input logic [3:0] id, input logic [31:0] a, input int len,
                           input int sz, input int bt, input logic [31:0] base_data,
                           input logic [3:0] strb_bad_beat_mask, input int last_at,
                           output logic [1:0] resp, output int cycles);
    int t0;
    @(negedge ACLK);
    AWID = id; AWADDR = a; AWLEN = 4'(len); AWSIZE = 3'(sz); AWBURST = 2'(bt);
    AWVALID = 1;
    do @(posedge ACLK); while (!AWREADY);
    #1 AWVALID = 0;
    t0 = $time;
    for (int n = 0; n <= last_at; n++) begin
      WDATA = base_data + n;
      // mask 4'hF selects the "no strobe on beat 1" case
      if (strb_bad_beat_mask == 4'hF) WSTRB = (n == 1) ? 4'h0 : 4'hF;
      else WSTRB = (n < 4 && strb_bad_beat_mask[n]) ? 4'b0011 : 4'hF;
      WLAST = (n == last_at);
      WVALID = 1;
      do @(posedge ACLK); while (!WREADY);
      #1;
    end
    WVALID = 0; WLAST = 0;
    cycles = ($time - t0 + 9) / 10;
    BREADY = 1;
    while (!BVALID) @(posedge ACLK);
    check(BID == id, $sformatf("BID %h want %h", BID, id));
    resp = BRESP;
    @(posedge ACLK) #1 BREADY = 0;
  endtask

  task automatic axi_read(input logic [3:0] id, input logic [31:0] a, input int len,
                          input int sz, input int bt);
    logic [31:0] expa;
    @(negedge ACLK);
    ARID = id; ARADDR = a; ARLEN = 4'(len); ARSIZE = 3'(sz); ARBURST = 2'(bt);
    ARVALID = 1;
    do @(posedge ACLK); while (!ARREADY);
    #1 ARVALID = 0;
    // wait for the requests, check them, then supply replies
    repeat (3 * (len + 1) + 10) @(posedge ACLK);
    check(reqs.size() == len + 1, $sformatf("read requests %0d want %0d", reqs.size(), len + 1));
    for (int n = 0; n <= len; n++) begin
      rsp_t r;
      expa = beat_addr(a, sz, len, bt, n);
      if (reqs.size()) begin
        check(reqs[0].is_read && reqs[0].addr == expa,
              $sformatf("read req %0d addr %h want %h", n, reqs[0].addr, expa));
        void'(reqs.pop_front());
      end
      r.data = 32'hD000_0000 + n;
      r.resp = (n == 1) ? AXI_SLVERR : AXI_OKAY;
      rsps.push_back(r);
    end
    for (int n = 0; n <= len; n++) begin
      @(negedge ACLK) RREADY = ($urandom % 2) == 0;
      if (!RREADY) @(negedge ACLK) RREADY = 1;
      do @(posedge ACLK); while (!RVALID);
      check(RDATA == 32'hD000_0000 + n && RID == id && RLAST == (n == len) &&
            RRESP == ((n == 1) ? 2'b10 : 2'b00),
            $sformatf("R beat %0d data %h id %h last %b resp %b", n, RDATA, RID, RLAST, RRESP));
      #1 RREADY = 0;
    end
  endtask

  task automatic expect_writes(input logic [31:0] a, input int len, input int sz,
                               input int bt, input logic [31:0] base_data, input logic [3:0] skip);
    logic [31:0] expa;
    int n_exp = 0;
    for (int n = 0; n <= len; n++) if (!(n < 4 && skip[n])) n_exp++;
    check(reqs.size() == n_exp, $sformatf("write requests %0d want %0d", reqs.size(), n_exp));
    for (int n = 0; n <= len; n++) begin
      if (n < 4 && skip[n]) continue;
      expa = beat_addr(a, sz, len, bt, n);
      if (reqs.size()) begin
        check(!reqs[0].is_read && reqs[0].addr == expa && reqs[0].data == base_data + n,
              $sformatf("write beat %0d addr %h data %h want %h %h", n, reqs[0].addr,
                        reqs[0].data, expa, base_data + n));
        void'(reqs.pop_front());
      end
    end
    reqs.delete();
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] resp;
  int cyc;
  initial begin
    ARESETn = 0;
    AWVALID = 0; WVALID = 0; WLAST = 0; BREADY = 0; ARVALID = 0; RREADY = 0;
    AWID = 0; AWADDR = 0; AWLEN = 0; AWSIZE = 0; AWBURST = 0; AWLOCK = 0; AWCACHE = 0;
    ARID = 0; ARADDR = 0; ARLEN = 0; ARSIZE = 0; ARBURST = 0; ARLOCK = 0; ARCACHE = 0;
    WDATA = 0; WSTRB = 0; req_full = 0;
    #22 ARESETn = 1;
    // INCR, 4 beats, FIFO always has room: one beat per cycle
    axi_write(4'h3, 32'h100, 3, 2, 1, 32'h1111_0000, 4'h0, 3, resp, cyc);
    check(resp == 2'b00, "INCR BRESP OKAY");
    check(cyc == 4, $sformatf("4 beats took %0d cycles", cyc));
    expect_writes(32'h100, 3, 2, 1, 32'h1111_0000, 4'h0);
    // WRAP, 4 beats from 0x108
    axi_write(4'h5, 32'h108, 3, 2, 2, 32'h2222_0000, 4'h0, 3, resp, cyc);
    check(resp == 2'b00, "WRAP BRESP OKAY");
    expect_writes(32'h108, 3, 2, 2, 32'h2222_0000, 4'h0);
    // FIXED, 3 beats, random FIFO full
    full_rand = 1;
    axi_write(4'h6, 32'h200, 2, 2, 0, 32'h3333_0000, 4'h0, 2, resp, cyc);
    check(resp == 2'b00, "FIXED BRESP OKAY");
    expect_writes(32'h200, 2, 2, 0, 32'h3333_0000, 4'h0);
    // INCR, 16 beats, random full, byte-size beats
    axi_write(4'h7, 32'h301, 15, 0, 1, 32'h4444_0000, 4'h0, 15, resp, cyc);
    check(resp == 2'b00, "16-beat BRESP OKAY");
    expect_writes(32'h301, 15, 0, 1, 32'h4444_0000, 4'h0);
    full_rand = 0;
    // partial strobe on beat 2: dropped, SLVERR
    axi_write(4'h8, 32'h400, 3, 2, 1, 32'h5555_0000, 4'b0100, 3, resp, cyc);
    check(resp == 2'b10, "partial strobe gives SLVERR");
    expect_writes(32'h400, 3, 2, 1, 32'h5555_0000, 4'b0100);
    // no strobe on beat 1: dropped, still OKAY
    axi_write(4'h9, 32'h500, 2, 2, 1, 32'h6666_0000, 4'hF, 2, resp, cyc);
    check(resp == 2'b00, "empty strobe stays OKAY");
    expect_writes(32'h500, 2, 2, 1, 32'h6666_0000, 4'b0010);
    // WLAST early (beat 2 of 4): SLVERR
    axi_write(4'hA, 32'h600, 3, 2, 1, 32'h7777_0000, 4'h0, 1, resp, cyc);
    check(resp == 2'b10, "early WLAST gives SLVERR");
    expect_writes(32'h600, 1, 2, 1, 32'h7777_0000, 4'h0);
    // reads
    axi_read(4'hB, 32'h700, 3, 2, 1);
    full_rand = 1;
    axi_read(4'hC, 32'h808, 3, 2, 2);
    full_rand = 0;
    // write has priority over a simultaneous read
    @(negedge ACLK);
    AWVALID = 1; ARVALID = 1; AWADDR = 32'h900; ARADDR = 32'hA00; AWLEN = 0; ARLEN = 0;
    AWBURST = 1; ARBURST = 1; AWSIZE = 2; ARSIZE = 2;
    @(posedge ACLK) #1;
    check(AWVALID && !ARREADY, "write address taken first");
    AWVALID = 0; ARVALID = 0;
    WDATA = 32'hBEEF; WSTRB = 4'hF; WLAST = 1; WVALID = 1;
    do @(posedge ACLK); while (!WREADY);
    #1 WVALID = 0; BREADY = 1;
    while (!BVALID) @(posedge ACLK);
    @(posedge ACLK) #1 BREADY = 0;
    expect_writes(32'h900, 0, 2, 1, 32'hBEEF, 4'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
