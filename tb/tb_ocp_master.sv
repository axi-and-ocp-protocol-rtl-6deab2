// tb_ocp_master: self-checking test of the bridge's OCP master port.
// The request and reply FIFOs are queues; the OCP slave is ocp_slave_model.
//  1. With a slave that accepts everything at once, N back-to-back writes
//     must take 2N cycles (IDLE + REQ per transfer) and land in memory.
//  2. With a slave that stalls at random, a random mix of writes and reads
//     runs; memory contents and every reply (data and AXI response code) are
//     compared with a reference memory kept by the test. Reads from the
//     4'hF address region must come back as SLVERR.
//  3. A read is not started while the reply FIFO reports full.
module tb_ocp_master;
  import bridge_pkg::*;

  logic Clk = 1'b0, rst_n;
  logic req_pop, req_empty, rsp_push, rsp_full;
  req_t req_data;
  rsp_t rsp_data;
  logic MReset_n;
  ocp_cmd_e MCmd;
  logic [31:0] MAddr, MData, SData;
  logic SCmdAccept, SDataAccept;
  logic [1:0] SResp;
  int   accept_pct = 100;
  logic hold = 0;

  req_t reqs [$];
  rsp_t got [$];
  rsp_t exp_rsp [$];
  logic [31:0] ref_mem [logic [31:0]];
  int checks = 0, failures = 0;

  ocp_master dut (
    .Clk, .rst_n, .req_pop, .req_data, .req_empty, .rsp_push, .rsp_data, .rsp_full,
    .MReset_n, .MCmd, .MAddr, .MData, .SCmdAccept, .SDataAccept,
    .SResp (ocp_resp_e'(SResp)), .SData);

  ocp_slave_model u_slave (
    .Clk, .MCmd (MCmd), .MAddr, .MData, .SCmdAccept, .SDataAccept, .SResp, .SData,
    .accept_pct, .hold);

  always #5 Clk = ~Clk;

  assign req_empty = (reqs.size() == 0);
  assign req_data  = reqs.size() ? reqs[0] : '0;
  always @(posedge Clk) begin
    if (req_pop && reqs.size()) void'(reqs.pop_front());
    if (rsp_push) got.push_back(rsp_data);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [31:0] ref_rd(input logic [31:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : ~a;
  endfunction

  task automatic add_write(input logic [31:0] a, input logic [31:0] d);
    req_t r;
    r.is_read = 0; r.addr = a; r.data = d;
    reqs.push_back(r);
    ref_mem[a] = d;
  endtask

  task automatic add_read(input logic [31:0] a);
    req_t r;
    rsp_t e;
    r.is_read = 1; r.addr = a; r.data = '0;
    reqs.push_back(r);
    e.data = ref_rd(a);
    e.resp = (a[31:28] == 4'hF) ? AXI_SLVERR : AXI_OKAY;
    exp_rsp.push_back(e);
  endtask

  initial begin
    repeat (20000) @(posedge Clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, t1;
  logic [31:0] a;
  initial begin
    rst_n = 0; rsp_full = 0;
    #22;
    check(MCmd == OCP_IDLE && !MReset_n, "reset: idle command, slave reset");
    @(negedge Clk) rst_n = 1;
    // 1: rate with an always-ready slave
    accept_pct = 100;
    u_slave.n_writes = 0; u_slave.n_cmd_stall = 0; u_slave.n_data_stall = 0;
    @(negedge Clk);
    for (int i = 0; i < 16; i++) add_write(32'h4800_0000 + 4 * i, $urandom);
    t0 = $time;
    while (u_slave.n_writes < 16) @(posedge Clk);
    t1 = $time;
    repeat (3) @(posedge Clk);
    // writes with SDataAccept delayed add cycles; count only command cycles
    check(u_slave.n_cmd_stall == 0, "no command stall at 100 percent");
    check((t1 - t0) / 10 == 32 + u_slave.n_data_stall,
          $sformatf("16 writes took %0d cycles, want %0d", (t1 - t0) / 10, 32 + u_slave.n_data_stall));
    // 2: random mix with a stalling slave
    accept_pct = 40;
    for (int i = 0; i < 300; i++) begin
      a = {(($urandom % 8) == 0) ? 4'hF : 4'h4, 20'h0, 6'($urandom), 2'b00};
      if ($urandom % 2) add_write(a, $urandom);
      else add_read(a);
    end
    while (reqs.size() != 0) @(posedge Clk);
    repeat (20) @(posedge Clk);
    check(got.size() == exp_rsp.size(), $sformatf("%0d replies, want %0d", got.size(), exp_rsp.size()));
    while (got.size() && exp_rsp.size()) begin
      check(got[0] == exp_rsp[0], $sformatf("reply %h/%0d want %h/%0d", got[0].data,
            got[0].resp, exp_rsp[0].data, exp_rsp[0].resp));
      void'(got.pop_front()); void'(exp_rsp.pop_front());
    end
    foreach (ref_mem[k]) check(u_slave.mem.exists(k) && u_slave.mem[k] == ref_mem[k],
                               $sformatf("memory at %h", k));
    check(u_slave.n_cmd_stall > 0 && u_slave.n_data_stall > 0 && u_slave.n_resp_same > 0 &&
          u_slave.n_resp_late > 0 && u_slave.n_err > 0, "all slave behaviours seen");
    // 3: no read while reply FIFO full
    @(negedge Clk) rsp_full = 1;
    add_read(32'h4000_0010);
    repeat (10) @(posedge Clk);
    check(reqs.size() == 1 && MCmd == OCP_IDLE, "read held while reply FIFO full");
    @(negedge Clk) rsp_full = 0;
    while (got.size() == 0) @(posedge Clk);
    check(got[0] == exp_rsp[0], "held read completes");
    $display("slave: cmd stalls %0d, data stalls %0d, same-cycle resp %0d, late resp %0d, err %0d",
             u_slave.n_cmd_stall, u_slave.n_data_stall, u_slave.n_resp_same, u_slave.n_resp_late, u_slave.n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
