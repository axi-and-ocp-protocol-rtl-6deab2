// tb_ptr_sync: self-checking test of the two-stage pointer synchronizer.
// Checks that reset clears the output and that, with a new random input at
// every clock edge, the output equals the input of two edges earlier.
module tb_ptr_sync;
  localparam int unsigned W = 6;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] d, q;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  ptr_sync #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = W'($urandom);
    rst_n = 1'b0;
    #12;
    check(q == '0, "reset clears output");
    @(negedge clk) rst_n = 1'b1;
    // sample d at each edge; q after the edge must be the d of two edges ago
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d = W'($urandom);
      @(posedge clk);
      hist.push_back(d);
      #1;
      if (hist.size() > 2) void'(hist.pop_front());
      if (i >= 1) check(q == hist[0], $sformatf("cycle %0d q=%h want %h", i, q, hist[0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
