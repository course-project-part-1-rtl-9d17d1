// tb_vc_fifo: self-checking test of the virtual-channel FIFO (defaults:
// 32-bit flits, 4 deep).
//
// A queue in the testbench models the buffer. Random pushes and pops (also
// a push while full together with a pop, and pops of an empty buffer are
// avoided so the assertions stay quiet) are checked cycle by cycle against
// the head flit, full, empty and count. A directed part checks that a flit
// pushed into an empty buffer is visible one cycle later and that the
// buffer reports full after DEPTH pushes.
module tb_vc_fifo;
  import noc_pkg::*;
  localparam int unsigned W = FLIT_W;
  localparam int unsigned DEPTH = VC_DEPTH;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset, push, pop, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  vc_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic compare(input string when);
    check(empty == (q.size() == 0), $sformatf("%s: empty=%b size=%0d", when, empty, q.size()));
    check(full == (q.size() == DEPTH), $sformatf("%s: full=%b size=%0d", when, full, q.size()));
    check(count == q.size(), $sformatf("%s: count=%0d size=%0d", when, count, q.size()));
    if (q.size() > 0)
      check(rd_data == q[0], $sformatf("%s: head=%h expected %h", when, rd_data, q[0]));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; push = 1'b0; pop = 1'b0; wr_data = '0;
    @(posedge clk); #1;
    reset = 1'b0;
    compare("after reset");

    // directed: latency of one cycle, then fill up
    push = 1'b1; wr_data = W'(32'hA5A5_0001);
    @(posedge clk); #1;
    q.push_back(W'(32'hA5A5_0001));
    check(!empty && rd_data == W'(32'hA5A5_0001), "pushed flit visible one cycle later");
    for (int k = 1; k < DEPTH; k++) begin
      wr_data = W'(32'hA5A5_0001 + k);
      @(posedge clk); #1;
      q.push_back(W'(32'hA5A5_0001 + k));
    end
    push = 1'b0;
    check(full, "full after DEPTH pushes");
    compare("filled");
    // push and pop together while full
    push = 1'b1; pop = 1'b1; wr_data = W'(32'h5A5A_0000);
    @(posedge clk); #1;
    void'(q.pop_front());
    q.push_back(W'(32'h5A5A_0000));
    push = 1'b0; pop = 1'b0;
    compare("push+pop while full");

    // random traffic
    for (int t = 0; t < 3000; t++) begin
      logic do_push, do_pop;
      do_pop  = (q.size() > 0) && ($urandom_range(0, 1) == 1);
      do_push = ($urandom_range(0, 1) == 1) && (q.size() < DEPTH || do_pop);
      push = do_push; pop = do_pop; wr_data = W'($urandom);
      @(posedge clk); #1;
      if (do_pop) void'(q.pop_front());
      if (do_push) q.push_back(wr_data);
      compare($sformatf("cycle %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
