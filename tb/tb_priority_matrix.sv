// tb_priority_matrix: self-checking test of the 4-requester priority matrix.
//
// The reference keeps the requesters as a list from highest to lowest
// priority (after reset: 3, 2, 1, 0). A grant to k moves k to the end of
// the list. Random one-hot (or empty) grant vectors are applied, and after
// each clock edge every stored bit p_ij (i < j) must equal "i is ahead of
// j in the list". Reset in mid-run must restore the reset order.
module tb_priority_matrix;
  import noc_pkg::*;
  localparam int unsigned N = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset;
  logic [N-1:0] gnt;
  logic [num_pairs(N)-1:0] prio;

  priority_matrix #(.N(N)) dut (.clk, .reset, .gnt, .prio);

  int checks = 0, failures = 0;
  int order[$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pos(int r);
    foreach (order[x]) if (order[x] == r) return x;
    return -1;
  endfunction

  task automatic reset_model();
    order = {};
    for (int r = N - 1; r >= 0; r--) order.push_back(r);
  endtask

  task automatic compare(input string when);
    int e = 0;
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++) begin
        checks++;
        if (prio[e] !== (pos(i) < pos(j))) begin
          failures++;
          $display("FAIL %s: p_%0d%0d=%b, model order %p", when, i, j, prio[e], order);
        end
        e++;
      end
  endtask

  initial begin
    reset = 1'b1; gnt = '0;
    @(posedge clk); #1;
    reset = 1'b0;
    reset_model();
    compare("after reset");
    for (int t = 0; t < 1000; t++) begin
      int k;
      k = $urandom_range(0, N);          // N means no grant
      gnt = (k < N) ? N'(1 << k) : '0;
      reset = ($urandom_range(0, 99) == 0);
      @(posedge clk); #1;
      if (reset) reset_model();
      else if (k < N) begin
        order.delete(pos(k));
        order.push_back(k);
      end
      compare($sformatf("cycle %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
