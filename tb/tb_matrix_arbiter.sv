// tb_matrix_arbiter: self-checking test of the 4:1 matrix arbiter.
//
// Reference: a list of the requesters from highest to lowest priority
// (3, 2, 1, 0 after reset); the first requesting entry of the list wins and
// moves to the end. Random request vectors are compared grant by grant.
// Directed parts check that with all four requesting the grants rotate
// 3, 2, 1, 0, 3, ..., one per cycle, and that a requester holding its
// request is served within N-1 grants to others (the arbiter's fairness
// bound). A second instance with five requesters (the size of a 5:1
// arbiter) runs random requests against the same kind of model, to check
// that the parameterised structure holds beyond n = 4.
module tb_matrix_arbiter;
  import noc_pkg::*;
  localparam int unsigned N = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset;
  logic [N-1:0] req, gnt;
  logic [num_pairs(N)-1:0] prio;

  matrix_arbiter #(.N(N)) dut (.clk, .reset, .req, .gnt, .prio);

  int checks = 0, failures = 0;
  int order[$];

  localparam int unsigned N5 = 5;
  logic reset5;
  logic [N5-1:0] req5, gnt5;
  logic [num_pairs(N5)-1:0] prio5;
  matrix_arbiter #(.N(N5)) dut5 (.clk, .reset(reset5), .req(req5), .gnt(gnt5), .prio(prio5));
  int order5[$];
  bit done5 = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] model_grant(input logic [N-1:0] r);
    foreach (order[x]) if (r[order[x]]) return N'(1 << order[x]);
    return '0;
  endfunction

  task automatic model_update(input logic [N-1:0] g);
    for (int x = 0; x < order.size(); x++)
      if (g[order[x]]) begin
        int k = order[x];
        order.delete(x);
        order.push_back(k);
        return;
      end
  endtask

  task automatic do_reset();
    reset = 1'b1; req = '0;
    @(posedge clk); #1;
    reset = 1'b0;
    order = {};
    for (int r = N - 1; r >= 0; r--) order.push_back(r);
  endtask

  // five-requester instance: list model, first requesting entry wins
  initial begin
    logic [N5-1:0] e5;
    reset5 = 1'b1; req5 = '0;
    @(posedge clk); #1;
    reset5 = 1'b0;
    for (int r = N5 - 1; r >= 0; r--) order5.push_back(r);
    for (int t = 0; t < 2000; t++) begin
      int w;
      req5 = N5'($urandom);
      #1;
      w = -1;
      foreach (order5[x]) if (req5[order5[x]]) begin w = order5[x]; break; end
      e5 = (w >= 0) ? N5'(1 << w) : '0;
      check(gnt5 == e5, $sformatf("N=5 cycle %0d req=%b gnt=%b expected %b", t, req5, gnt5, e5));
      @(posedge clk); #1;
      if (w >= 0) begin
        foreach (order5[x]) if (order5[x] == w) begin order5.delete(x); break; end
        order5.push_back(w);
      end
    end
    done5 = 1'b1;
  end

  initial begin
    logic [N-1:0] exp_g;
    int waited;
    do_reset();

    // rotation with all requesting
    req = '1;
    for (int t = 0; t < 8; t++) begin
      #1;
      check(gnt == N'(1 << (N - 1 - (t % N))),
            $sformatf("rotation step %0d: gnt=%b", t, gnt));
      @(posedge clk); #1;
    end

    // random requests against the model
    do_reset();
    for (int t = 0; t < 3000; t++) begin
      req = N'($urandom);
      #1;
      exp_g = model_grant(req);
      check(gnt == exp_g, $sformatf("cycle %0d req=%b gnt=%b expected %b", t, req, gnt, exp_g));
      @(posedge clk); #1;
      model_update(exp_g);
    end

    // fairness: requester 0 holds its request while the others request at
    // random; it must be granted within N-1 grants to others
    for (int round = 0; round < 50; round++) begin
      waited = 0;
      forever begin
        req = N'($urandom) | N'(1);
        #1;
        if (gnt[0]) break;
        if (gnt != '0) waited++;
        @(posedge clk); #1;
      end
      check(waited <= N - 1, $sformatf("requester 0 waited %0d grants", waited));
      @(posedge clk); #1;
    end

    wait (done5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
