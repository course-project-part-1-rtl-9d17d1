// tb_input_port: end-to-end self-checking test of the router input port at
// its default size (4 virtual channels, 32-bit flits, 4-flit buffers).
//
// Each channel's source writes flits tagged with the channel number and a
// sequence number whenever in_ready allows. The reference model keeps one
// queue per channel and the arbiter's priority list (3, 2, 1, 0 after reset;
// the first channel in the list with a buffered flit wins and moves to the
// end). Every cycle the output flit, VCID and valid are compared with the
// model, and every flit must leave in order and exactly once.
//
// Directed phases check the latency (a flit written into an idle port
// leaves one cycle later), the round-robin order of four busy channels, and
// a stall. The random phase varies the arrival rate and out_ready. The
// mechanisms the port has are counted, and each must have happened at least
// once: simultaneous arrivals, arbitration among several channels, a stall
// by the router side, a full buffer holding back its source, and an idle
// cycle with empty buffers.
module tb_input_port;
  import noc_pkg::*;
  localparam int unsigned N = NUM_VC;
  localparam int unsigned W = FLIT_W;
  localparam int unsigned VW = (N > 1) ? $clog2(N) : 1;
  localparam int ROT [4] = '{3, 2, 0, 1};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                reset;
  logic [N-1:0]        in_valid, in_ready;
  logic [N-1:0][W-1:0] in_flit;
  logic                out_valid, out_ready;
  logic [W-1:0]        out_flit;
  logic [VW-1:0]       out_vcid;
  logic [N-1:0]        arb_gnt;

  input_port dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] q[N][$];
  int order[$];
  int seq[N];
  int sent = 0, received = 0;
  int n_simul = 0, n_contend = 0, n_stall = 0, n_full = 0, n_idle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] make_flit(int vc, int s);
    return W'((vc << 24) | (s & 32'h00FF_FFFF));
  endfunction

  // Drive in_valid/in_flit for the channels in 'want' (only where in_ready),
  // then check the output against the model and advance one clock.
  task automatic step(input logic [N-1:0] want, input logic rdy);
    logic [N-1:0] wr;
    int winner, busy;
    #1;
    out_ready = rdy;
    wr = want & in_ready;
    for (int k = 0; k < N; k++) begin
      in_valid[k] = wr[k];
      in_flit[k]  = make_flit(k, seq[k]);
    end
    if ($countones(wr) > 1) n_simul++;
    if ((want & ~in_ready) != '0) n_full++;
    busy = 0;
    for (int k = 0; k < N; k++) if (q[k].size() > 0) busy++;
    if (busy == 0) n_idle++;
    if (busy > 0 && !rdy) n_stall++;
    if (busy > 1 && rdy) n_contend++;
    winner = -1;
    if (rdy)
      foreach (order[x]) if (q[order[x]].size() > 0) begin winner = order[x]; break; end
    #1;
    check(out_valid == (winner >= 0), $sformatf("out_valid=%b expected %0d", out_valid, winner >= 0));
    if (winner >= 0 && out_valid) begin
      check(out_vcid == VW'(winner), $sformatf("vcid=%0d expected %0d", out_vcid, winner));
      check(out_flit == q[winner][0], $sformatf("flit=%h expected %h", out_flit, q[winner][0]));
      check(arb_gnt == N'(1 << winner), "grant lines match the winner");
    end
    @(posedge clk);
    if (winner >= 0) begin
      void'(q[winner].pop_front());
      received++;
      foreach (order[x]) if (order[x] == winner) begin order.delete(x); break; end
      order.push_back(winner);
    end
    for (int k = 0; k < N; k++) if (wr[k]) begin
      q[k].push_back(make_flit(k, seq[k]));
      seq[k]++;
      sent++;
    end
  endtask

  initial begin
    reset = 1'b1; in_valid = '0; in_flit = '0; out_ready = 1'b0;
    for (int k = 0; k < N; k++) seq[k] = 0;
    @(posedge clk); #1;
    reset = 1'b0;
    for (int r = N - 1; r >= 0; r--) order.push_back(r);

    // latency: one flit into channel 1 of an idle port leaves next cycle
    step(N'(1 << 1), 1'b1);
    #1;
    check(out_valid && out_vcid == 1, "flit leaves one cycle after it is written");
    step('0, 1'b1);

    // four busy channels: channel 1 was served last, so the grants go
    // 3, 2, 0, 1 (from the order 3, 2, 1, 0 after reset, 1 moved to the end)
    step('1, 1'b0);           // stall: all four buffered, nothing leaves
    for (int t = 0; t < 4; t++) begin
      #1;
      out_ready = 1'b1;
      #1;
      check(out_vcid == VW'(ROT[t]), $sformatf("rotation step %0d vcid=%0d", t, out_vcid));
      step('0, 1'b1);
    end

    // random traffic
    for (int t = 0; t < 4000; t++) begin
      logic [N-1:0] want;
      int load;
      load = (t / 500) % 4;   // phases of different arrival rates
      for (int k = 0; k < N; k++) want[k] = ($urandom_range(0, 3) < load);
      step(want, $urandom_range(0, 3) != 0);
    end
    // drain
    for (int t = 0; t < 8 * N * VC_DEPTH; t++) step('0, 1'b1);
    for (int k = 0; k < N; k++) check(q[k].size() == 0, $sformatf("channel %0d drained", k));
    check(sent == received, $sformatf("sent %0d received %0d", sent, received));

    $display("mechanisms: simultaneous=%0d contention=%0d stall=%0d full=%0d idle=%0d flits=%0d",
             n_simul, n_contend, n_stall, n_full, n_idle, received);
    check(n_simul > 0, "simultaneous arrivals happened");
    check(n_contend > 0, "arbitration among several channels happened");
    check(n_stall > 0, "a stall happened");
    check(n_full > 0, "a full buffer held back its source");
    check(n_idle > 0, "an idle cycle happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
