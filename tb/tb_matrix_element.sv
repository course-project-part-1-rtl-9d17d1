// tb_matrix_element: self-checking test of one priority-matrix element.
//
// Part 1 drives a single element with random reset and grant inputs (never
// both grants at once) and checks it against the element's rules: reset or a
// row grant clears p_ij, a column grant sets it, otherwise it holds, and
// p_ji is always the complement. Part 2 builds the six elements of a 4:1
// arbiter side by side, loads them with the example matrix
//   p12=0 p13=0 p14=1 p23=1 p24=0 p34=0
// and grants requester 2; the expected result is
//   p12=1 p13=0 p14=1 p23=0 p24=0 p34=0
// (column 2 set, row 2 cleared, the rest unchanged).
module tb_matrix_element;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- part 1: single element, random stimulus
  logic reset, gnt_i, gnt_j, p_ij, p_ji;
  matrix_element dut (.clk, .reset, .gnt_i, .gnt_j, .p_ij_o(p_ij), .p_ji_o(p_ji));

  // ---------------- part 2: six elements, worked example of a grant
  // pairs in order (1,2) (1,3) (1,4) (2,3) (2,4) (3,4), requesters numbered 1..4
  logic       rst6;
  logic [5:0] gi6, gj6, q6, qn6;
  for (genvar e = 0; e < 6; e++) begin : g_e
    matrix_element u (.clk, .reset(rst6), .gnt_i(gi6[e]), .gnt_j(gj6[e]),
                      .p_ij_o(q6[e]), .p_ji_o(qn6[e]));
  end
  localparam int ROW [6] = '{1, 1, 1, 2, 2, 3};
  localparam int COL [6] = '{2, 3, 4, 3, 4, 4};

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic expected;
  logic [5:0] load_val, exp_val;
  initial begin
    reset = 1'b1; gnt_i = 1'b0; gnt_j = 1'b0;
    rst6 = 1'b1; gi6 = '0; gj6 = '0;
    @(posedge clk); #1;
    check(p_ij == 1'b0 && p_ji == 1'b1, "reset clears p_ij");
    expected = 1'b0;
    for (int t = 0; t < 500; t++) begin
      int r;
      r = $urandom_range(0, 9);
      reset = (r == 0);
      gnt_i = (r == 1 || r == 2);
      gnt_j = (r == 3 || r == 4 || r == 5);
      if (reset || gnt_i) expected = 1'b0;
      else if (gnt_j)     expected = 1'b1;
      @(posedge clk); #1;
      check(p_ij == expected, $sformatf("t=%0d p_ij=%0b expected %0b", t, p_ij, expected));
      check(p_ji == !p_ij, "p_ji is the complement of p_ij");
    end
    reset = 1'b0; gnt_i = 1'b0; gnt_j = 1'b0;

    // load the example: every element reset to 0, then the ones that must
    // be 1 get a column grant on their own
    load_val = 6'b001100;   // bit e = p of pair e: p14=1 (e=2), p23=1 (e=3)
    @(posedge clk); #1;
    rst6 = 1'b0;
    gj6  = load_val;
    @(posedge clk); #1;
    gj6  = '0;
    check(q6 == load_val, $sformatf("example loaded %b", q6));
    // grant requester 2: its row inputs and column inputs go high
    for (int e = 0; e < 6; e++) begin
      gi6[e] = (ROW[e] == 2);
      gj6[e] = (COL[e] == 2);
    end
    @(posedge clk); #1;
    gi6 = '0; gj6 = '0;
    exp_val = 6'b000101;    // p12=1 (e=0), p14=1 (e=2)
    check(q6 == exp_val, $sformatf("after the grant to 2: %b expected %b", q6, exp_val));
    check(qn6 == ~exp_val, "complements after the grant");
    @(posedge clk); #1;
    check(q6 == exp_val, "matrix holds without grants");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
