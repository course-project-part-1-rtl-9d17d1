// tb_grant_circuit: exhaustive self-checking test of the 4:1 grant circuit.
//
// Every request vector (16) is combined with every priority vector (64,
// including the non-transitive ones a real arbiter never reaches). The
// reference expands the packed upper triangle into a full "beats" matrix
// and grants requester k when k requests and no other requester that beats
// k is also requesting.
module tb_grant_circuit;
  import noc_pkg::*;
  localparam int unsigned N = 4;

  logic [N-1:0] req, gnt;
  logic [num_pairs(N)-1:0] prio;

  grant_circuit #(.N(N)) dut (.req, .prio, .gnt);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit beats [N][N];
    logic [N-1:0] exp_gnt;
    int e;
    for (int pv = 0; pv < (1 << num_pairs(N)); pv++) begin
      // pairs in row order (0,1) (0,2) (0,3) (1,2) (1,3) (2,3)
      e = 0;
      for (int i = 0; i < N; i++) begin
        beats[i][i] = 1'b0;
        for (int j = i + 1; j < N; j++) begin
          beats[i][j] = pv[e];
          beats[j][i] = !pv[e];
          e++;
        end
      end
      for (int rv = 0; rv < (1 << N); rv++) begin
        for (int k = 0; k < N; k++) begin
          exp_gnt[k] = rv[k];
          for (int i = 0; i < N; i++)
            if (i != k && rv[i] && beats[i][k]) exp_gnt[k] = 1'b0;
        end
        req  = N'(rv);
        prio = num_pairs(N)'(pv);
        #1;
        checks++;
        if (gnt !== exp_gnt) begin
          failures++;
          $display("FAIL: req=%b prio=%b gnt=%b expected %b", req, prio, gnt, exp_gnt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
