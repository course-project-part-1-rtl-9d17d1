// grant_circuit: combinational grant logic of an n:1 matrix arbiter.
//
// Requester n is granted when it requests and no requester of higher
// priority requests at the same time:
//   gnt_n = req_n & AND_{i<n} !(req_i & p_in) & AND_{i>n} !(req_i & !p_ni)
// Only the upper triangle of the matrix is stored, so for a requester i
// below n the stored bit p_in says whether i beats n, and for a requester
// i above n the complement of the stored p_ni says so. Because the matrix
// always holds a total order, at most one grant is high, and one is high
// whenever any request is.
//
// Interface: req is one bit per requester, prio the packed upper triangle
// (bit noc_pkg::pair_idx(i,j,N) is p_ij), gnt the one-hot grant vector.
// Timing: purely combinational, no clock.
module grant_circuit
  import noc_pkg::*;
#(
  parameter int unsigned N = NUM_VC
) (
  input  logic [N-1:0]            req,
  input  logic [num_pairs(N)-1:0] prio,
  output logic [N-1:0]            gnt
);

  always_comb begin
    for (int n = 0; n < N; n++) begin
      gnt[n] = req[n];
      for (int i = 0; i < N; i++) begin
        if (i < n)
          gnt[n] = gnt[n] & !(req[i] & prio[pair_idx(i, n, N)]);
        else if (i > n)
          gnt[n] = gnt[n] & !(req[i] & !prio[pair_idx(n, i, N)]);
      end
    end
  end

endmodule
