// priority_matrix: the priority state of an n:1 matrix arbiter.
//
// It instantiates one matrix_element per pair of requesters (i < j), n(n-1)/2
// in all (six for the 4:1 arbiter); the diagonal of the matrix has no meaning
// and is not stored, and each lower-triangle element p_ji is the complement
// of the stored p_ij. Element (i,j) receives gnt[i] as its row grant and
// gnt[j] as its column grant, so a grant to requester k clears row k and sets
// column k: k becomes the lowest-priority requester while the order among the
// others is kept.
//
// Interface: gnt is the one-hot (or all-zero) grant vector of the grant
// circuit; prio is the packed upper triangle, bit noc_pkg::pair_idx(i,j,N)
// holding p_ij. Timing: prio changes at the rising edge after a grant; reset
// is synchronous and leaves every p_ij (i < j) at 0.
module priority_matrix
  import noc_pkg::*;
#(
  parameter int unsigned N = NUM_VC
) (
  input  logic                      clk,
  input  logic                      reset,
  input  logic [N-1:0]              gnt,
  output logic [num_pairs(N)-1:0]   prio
);

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = i + 1; j < N; j++) begin : g_col
      logic p_ji_unused;
      matrix_element u_elem (
        .clk    (clk),
        .reset  (reset),
        .gnt_i  (gnt[i]),
        .gnt_j  (gnt[j]),
        .p_ij_o (prio[pair_idx(i, j, N)]),
        .p_ji_o (p_ji_unused)
      );
    end
  end

endmodule
