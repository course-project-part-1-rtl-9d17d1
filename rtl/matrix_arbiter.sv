// matrix_arbiter: n:1 matrix arbiter (4:1 by default) granting a single
// resource to one of n requesters, least recently served first.
//
// It is the grant circuit and the priority matrix, joined as in the block
// diagram of the arbiter: the priority bits feed the grant circuit, and its
// grants feed the update circuits of the matrix. A requester wins when no
// higher-priority requester is bidding; the winner then becomes the lowest
// priority of all, which makes the arbiter strongly fair: a requester that
// keeps asking waits at most n-1 grants.
//
// Interface: req in, gnt out (one-hot, or zero when nothing is requested).
// prio exposes the stored upper triangle for observation. Timing: gnt follows
// req and the matrix combinationally in the same cycle; the matrix is updated
// at the rising edge of clk that ends a cycle with a grant. Reset is
// synchronous; after it requester N-1 has the highest priority and
// requester 0 the lowest (this design's choice of reset state).
module matrix_arbiter
  import noc_pkg::*;
#(
  parameter int unsigned N = NUM_VC
) (
  input  logic                    clk,
  input  logic                    reset,
  input  logic [N-1:0]            req,
  output logic [N-1:0]            gnt,
  output logic [num_pairs(N)-1:0] prio
);

  grant_circuit #(.N(N)) u_grant (
    .req  (req),
    .prio (prio),
    .gnt  (gnt)
  );

  priority_matrix #(.N(N)) u_matrix (
    .clk   (clk),
    .reset (reset),
    .gnt   (gnt),
    .prio  (prio)
  );

  a_onehot_grant: assert property (@(posedge clk) disable iff (reset) $onehot0(gnt));
  a_grant_if_req: assert property (@(posedge clk) disable iff (reset) (|req) == (|gnt));
  a_grant_to_req: assert property (@(posedge clk) disable iff (reset) (gnt & ~req) == '0);

endmodule
