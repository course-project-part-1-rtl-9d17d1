// matrix_element: one stored bit p_ij (i < j) of the arbiter's priority
// matrix, with its update circuit.
//
// p_ij = 1 means requester i has priority over requester j; the complement
// output p_ji_o is the mirrored element p_ji, so one flip-flop serves both
// halves of the matrix. The bit is held in an S-R flip-flop whose S and R
// inputs come from the update value u_ij, R being the complement of S:
//   u_ij = !reset && !gnt_i && (gnt_j || p_ij)
// A grant to i clears the bit (row i cleared: i drops below j), a grant to j
// sets it (column j set: j drops below i), and with neither grant it holds.
// These rules, the S-R flip-flop and the reset input entering the update
// logic follow the specification; that reset loads 0 (so at reset every
// higher-numbered requester beats every lower-numbered one) is this design's
// choice.
//
// Timing: reset and the grant inputs act at the rising edge of clk (the
// reset is synchronous, as it passes through the update logic); p_ij_o and
// p_ji_o come straight from the flip-flop.
module matrix_element (
  input  logic clk,
  input  logic reset,   // synchronous, active high: loads p_ij = 0
  input  logic gnt_i,   // grant to the row requester i
  input  logic gnt_j,   // grant to the column requester j
  output logic p_ij_o,  // Q:  i beats j
  output logic p_ji_o   // Q-bar: j beats i
);

  logic q;
  logic u_ij;   // update value
  logic s, r;   // S-R flip-flop inputs

  always_comb begin
    u_ij = !reset && !gnt_i && (gnt_j || q);
    s    = u_ij;
    r    = !u_ij;
  end

  // S-R flip-flop; S and R are never both high here.
  always_ff @(posedge clk) begin
    if (s)      q <= 1'b1;
    else if (r) q <= 1'b0;
  end

  assign p_ij_o = q;
  assign p_ji_o = !q;

  // Only one requester can hold the grant in a cycle.
  a_single_grant: assert property (@(posedge clk) !(gnt_i && gnt_j));

endmodule
