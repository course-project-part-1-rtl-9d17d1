// input_mux: the input multiplexer of a router port.
//
// It forwards the head flit of the virtual channel that the input arbiter
// granted onto the single link into the router. It is steered directly by
// the arbiter's one-hot grant lines, so it is built as an AND-OR selector:
// each channel's flit is gated by its grant bit and the gated flits are
// ORed. With no grant high the output is all zero. The specification gives
// only the MUX's place and its select lines; the AND-OR form is this design's
// choice.
//
// Interface: N flits in, one-hot sel, one flit out. Timing: combinational.
module input_mux
  import noc_pkg::*;
#(
  parameter int unsigned N = NUM_VC,
  parameter int unsigned W = FLIT_W
) (
  input  logic [N-1:0][W-1:0] din,
  input  logic [N-1:0]        sel,
  output logic [W-1:0]        dout
);

  always_comb begin
    dout = '0;
    for (int k = 0; k < N; k++)
      dout = dout | (din[k] & {W{sel[k]}});
  end

endmodule
