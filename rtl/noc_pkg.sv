// noc_pkg: constants and helpers shared by the input port of a virtual-channel
// NoC router and its 4:1 matrix arbiter.
//
// The port has four virtual channels (m = 4), so the input arbiter is 4:1.
// The flit width and the depth of each virtual-channel FIFO are not fixed by
// the specification this design follows; 32 bits and 4 flits are this
// design's own choices and can be overridden at every module.
//
// The priority matrix of an n:1 matrix arbiter only needs its upper triangle:
// for i < j the bit p_ij says "requester i beats requester j", and p_ji is
// its complement. The n(n-1)/2 stored bits are packed into one vector in row
// order, (0,1), (0,2), ..., (0,n-1), (1,2), ..., (n-2,n-1); pair_idx() gives the
// position of pair (i,j), i < j, in that vector.
package noc_pkg;

  parameter int unsigned NUM_VC   = 4;   // virtual channels per input port (m)
  parameter int unsigned FLIT_W   = 32;  // flit width in bits (design choice)
  parameter int unsigned VC_DEPTH = 4;   // flits per virtual-channel FIFO (design choice)

  // Number of stored priority bits of an n:1 matrix arbiter.
  function automatic int unsigned num_pairs(input int unsigned n);
    return n * (n - 1) / 2;
  endfunction

  // Position of the bit p_ij (i < j) in the packed upper triangle.
  function automatic int unsigned pair_idx(input int unsigned i,
                                           input int unsigned j,
                                           input int unsigned n);
    return i * n - (i * (i + 1)) / 2 + (j - i - 1);
  endfunction

endpackage
