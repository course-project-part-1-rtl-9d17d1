// vc_fifo: the flit buffer of one input virtual channel.
//
// A circular buffer of DEPTH flits with a write and a read pointer and an
// occupancy count. The head flit is always visible on rd_data (first-word
// fall-through), so the input MUX can forward it in the same cycle as the
// arbiter grants this channel. A push when full and a pop when empty are
// ignored (and flagged by assertions); a push and a pop in the same cycle
// are both carried out, also when the buffer is full.
//
// The specification only names these buffers; their organisation, depth and
// width are this design's choices.
//
// Interface: push/wr_data write the tail, pop removes the head, full and
// empty report the state and count the occupancy. Timing: all state changes
// at the rising edge of clk; a pushed flit appears on rd_data (with empty
// low) one cycle later. Reset is synchronous and empties the buffer.
module vc_fifo
  import noc_pkg::*;
#(
  parameter int unsigned W     = FLIT_W,
  parameter int unsigned DEPTH = VC_DEPTH
) (
  input  logic                       clk,
  input  logic                       reset,
  input  logic                       push,
  input  logic [W-1:0]               wr_data,
  input  logic                       pop,
  output logic [W-1:0]               rd_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          do_push, do_pop;

  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty   = (count == '0);
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wr_data;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (reset) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (reset) !(pop && empty));

endmodule
