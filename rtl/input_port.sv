// input_port: one physical input port of a virtual-channel NoC router.
//
// Flits arrive on NUM_VC virtual channels (four by default), each with its
// own FIFO buffer, and may arrive on several channels in the same cycle.
// Only one channel can use the physical link into the router per cycle, so a
// 4:1 matrix arbiter chooses among the channels whose buffer holds a flit,
// and the input MUX, steered by the arbiter's grant lines, forwards the head
// flit of the winner together with its virtual-channel identifier (VCID).
// The granted buffer is popped in the same cycle, and the arbiter makes the
// winner its lowest priority, so busy channels share the link in turn.
//
// Following the specification: the four buffers, the matrix arbiter and the
// MUX, and the grant lines steering the MUX. This design's own choices: the
// valid/ready handshakes on both sides, the VCID output, the flit width and
// buffer depth, and that a channel only requests while the router side is
// ready (out_ready), so that a stalled cycle neither pops a buffer nor
// changes the priorities.
//
// Interface, per channel k: in_valid[k]/in_flit[k] write buffer k when
// in_ready[k] (buffer not full). Output: out_valid/out_flit/out_vcid, taken
// by the router whenever out_valid and out_ready are both high (out_valid is
// only high when out_ready is). arb_gnt shows the arbiter's grant lines.
// Timing: a flit written at one rising edge can leave at the next; the
// output is combinational from the buffer heads, the arbiter state and
// out_ready. Reset is synchronous: buffers empty, channel NUM_VC-1 highest
// priority.
module input_port
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VCS = NUM_VC,
  parameter int unsigned W       = FLIT_W,
  parameter int unsigned DEPTH   = VC_DEPTH,
  localparam int unsigned VCID_W = (NUM_VCS > 1) ? $clog2(NUM_VCS) : 1
) (
  input  logic                        clk,
  input  logic                        reset,
  // virtual-channel inputs
  input  logic [NUM_VCS-1:0]          in_valid,
  input  logic [NUM_VCS-1:0][W-1:0]   in_flit,
  output logic [NUM_VCS-1:0]          in_ready,
  // link into the router
  output logic                        out_valid,
  output logic [W-1:0]                out_flit,
  output logic [VCID_W-1:0]           out_vcid,
  input  logic                        out_ready,
  // arbiter grant lines, for observation
  output logic [NUM_VCS-1:0]          arb_gnt
);

  logic [NUM_VCS-1:0]        empty, full, req, gnt;
  logic [NUM_VCS-1:0][W-1:0] head;
  logic [num_pairs(NUM_VCS)-1:0] prio_unused;

  for (genvar k = 0; k < NUM_VCS; k++) begin : g_vc
    logic [$clog2(DEPTH+1)-1:0] count_unused;
    vc_fifo #(.W(W), .DEPTH(DEPTH)) u_fifo (
      .clk     (clk),
      .reset   (reset),
      .push    (in_valid[k]),
      .wr_data (in_flit[k]),
      .pop     (gnt[k]),
      .rd_data (head[k]),
      .full    (full[k]),
      .empty   (empty[k]),
      .count   (count_unused)
    );
  end

  assign in_ready = ~full;
  assign req      = ~empty & {NUM_VCS{out_ready}};

  matrix_arbiter #(.N(NUM_VCS)) u_arbiter (
    .clk   (clk),
    .reset (reset),
    .req   (req),
    .gnt   (gnt),
    .prio  (prio_unused)
  );

  input_mux #(.N(NUM_VCS), .W(W)) u_mux (
    .din  (head),
    .sel  (gnt),
    .dout (out_flit)
  );

  always_comb begin
    out_vcid = '0;
    for (int k = 0; k < NUM_VCS; k++)
      if (gnt[k]) out_vcid = VCID_W'(k);
  end

  assign out_valid = |gnt;
  assign arb_gnt   = gnt;

endmodule
