// flit_fifo: input buffer of one router port.
//
// A shift-register FIFO of DEPTH flits. Entry 0 is the head. A flit offered on
// wr/wr_valid is written behind the last stored flit at the clock edge unless
// the buffer is full; the full flag is driven out as ack and tells the sender to
// hold its flit. While the buffer is not empty, req carries valid = 1 together
// with the destination and tail bit of the head flit, and re presents the head
// flit itself to the crossbar. When the arbiter answers with grant, the head
// leaves in the same cycle (it goes through the crossbar combinationally) and
// every entry moves one place toward the head at the clock edge.
//
// Timing: a flit written at edge t is at the head and can be granted in cycle t
// if the buffer was empty. One write and one read per cycle. Full blocks writes
// even in a cycle that also reads, as in the original buffer, whose ack follows
// its full flag.
//
// Follows the original buffer: four entries, shifting toward the head on read,
// full used as ack, not-empty plus head destination used as the request. The
// valid/hold handshake on wr replaces the event-driven write of the original.
module flit_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t wr,        // flit offered by the sender
  input  logic  wr_valid,  // wr holds a flit
  output logic  ack,       // buffer full: sender must hold its flit
  output flit_t re,        // head flit, to the crossbar
  output req_t  req,       // request to the arbiter
  input  logic  grant      // head flit is taken this cycle
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  flit_t            regs [DEPTH];
  logic [CW-1:0]    regnum;
  logic             full, empty, push, pop;

  assign full  = (regnum == CW'(DEPTH));
  assign empty = (regnum == '0);
  assign push  = wr_valid && !full;
  assign pop   = grant && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regnum <= '0;
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (pop) regs[i] <= (i + 1 < DEPTH) ? regs[i+1] : regs[i];
        if (push && (CW'(i) == (pop ? regnum - CW'(1) : regnum))) regs[i] <= wr;
      end
      regnum <= regnum + CW'(push) - CW'(pop);
    end
  end

  assign ack       = full;
  assign re        = regs[0];
  assign req.valid = !empty;
  assign req.dest  = regs[0].dest;
  assign req.tail  = regs[0].h_t;

  // A grant is only legal for a buffer that has a flit to give.
  a_grant_needs_flit: assert property (@(posedge clk) disable iff (!rst_n) grant |-> !empty);

endmodule
