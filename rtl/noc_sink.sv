// noc_sink: receiving core of one node.
//
// Takes flits from the local output of its router. After every flit it raises
// ack_out, which tells the router to send nothing more, and lowers it again at
// its next clock tick en; the sink's clock thus sets the rate at which it
// drains the network (with en high in every cycle, one flit every second
// cycle). It counts flits (pkt_rcv) and packets (tail flits), adds up the
// network time at which each tail flit is taken (tail_time_sum), keeps the last
// flit, and counts errors: a flit whose destination is not sink_id, or a body
// flit that does not come from the same source as the flit before it or whose
// imaginary clock bit did not flip.
//
// Timing: a flit with valid_in high is taken at the clock edge; ack_out is high
// from the next cycle on. The router only shows a flit while ack_out is low.
//
// Follows the original sink (acknowledge after a flit, release on its clock,
// counts). The error checks, which use the imaginary clock bit to see that no
// flit of a packet was lost or repeated, are this design's own.
module noc_sink
  import noc_pkg::*;
#(
  parameter int unsigned CNT_W  = 32,
  parameter int unsigned TIME_W = 32,
  parameter int unsigned SUM_W  = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,          // sink clock tick
  input  logic [FW-1:0]     sink_id,
  input  flit_t             packet_in,
  input  logic              valid_in,
  output logic              ack_out,
  output logic [CNT_W-1:0]  pkt_rcv,     // flits received
  output logic [CNT_W-1:0]  pkts_done,   // packets received (tail flits)
  output logic [CNT_W-1:0]  errors,
  output flit_t             last_flit,
  input  logic [TIME_W-1:0] now,           // network time, in router cycles
  output logic [SUM_W-1:0]  tail_time_sum  // sum of the times tails were taken
);

  logic in_packet_q;   // last flit taken was not a tail
  logic take, bad;

  assign take = valid_in && !ack_out;
  assign bad  = (packet_in.dest != sink_id)
             || (in_packet_q && (packet_in.id != last_flit.id
                                 || packet_in.pkt_clk == last_flit.pkt_clk));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_out     <= 1'b0;
      pkt_rcv     <= '0;
      pkts_done   <= '0;
      errors      <= '0;
      last_flit   <= '0;
      in_packet_q <= 1'b0;
      tail_time_sum <= '0;
    end else if (take) begin
      if (packet_in.h_t) tail_time_sum <= tail_time_sum + SUM_W'(now);
      ack_out     <= 1'b1;
      pkt_rcv     <= pkt_rcv + 1'b1;
      pkts_done   <= pkts_done + CNT_W'(packet_in.h_t);
      errors      <= errors + CNT_W'(bad);
      last_flit   <= packet_in;
      in_packet_q <= !packet_in.h_t;
    end else if (en) begin
      ack_out     <= 1'b0;
    end
  end

  a_no_flit_while_busy: assert property (@(posedge clk) disable iff (!rst_n) valid_in |-> !ack_out);

endmodule
