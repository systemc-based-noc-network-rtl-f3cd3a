// noc_source: synthetic traffic source of one node.
//
// Builds flits and offers them to the local input of its router. Each new flit
// takes data = previous data + source_id + 1 (the first flit after reset
// carries 1000 + source_id + 1), the node's own address as id, the destination
// given by the traffic generator, the inverted imaginary clock bit of the
// previous flit, and a tail bit that is set in every PKT_LEN-th flit, so a
// packet is PKT_LEN flits long. The destination is taken when the header is
// built and kept for the whole packet. A packet is not started when the
// destination is the node itself, nor while run is low; a packet already
// started is always finished.
//
// Handshake: packet_out/valid_out hold a flit until it is taken at a clock edge
// where ack_in (the router buffer is full) is low. A new flit is built only in a
// cycle where en, the source clock tick, is high and the output register is
// empty or being emptied; with en high in every cycle the source offers one
// flit per cycle. pkt_snt counts the flits taken by the router, and
// hdr_time_sum adds up the network time now at each edge where the router
// takes a header. Together with the sinks' sums of tail arrival times this
// gives the average packet delay of a run without matching single packets:
// (sum of tail times - sum of header times) / packets, once the network has
// drained.
//
// Follows the original source process (data rule, start value, imaginary clock,
// 5-flit packets, no traffic to itself). The run input, the valid/hold
// handshake, the clock tick and keeping the destination for a whole packet are
// this design's own; so is measuring delay with time sums (the original asks
// only that send and receive times be recorded and the average delay shown).
module noc_source
  import noc_pkg::*;
#(
  parameter int unsigned      LEN        = PKT_LEN,
  parameter logic [DATA_W-1:0] DATA_START = DATA_W'(1000),
  parameter int unsigned      CNT_W      = 32,
  parameter int unsigned      TIME_W     = 32,
  parameter int unsigned      SUM_W      = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,          // source clock tick
  input  logic              run,         // start new packets
  input  logic [FW-1:0]     source_id,
  input  logic [FW-1:0]     traffic_id,  // destination from the traffic generator
  input  logic              ack_in,      // router buffer full
  output flit_t             packet_out,
  output logic              valid_out,
  output logic [CNT_W-1:0]  pkt_snt,
  input  logic [TIME_W-1:0] now,          // network time, in router cycles
  output logic [SUM_W-1:0]  hdr_time_sum  // sum of the times headers were taken
);

  localparam int unsigned IW = (LEN > 1) ? $clog2(LEN) : 1;

  logic [DATA_W-1:0] data_q;
  logic              clk_q;
  logic [IW-1:0]     idx_q;      // position of the next flit in its packet
  logic [FW-1:0]     dest_q;     // destination of the packet being sent
  logic              taken, can_build, header, build;
  logic              out_hdr_q;  // packet_out is a header flit
  logic [FW-1:0]     dest_n;

  assign taken     = valid_out && !ack_in;
  assign can_build = en && (!valid_out || taken);
  assign header    = (idx_q == '0);
  assign dest_n    = header ? traffic_id : dest_q;
  assign build     = can_build && (!header || (run && traffic_id != source_id));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q     <= DATA_START;
      clk_q      <= 1'b0;
      idx_q      <= '0;
      dest_q     <= '0;
      valid_out  <= 1'b0;
      packet_out <= '0;
      pkt_snt    <= '0;
      out_hdr_q  <= 1'b0;
      hdr_time_sum <= '0;
    end else begin
      if (taken) begin
        valid_out <= 1'b0;
        pkt_snt   <= pkt_snt + 1'b1;
        if (out_hdr_q) hdr_time_sum <= hdr_time_sum + SUM_W'(now);
      end
      if (build) begin
        data_q             <= data_q + DATA_W'(source_id) + DATA_W'(1);
        clk_q              <= ~clk_q;
        dest_q             <= dest_n;
        idx_q              <= (idx_q == IW'(LEN - 1)) ? '0 : idx_q + 1'b1;
        packet_out.data    <= data_q + DATA_W'(source_id) + DATA_W'(1);
        packet_out.id      <= source_id;
        packet_out.dest    <= dest_n;
        packet_out.pkt_clk <= ~clk_q;
        packet_out.h_t     <= (idx_q == IW'(LEN - 1));
        valid_out          <= 1'b1;
        out_hdr_q          <= header;
      end
    end
  end

endmodule
