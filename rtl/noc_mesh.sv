// noc_mesh: ROWS x COLS mesh network-on-chip with one traffic source and one
// sink per node.
//
// Node n = y*COLS + x (x = column, y = row, row 0 at the north edge) holds a
// router (noc_router), a source (noc_source) on the router's local input and a
// sink (noc_sink) on its local output. Its address is {y, x}, x in the low XW
// bits. Routers are joined to their four neighbours: the east output of (x,y)
// feeds the west input of (x+1,y), the south output of (x,y) the north input of
// (x,y+1), and back. With TORUS = 1 the last router of a row links back to
// the first one of the row, and likewise in each column, and routing takes the
// shorter way round each ring (see noc_arbiter). On the mesh edge an input sees no flits and an output is
// held busy, which XY routing never uses for an address inside the mesh. A
// traffic generator (traffic_gen) gives every source its destination, and two
// tick generators (clk_tick) give the sources and the sinks their slower
// clocks. All of it runs on clk, the router clock, with active-low reset rst_n.
//
// Interface: traffic_mode picks the pattern (fixed destination, uniform
// permutation, neighbour); run lets the sources start new packets (they finish
// the packet they are in). Per node the mesh reports flits sent by the source,
// flits written into the router, flits and packets received by the sink, the
// sink's error count and the last flit it took, and the sums of header send
// times and tail arrival times kept by sources and sinks on a common cycle
// count: after a run has drained, (sum of snk_time_sum - sum of src_time_sum)
// divided by the packets received is the average packet delay, from the edge
// a router takes a header from its source to the edge a sink takes the tail.
//
// Default size 4x4 (16 nodes, 4-bit addresses), the mesh asked for in the
// original project; the 1x2 example is ROWS = 1, COLS = 2, and TORUS = 1
// gives the 4x4 torus of the project's optional part.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned   ROWS       = 4,
  parameter int unsigned   COLS       = 4,
  parameter bit            TORUS      = 1'b0,  // 1: wrap-around links (torus)
  parameter int unsigned   SRC_DIV    = 1,   // source clock = router clock / SRC_DIV
  parameter int unsigned   SNK_DIV    = 1,   // sink clock = router clock / SNK_DIV
  parameter logic [FW-1:0] FIXED_DEST = FW'(1),
  parameter int unsigned   CNT_W      = 32,
  parameter int unsigned   TIME_W     = 32,
  parameter int unsigned   SUM_W      = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  traffic_e          traffic_mode,
  input  logic              run,
  output logic [CNT_W-1:0]  src_flits  [ROWS*COLS],
  output logic [CNT_W-1:0]  rtr_flits  [ROWS*COLS],
  output logic [CNT_W-1:0]  snk_flits  [ROWS*COLS],
  output logic [CNT_W-1:0]  snk_pkts   [ROWS*COLS],
  output logic [CNT_W-1:0]  snk_errors [ROWS*COLS],
  output flit_t             snk_last   [ROWS*COLS],
  output logic [SUM_W-1:0]  src_time_sum [ROWS*COLS],  // sum of header send times
  output logic [SUM_W-1:0]  snk_time_sum [ROWS*COLS]   // sum of tail arrival times
);

  localparam int unsigned NN = ROWS * COLS;
  localparam int unsigned XW = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int unsigned YW = (ROWS > 1) ? $clog2(ROWS) : 1;

  if (XW + YW > FW) begin : g_too_big
    $error("noc_mesh: %0dx%0d mesh needs more than %0d address bits", ROWS, COLS, FW);
  end

  logic              s_tick, d_tick;
  logic [TIME_W-1:0] now_q;   // network time for the delay sums

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now_q <= '0;
    else        now_q <= now_q + 1'b1;
  end
  logic [FW-1:0]     traffic_id [NN];

  flit_t [NPORTS-1:0] r_in_flit   [NN];
  logic  [NPORTS-1:0] r_in_valid  [NN];
  logic  [NPORTS-1:0] r_in_ack    [NN];
  flit_t [NPORTS-1:0] r_out_flit  [NN];
  logic  [NPORTS-1:0] r_out_valid [NN];
  logic  [NPORTS-1:0] r_out_ack   [NN];

  clk_tick #(.DIV(SRC_DIV)) u_s_clock (.clk(clk), .rst_n(rst_n), .tick(s_tick));
  clk_tick #(.DIV(SNK_DIV)) u_d_clock (.clk(clk), .rst_n(rst_n), .tick(d_tick));

  traffic_gen #(
    .ROWS(ROWS), .COLS(COLS), .XW(XW), .FIXED_DEST(FIXED_DEST)
  ) u_traffic (
    .clk(clk), .rst_n(rst_n), .mode(traffic_mode), .traffic_id(traffic_id)
  );

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      localparam int unsigned  N  = y * COLS + x;
      localparam logic [FW-1:0] ID = FW'((y << XW) | x);

      // Neighbour links. Port p of this router faces port opposite(p) of the neighbour.
      if (y > 0) begin : g_n
        assign r_in_flit[N][P_N]  = r_out_flit[N-COLS][P_S];
        assign r_in_valid[N][P_N] = r_out_valid[N-COLS][P_S];
        assign r_out_ack[N][P_N]  = r_in_ack[N-COLS][P_S];
      end else if (TORUS && ROWS > 1) begin : g_n_wrap
        assign r_in_flit[N][P_N]  = r_out_flit[N+(ROWS-1)*COLS][P_S];
        assign r_in_valid[N][P_N] = r_out_valid[N+(ROWS-1)*COLS][P_S];
        assign r_out_ack[N][P_N]  = r_in_ack[N+(ROWS-1)*COLS][P_S];
      end else begin : g_n_edge
        assign r_in_flit[N][P_N]  = '0;
        assign r_in_valid[N][P_N] = 1'b0;
        assign r_out_ack[N][P_N]  = 1'b1;
      end
      if (y < ROWS - 1) begin : g_s
        assign r_in_flit[N][P_S]  = r_out_flit[N+COLS][P_N];
        assign r_in_valid[N][P_S] = r_out_valid[N+COLS][P_N];
        assign r_out_ack[N][P_S]  = r_in_ack[N+COLS][P_N];
      end else if (TORUS && ROWS > 1) begin : g_s_wrap
        assign r_in_flit[N][P_S]  = r_out_flit[x][P_N];
        assign r_in_valid[N][P_S] = r_out_valid[x][P_N];
        assign r_out_ack[N][P_S]  = r_in_ack[x][P_N];
      end else begin : g_s_edge
        assign r_in_flit[N][P_S]  = '0;
        assign r_in_valid[N][P_S] = 1'b0;
        assign r_out_ack[N][P_S]  = 1'b1;
      end
      if (x < COLS - 1) begin : g_e
        assign r_in_flit[N][P_E]  = r_out_flit[N+1][P_W];
        assign r_in_valid[N][P_E] = r_out_valid[N+1][P_W];
        assign r_out_ack[N][P_E]  = r_in_ack[N+1][P_W];
      end else if (TORUS && COLS > 1) begin : g_e_wrap
        assign r_in_flit[N][P_E]  = r_out_flit[y*COLS][P_W];
        assign r_in_valid[N][P_E] = r_out_valid[y*COLS][P_W];
        assign r_out_ack[N][P_E]  = r_in_ack[y*COLS][P_W];
      end else begin : g_e_edge
        assign r_in_flit[N][P_E]  = '0;
        assign r_in_valid[N][P_E] = 1'b0;
        assign r_out_ack[N][P_E]  = 1'b1;
      end
      if (x > 0) begin : g_w
        assign r_in_flit[N][P_W]  = r_out_flit[N-1][P_E];
        assign r_in_valid[N][P_W] = r_out_valid[N-1][P_E];
        assign r_out_ack[N][P_W]  = r_in_ack[N-1][P_E];
      end else if (TORUS && COLS > 1) begin : g_w_wrap
        assign r_in_flit[N][P_W]  = r_out_flit[N+COLS-1][P_E];
        assign r_in_valid[N][P_W] = r_out_valid[N+COLS-1][P_E];
        assign r_out_ack[N][P_W]  = r_in_ack[N+COLS-1][P_E];
      end else begin : g_w_edge
        assign r_in_flit[N][P_W]  = '0;
        assign r_in_valid[N][P_W] = 1'b0;
        assign r_out_ack[N][P_W]  = 1'b1;
      end

      noc_router #(
        .XW(XW), .YW(YW), .TORUS(TORUS), .COLS(COLS), .ROWS(ROWS), .CNT_W(CNT_W)
      ) u_router (
        .rclk       (clk),
        .rst_n      (rst_n),
        .router_id  (ID),
        .in_flit    (r_in_flit[N]),
        .in_valid   (r_in_valid[N]),
        .in_ack     (r_in_ack[N]),
        .out_flit   (r_out_flit[N]),
        .out_valid  (r_out_valid[N]),
        .out_ack    (r_out_ack[N]),
        .flit_count (rtr_flits[N])
      );

      noc_source #(.CNT_W(CNT_W), .TIME_W(TIME_W), .SUM_W(SUM_W)) u_source (
        .clk        (clk),
        .rst_n      (rst_n),
        .en         (s_tick),
        .run        (run),
        .source_id  (ID),
        .traffic_id (traffic_id[N]),
        .ack_in     (r_in_ack[N][P_L]),
        .packet_out (r_in_flit[N][P_L]),
        .valid_out  (r_in_valid[N][P_L]),
        .pkt_snt    (src_flits[N]),
        .now        (now_q),
        .hdr_time_sum (src_time_sum[N])
      );

      noc_sink #(.CNT_W(CNT_W), .TIME_W(TIME_W), .SUM_W(SUM_W)) u_sink (
        .clk        (clk),
        .rst_n      (rst_n),
        .en         (d_tick),
        .sink_id    (ID),
        .packet_in  (r_out_flit[N][P_L]),
        .valid_in   (r_out_valid[N][P_L]),
        .ack_out    (r_out_ack[N][P_L]),
        .pkt_rcv    (snk_flits[N]),
        .pkts_done  (snk_pkts[N]),
        .errors     (snk_errors[N]),
        .last_flit  (snk_last[N]),
        .now        (now_q),
        .tail_time_sum (snk_time_sum[N])
      );
    end
  end

endmodule
