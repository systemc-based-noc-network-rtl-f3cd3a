// noc_router: five-port wormhole router of the mesh.
//
// Ports are indexed 0 = local (the node's source and sink), 1 = north,
// 2 = east, 3 = south, 4 = west. Each input has one 4-flit buffer (flit_fifo);
// the arbiter (noc_arbiter) routes the head flit of every buffer by XY order
// (mesh, or torus with TORUS = 1)
// and grants at most one input per output; the crossbar (noc_crossbar) moves the
// granted flits to their outputs in the same cycle.
//
// Link handshake, per port: the sender drives in_flit with in_valid and holds it
// while in_ack (the buffer's full flag) is high; the flit is taken at the clock
// edge where in_valid is high and in_ack low. On the output side out_valid is
// raised only when out_ack (the receiver's busy/full flag) is low, so every
// flit shown on an output is taken at the next edge.
//
// Latency: a flit written into an empty buffer at edge t leaves on its output
// in cycle t and is in the next router's buffer at edge t+1: one cycle per hop
// without contention. flit_count counts flits written into the five buffers,
// the record the original router process kept.
//
// Follows the router of the original simulator: one buffer per input (the
// generic router with several buffers per input behind a demultiplexer is not
// the one built here), an arbiter and a crossbar. Its own choices: the valid
// signals, the address split into XW/YW coordinate bits, one clock.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned XW      = 2,
  parameter int unsigned YW      = 2,
  parameter bit          TORUS   = 1'b0,
  parameter int unsigned COLS    = 4,
  parameter int unsigned ROWS    = 4,
  parameter int unsigned DEPTH   = FIFO_DEPTH,
  parameter int unsigned CNT_W   = 32
) (
  input  logic                  rclk,
  input  logic                  rst_n,
  input  logic [FW-1:0]         router_id,
  input  flit_t [NPORTS-1:0]    in_flit,
  input  logic  [NPORTS-1:0]    in_valid,
  output logic  [NPORTS-1:0]    in_ack,     // outack: input buffer full
  output flit_t [NPORTS-1:0]    out_flit,
  output logic  [NPORTS-1:0]    out_valid,
  input  logic  [NPORTS-1:0]    out_ack,    // inack: receiver cannot take a flit
  output logic  [CNT_W-1:0]     flit_count
);

  flit_t [NPORTS-1:0]   re_s;
  req_t  [NPORTS-1:0]   req_s;
  logic  [NPORTS-1:0]   gr_s;
  logic  [SEL_W-1:0]    select_s;

  for (genvar p = 0; p < NPORTS; p++) begin : g_buf
    flit_fifo #(.DEPTH(DEPTH)) u_buf (
      .clk      (rclk),
      .rst_n    (rst_n),
      .wr       (in_flit[p]),
      .wr_valid (in_valid[p]),
      .ack      (in_ack[p]),
      .re       (re_s[p]),
      .req      (req_s[p]),
      .grant    (gr_s[p])
    );
  end

  noc_arbiter #(.XW(XW), .YW(YW), .TORUS(TORUS), .COLS(COLS), .ROWS(ROWS)) u_arbiter (
    .clk        (rclk),
    .rst_n      (rst_n),
    .arbiter_id (router_id),
    .req        (req_s),
    .free_out   (out_ack),
    .grant      (gr_s),
    .aselect    (select_s)
  );

  noc_crossbar u_crossbar (
    .in_flit    (re_s),
    .in_valid   (gr_s),
    .config_sel (select_s),
    .out_flit   (out_flit),
    .out_valid  (out_valid)
  );

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) flit_count <= '0;
    else        flit_count <= flit_count + CNT_W'($countones(in_valid & ~in_ack));
  end

endmodule
