// noc_arbiter: route computation and switch allocation of a 5-port router.
//
// Routing is dimension-ordered (XY). An address is {y, x}: x in the low XW bits,
// y in the next YW bits. A head flit whose destination x is larger than the
// router's goes east, smaller goes west; with equal x, a larger y goes south, a
// smaller y north, and an equal address goes to the local port. This is the
// original bit-wise comparison (bit 0 = x, bit 1 = y) widened to XW and YW bits.
//
// With TORUS = 1 the x and y dimensions are rings of COLS and ROWS routers:
// x is still corrected first, but in the direction with fewer hops around
// the ring (east on a tie), then y likewise (south on a tie). No virtual
// channels break the cycles of a ring, so traffic whose packets chase each
// other round a whole ring can deadlock; one-to-one patterns whose routes
// cover less than a ring per dimension cannot.
//
// Switching is wormhole. The header of a packet reserves its output port; the
// input is then "connected" and its body flits follow on the stored route,
// without looking at their destination field, until the tail flit, which frees
// both the input and the output. An output is free in a cycle when it is not
// reserved by another input and free_out, the busy/full flag from the receiver
// behind it, is low. Inputs are served in fixed priority, port 0 (local) first;
// an output given to one input is taken away from the rest for that cycle, so
// each output moves at most one flit per cycle. A request that would leave by
// the port it came in on (impossible under XY routing in a mesh) is never granted.
//
// Interface: req[i] (valid, destination and tail bit of the head flit of input
// buffer i), free_out[o] (receiver behind output o cannot take a flit),
// grant[i] (input i sends its head flit this cycle), aselect (3-bit output code
// per input, input i in bits 3i+2..3i, 0 when not granted).
// Timing: grant and aselect are combinational in the requests; the reservation
// state changes at the clock edge. The original evaluated this on the falling
// clock edge; here it is one rising-edge design.
module noc_arbiter
  import noc_pkg::*;
#(
  parameter int unsigned XW    = 2,  // bits of the x coordinate
  parameter int unsigned YW    = 2,  // bits of the y coordinate
  parameter bit          TORUS = 1'b0,  // 1: wrap-around links, shortest way round
  parameter int unsigned COLS  = 4,  // ring sizes, used only when TORUS = 1
  parameter int unsigned ROWS  = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [FW-1:0]          arbiter_id,
  input  req_t  [NPORTS-1:0]     req,
  input  logic  [NPORTS-1:0]     free_out,
  output logic  [NPORTS-1:0]     grant,
  output logic  [SEL_W-1:0]      aselect
);

  logic       [NPORTS-1:0] connected_q;  // input is inside a packet
  port_code_e              route_q    [NPORTS];  // stored output of a connected input
  logic       [NPORTS-1:0] reserved_q;   // output is held by a packet

  port_code_e              route      [NPORTS];

  function automatic port_code_e xy_route(input logic [FW-1:0] id, input logic [FW-1:0] dest);
    logic [XW-1:0] ix, dx;
    logic [YW-1:0] iy, dy;
    ix = id[XW-1:0];
    dx = dest[XW-1:0];
    iy = id[XW+YW-1:XW];
    dy = dest[XW+YW-1:XW];
    if (TORUS) begin
      // hops going east / south around the ring; the shorter way wins, a tie goes east / south
      int unsigned ex, sy;
      ex = (int'(dx) - int'(ix) + COLS) % COLS;
      sy = (int'(dy) - int'(iy) + ROWS) % ROWS;
      if (ex != 0)      return (2 * ex <= COLS) ? PORT_EAST : PORT_WEST;
      else if (sy != 0) return (2 * sy <= ROWS) ? PORT_SOUTH : PORT_NORTH;
      else              return PORT_LOCAL;
    end
    if (ix < dx)      return PORT_EAST;
    else if (ix > dx) return PORT_WEST;
    else if (iy < dy) return PORT_SOUTH;
    else if (iy > dy) return PORT_NORTH;
    else              return PORT_LOCAL;
  endfunction

  always_comb begin
    logic [NPORTS-1:0] v_free;
    logic [2:0]        o;
    v_free  = ~free_out;
    grant   = '0;
    aselect = '0;
    for (int i = 0; i < NPORTS; i++) begin
      route[i] = connected_q[i] ? route_q[i] : xy_route(arbiter_id, req[i].dest);
      o = (route[i] == PORT_NONE) ? 3'd0 : 3'(route[i]) - 3'd1;
      if (req[i].valid && route[i] != PORT_NONE && int'(o) != i && v_free[o]
          && (connected_q[i] || !reserved_q[o])) begin
        grant[i]            = 1'b1;
        aselect[3*i +: 3]   = route[i];
        v_free[o]           = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      connected_q <= '0;
      reserved_q  <= '0;
      for (int i = 0; i < NPORTS; i++) route_q[i] <= PORT_NONE;
    end else begin
      for (int i = 0; i < NPORTS; i++) begin
        if (grant[i]) begin
          if (req[i].tail) begin
            connected_q[i]                  <= 1'b0;
            reserved_q[int'(route[i]) - 1]  <= 1'b0;
          end else begin
            connected_q[i]                  <= 1'b1;
            route_q[i]                      <= route[i];
            reserved_q[int'(route[i]) - 1]  <= 1'b1;
          end
        end
      end
    end
  end

  // A granted flit never goes to a busy receiver, and never back where it came from.
  for (genvar g = 0; g < NPORTS; g++) begin : g_chk
    a_free_output: assert property (@(posedge clk) disable iff (!rst_n)
      grant[g] |-> !free_out[int'(aselect[3*g +: 3]) - 1]);
    a_no_uturn: assert property (@(posedge clk) disable iff (!rst_n)
      grant[g] |-> (int'(aselect[3*g +: 3]) != g + 1));
  end

endmodule
