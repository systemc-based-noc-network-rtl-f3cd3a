// noc_pkg: types and constants shared by every block of the mesh network-on-chip.
//
// A packet is a train of flits. Every flit is 21 bits wide and carries the same
// header fields: an 11-bit data word, the 4-bit source address, the 4-bit
// destination address, the "imaginary clock" bit that flips from one flit to the
// next of a source, and the tail bit that is 1 only in the last flit of a packet.
// Field widths, the 4-entry input buffer and the 5-flit packet follow the
// original packet and buffer definitions; the port codes below are the router's
// output codes (1 = local, 2 = north, 3 = east, 4 = south, 5 = west, 0 = none).
// Port index p of a router uses output code p+1.
package noc_pkg;

  localparam int unsigned DATA_W     = 11;  // data bits per flit
  localparam int unsigned FW         = 4;   // source/destination address bits
  localparam int unsigned NPORTS     = 5;   // router ports: L, N, E, S, W
  localparam int unsigned FIFO_DEPTH = 4;   // flits per input buffer
  localparam int unsigned PKT_LEN    = 5;   // flits per packet (last one is the tail)
  localparam int unsigned SEL_W      = 3 * NPORTS;  // crossbar select word: 3 bits per input

  // Port indices of the router (index = output code - 1).
  localparam int unsigned P_L = 0;
  localparam int unsigned P_N = 1;
  localparam int unsigned P_E = 2;
  localparam int unsigned P_S = 3;
  localparam int unsigned P_W = 4;

  typedef enum logic [2:0] {
    PORT_NONE  = 3'd0,
    PORT_LOCAL = 3'd1,
    PORT_NORTH = 3'd2,
    PORT_EAST  = 3'd3,
    PORT_SOUTH = 3'd4,
    PORT_WEST  = 3'd5
  } port_code_e;

  typedef struct packed {
    logic [DATA_W-1:0] data;     // payload word
    logic [FW-1:0]     id;       // source address
    logic [FW-1:0]     dest;     // destination address
    logic              pkt_clk;  // imaginary clock: flips on every new flit of a source
    logic              h_t;      // 1 in the tail (last) flit of a packet
  } flit_t;

  // Request from an input buffer to the arbiter: the buffer is not empty, and
  // the destination and tail bit of the flit at its head.
  typedef struct packed {
    logic          valid;
    logic [FW-1:0] dest;
    logic          tail;
  } req_t;

  // Traffic patterns of the traffic generator.
  typedef enum logic [1:0] {
    TRAFFIC_FIXED     = 2'd0,  // every source sends to one fixed node
    TRAFFIC_UNIFORM   = 2'd1,  // permutation: node (x,y) -> (COLS-1-x, ROWS-1-y)
    TRAFFIC_NEIGHBOUR = 2'd2   // permutation: each node sends to an adjacent node
  } traffic_e;

endpackage
