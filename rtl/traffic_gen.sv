// traffic_gen: destination address of every source of the mesh.
//
// For a ROWS x COLS mesh it gives node n = y*COLS + x the destination address
// {y', x'} (x' in the low XW bits) of the pattern chosen by mode:
//   TRAFFIC_FIXED     every node sends to address FIXED_DEST (the node FIXED_DEST
//                     itself sends nothing, because a source never sends to itself);
//   TRAFFIC_UNIFORM   node (x, y) sends to (COLS-1-x, ROWS-1-y): each node sends to
//                     exactly one node and each node receives from exactly one;
//   TRAFFIC_NEIGHBOUR node (x, y) sends to its horizontal neighbour (x XOR 1, y),
//                     or, in a one-column mesh, to (x, y XOR 1); again a
//                     one-to-one pattern, now over a single hop.
// The output is registered and so changes one cycle after mode.
//
// The two one-to-one patterns are the uniform and neighbouring patterns asked
// for a 4x4 mesh; the particular permutations are this design's choice. The
// fixed pattern is the single-destination traffic of the original 1x2 example.
// Neighbouring needs an even number of columns (or of rows in one column).
module traffic_gen
  import noc_pkg::*;
#(
  parameter int unsigned  ROWS       = 4,
  parameter int unsigned  COLS       = 4,
  parameter int unsigned  XW         = 2,
  parameter logic [FW-1:0] FIXED_DEST = FW'(1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  traffic_e             mode,
  output logic [FW-1:0]        traffic_id [ROWS*COLS]
);

  function automatic logic [FW-1:0] addr(input int unsigned x, input int unsigned y);
    return FW'((y << XW) | x);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < ROWS*COLS; n++) traffic_id[n] <= FIXED_DEST;
    end else begin
      for (int y = 0; y < ROWS; y++) begin
        for (int x = 0; x < COLS; x++) begin
          unique case (mode)
            TRAFFIC_UNIFORM:   traffic_id[y*COLS + x] <= addr(COLS - 1 - x, ROWS - 1 - y);
            TRAFFIC_NEIGHBOUR: traffic_id[y*COLS + x] <= (COLS > 1) ? addr(x ^ 1, y) : addr(x, y ^ 1);
            default:           traffic_id[y*COLS + x] <= FIXED_DEST;
          endcase
        end
      end
    end
  end

endmodule
