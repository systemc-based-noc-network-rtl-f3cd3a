// clk_tick: slower clock for the sources or the sinks, as a clock enable.
//
// The network has three clocks: one for the sources, one for the routers and
// one for the sinks. Here everything runs on the router clock and the source
// and sink clocks are ticks: tick is high in one cycle out of DIV, so a
// block clocked by the tick runs DIV times slower than the routers. DIV = 1
// gives a tick in every cycle (source and sink clocks equal to the router
// clock). The first tick comes in the first cycle after reset.
//
// The clock periods are not given by the original design; DIV and the use of
// clock enables instead of separate clocks are this design's choice.
module clk_tick #(
  parameter int unsigned DIV = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     cnt_q <= '0;
    else if (cnt_q == CW'(DIV - 1)) cnt_q <= '0;
    else                            cnt_q <= cnt_q + 1'b1;
  end

  assign tick = (cnt_q == '0);

endmodule
