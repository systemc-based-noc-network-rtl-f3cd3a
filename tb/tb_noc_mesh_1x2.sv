// tb_noc_mesh_1x2: the two-node example network (one row, two columns).
//
// Fixed-destination traffic: both sources are told to send to node 1; node 1
// sends nothing (no traffic to itself), node 0 streams packets to node 1. The
// sink of node 1 must see the data sequence 1001, 1002, 1003, ... from source
// 0, in packets of five, and, as the sink releases the router only on its
// clock tick, take one flit every second cycle. Then the neighbour pattern
// makes the two nodes exchange packets in both directions at once. A second
// copy of the network, whose source clock runs at a quarter of the router
// clock, must deliver one flit every four cycles instead.
module tb_noc_mesh_1x2;
  import noc_pkg::*;

  logic        clk = 0, rst_n = 0, run = 0;
  traffic_e    traffic_mode = TRAFFIC_FIXED;
  logic [31:0] src_flits [2], rtr_flits [2], snk_flits [2], snk_pkts [2], snk_errors [2];
  flit_t       snk_last [2];
  logic [63:0] src_time_sum [2], snk_time_sum [2];
  int checks = 0, failures = 0;
  int k = 0;

  noc_mesh #(.ROWS(1), .COLS(2)) dut (.clk, .rst_n, .traffic_mode, .run, .src_flits, .rtr_flits,
                                      .snk_flits, .snk_pkts, .snk_errors, .snk_last,
                .src_time_sum, .snk_time_sum);

  // Second copy with a source clock four times slower than the router clock.
  logic [31:0] q_src [2], q_rtr [2], q_snk [2], q_pkts [2], q_err [2];
  flit_t       q_last [2];
  logic [63:0] q_st [2], q_rt [2];
  noc_mesh #(.ROWS(1), .COLS(2), .SRC_DIV(4)) dut_slow (
    .clk, .rst_n, .traffic_mode(TRAFFIC_FIXED), .run, .src_flits(q_src), .rtr_flits(q_rtr),
    .snk_flits(q_snk), .snk_pkts(q_pkts), .snk_errors(q_err), .snk_last(q_last),
    .src_time_sum(q_st), .snk_time_sum(q_rt));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Data sequence seen by sink 1 during the fixed pattern.
  always @(posedge clk) if (rst_n && traffic_mode == TRAFFIC_FIXED && dut.g_row[0].g_col[1].u_sink.valid_in) begin
    flit_t f;
    f = dut.g_row[0].g_col[1].u_sink.packet_in;
    check(f.id == 4'd0 && f.data == 11'(1001 + k) && f.h_t == (k % 5 == 4), $sformatf("flit %0d from source 0", k));
    k++;
  end

  initial begin
    int s0, r1, c0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    run = 1;
    repeat (20) @(negedge clk);
    s0 = int'(snk_flits[1]); c0 = int'(q_snk[1]);
    repeat (200) @(negedge clk);
    r1 = int'(snk_flits[1]) - s0;
    check(r1 >= 99 && r1 <= 101, $sformatf("sink 1 takes one flit per two cycles (%0d in 200)", r1));
    r1 = int'(q_snk[1]) - c0;
    check(r1 >= 49 && r1 <= 51, $sformatf("source clock / 4: one flit per four cycles (%0d in 200)", r1));
    run = 0;
    repeat (100) @(negedge clk);
    check(src_flits[1] == 0, "node 1 sends nothing to itself");
    check(snk_flits[0] == 0, "sink 0 receives nothing");
    check(snk_flits[1] == src_flits[0] && src_flits[0] % 5 == 0 && src_flits[0] > 0, "all flits of source 0 arrive");
    check(snk_pkts[1] * 5 == snk_flits[1], "whole packets");
    check(snk_errors[0] == 0 && snk_errors[1] == 0, "no sink errors");
    // exchange in both directions
    traffic_mode = TRAFFIC_NEIGHBOUR;
    repeat (3) @(negedge clk);
    s0 = int'(snk_flits[0]); r1 = int'(snk_flits[1]);
    run = 1;
    repeat (300) @(negedge clk);
    run = 0;
    repeat (100) @(negedge clk);
    check(int'(snk_flits[0]) - s0 > 100, "node 0 receives from node 1");
    check(snk_flits[0] == src_flits[1], "all flits of source 1 arrive");
    check(snk_flits[1] == src_flits[0], "all flits of source 0 arrive, both directions");
    check(snk_errors[0] == 0 && snk_errors[1] == 0, "no sink errors in exchange");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
