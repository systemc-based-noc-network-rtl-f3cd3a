// tb_noc_mesh: end-to-end test of the 4x4 mesh at its default parameters.
//
// Runs the three traffic patterns one after the other: fixed destination
// (every source sends to node 1, a hot spot), uniform (node n to node 15-n)
// and neighbouring (node (x,y) to (x^1,y)). After each pattern the sources are
// stopped with run = 0 and the network drains. Checked, per pattern: every
// flit a source sent reaches the sink of its destination, in order, with the
// expected data, no sink counts an error, and packets arrive whole; node 1
// sends nothing in the fixed pattern (no traffic to itself). The latency of
// every flit, from the edge its router takes it to the edge its sink takes it,
// is at least hops + 1 cycles, and exactly that for some flit at one and at
// two hops (a hop costs one cycle). The test counts the mechanisms of the design and fails if
// one never happens: a full input buffer holding a sender, a head flit
// waiting behind an output reserved by another packet, a sink throttling its
// router, flits leaving on each of the five router ports, a source stopped at
// a packet end.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int ROWS = 4, COLS = 4, NN = 16;

  logic        clk = 0, rst_n = 0, run = 0;
  traffic_e    traffic_mode = TRAFFIC_FIXED;
  logic [31:0] src_flits [NN], rtr_flits [NN], snk_flits [NN], snk_pkts [NN], snk_errors [NN];
  flit_t       snk_last [NN];
  logic [63:0] src_time_sum [NN], snk_time_sum [NN];
  int checks = 0, failures = 0;
  longint cycle = 0;

  noc_mesh dut (.clk, .rst_n, .traffic_mode, .run, .src_flits, .rtr_flits,
                .snk_flits, .snk_pkts, .snk_errors, .snk_last,
                .src_time_sum, .snk_time_sum);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (60000) @(posedge clk);
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

  // ---- scoreboard: per source, the flits injected and when ----
  logic   src_valid [NN];
  flit_t  inj_f [NN][$];
  longint hdr_t [NN][$];          // header injection time of packets in flight, per source
  longint delay_sum = 0;          // per-packet delays measured here
  int     n_pkts = 0;
  longint inj_t [NN][$];
  int     min_lat [8];           // smallest latency seen per hop count
  int     n_rcv = 0, n_bad_lat = 0;
  // mechanism counters
  int     n_full = 0, n_reserved = 0, n_sink_busy = 0, n_port [NPORTS];

  function automatic int hops(input int a, input int b);
    int dx, dy;
    dx = (a % 4) - (b % 4);
    dy = (a / 4) - (b / 4);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  for (genvar n = 0; n < NN; n++) begin : g_mon
    localparam int Y = n / COLS, X = n % COLS;
    assign src_valid[n] = dut.g_row[Y].g_col[X].u_source.valid_out;
    always @(posedge clk) if (rst_n) begin
      // injection: the router takes the source's flit
      if (dut.g_row[Y].g_col[X].u_source.valid_out && !dut.g_row[Y].g_col[X].u_source.ack_in) begin
        inj_f[n].push_back(dut.g_row[Y].g_col[X].u_source.packet_out);
        inj_t[n].push_back(cycle);
        if (dut.g_row[Y].g_col[X].u_source.out_hdr_q) hdr_t[n].push_back(cycle);
      end
      // delivery: the sink takes a flit
      if (dut.g_row[Y].g_col[X].u_sink.valid_in) begin
        flit_t f;
        int    s, lat;
        f = dut.g_row[Y].g_col[X].u_sink.packet_in;
        s = int'(f.id);
        n_rcv++;
        if (inj_f[s].size() == 0) check(0, "flit nobody sent");
        else begin
          check(inj_f[s].pop_front() == f, "flit order and contents per source");
          lat = int'(cycle - inj_t[s].pop_front());
          if (f.h_t) begin
            delay_sum += cycle - hdr_t[s].pop_front();
            n_pkts++;
          end
          check(int'(f.dest) == n, "delivered at its destination");
          if (lat < hops(s, n) + 1) n_bad_lat++;
          if (min_lat[hops(s, n)] == 0 || lat < min_lat[hops(s, n)]) min_lat[hops(s, n)] = lat;
        end
      end
      // mechanisms
      for (int p = 0; p < NPORTS; p++) begin
        if (dut.g_row[Y].g_col[X].u_router.in_valid[p] && dut.g_row[Y].g_col[X].u_router.in_ack[p]) n_full++;
        if (dut.g_row[Y].g_col[X].u_router.out_valid[p]) n_port[p]++;
        if (dut.g_row[Y].g_col[X].u_router.req_s[p].valid && !dut.g_row[Y].g_col[X].u_router.gr_s[p]
            && !dut.g_row[Y].g_col[X].u_router.u_arbiter.connected_q[p]
            && dut.g_row[Y].g_col[X].u_router.u_arbiter.reserved_q[int'(dut.g_row[Y].g_col[X].u_router.u_arbiter.route[p]) - 1])
          n_reserved++;
      end
      for (int p = 0; p < NPORTS; p++)
        if (dut.g_row[Y].g_col[X].u_router.req_s[p].valid && dut.g_row[Y].g_col[X].u_sink.ack_out
            && dut.g_row[Y].g_col[X].u_router.u_arbiter.route[p] == PORT_LOCAL) n_sink_busy++;
    end
  end

  // Runs one pattern for `cycles` cycles, stops the sources, drains, checks.
  task automatic run_pattern(input traffic_e mode, input int cycles, input string name);
    int sent0 [NN], rcvd0 [NN], pk0 [NN];
    int exp_rcv [NN];
    int tot_sent;
    longint hw0, d0;
    int     p0;
    hw0 = 0;
    for (int n = 0; n < NN; n++) hw0 += longint'(snk_time_sum[n]) - longint'(src_time_sum[n]);
    d0 = delay_sum; p0 = n_pkts;
    for (int n = 0; n < NN; n++) begin
      sent0[n] = int'(src_flits[n]); rcvd0[n] = int'(snk_flits[n]); pk0[n] = int'(snk_pkts[n]);
      exp_rcv[n] = 0;
    end
    traffic_mode = mode;
    repeat (2) @(negedge clk);
    run = 1;
    repeat (cycles) @(negedge clk);
    run = 0;
    // drain: wait until nothing has been in flight for 20 cycles
    begin
      int quiet, guard;
      quiet = 0; guard = 0;
      while (quiet < 20 && guard < 10000) begin
        int inflight;
        @(negedge clk);
        guard++;
        inflight = 0;
        for (int n = 0; n < NN; n++) inflight += inj_f[n].size() + int'(src_valid[n]);
        quiet = (inflight == 0) ? quiet + 1 : 0;
      end
      check(guard < 10000, {name, ": network drained"});
    end
    tot_sent = 0;
    for (int n = 0; n < NN; n++) begin
      int d;
      d = (mode == TRAFFIC_FIXED) ? 1 : (mode == TRAFFIC_UNIFORM) ? 15 - n : (n ^ 1);
      exp_rcv[d] += int'(src_flits[n]) - sent0[n];
      tot_sent += int'(src_flits[n]) - sent0[n];
      check(src_valid[n] == 1'b0, {name, ": source idle after stop"});
      check((int'(src_flits[n]) - sent0[n]) % PKT_LEN == 0, {name, ": whole packets sent"});
      if (mode == TRAFFIC_FIXED && n == 1) check(int'(src_flits[n]) == sent0[n], {name, ": node 1 does not send to itself"});
      else check(int'(src_flits[n]) - sent0[n] > 0, {name, ": source sent"});
    end
    for (int n = 0; n < NN; n++) begin
      check(int'(snk_flits[n]) - rcvd0[n] == exp_rcv[n], $sformatf("%s: sink %0d got %0d of %0d flits", name, n, int'(snk_flits[n]) - rcvd0[n], exp_rcv[n]));
      check((int'(snk_pkts[n]) - pk0[n]) * PKT_LEN == exp_rcv[n], {name, ": whole packets received"});
      check(snk_errors[n] == 0, {name, ": no sink errors"});
      check(inj_f[n].size() == 0, {name, ": nothing left in flight"});
    end
    begin
      longint hw1;
      hw1 = 0;
      for (int n = 0; n < NN; n++) hw1 += longint'(snk_time_sum[n]) - longint'(src_time_sum[n]);
      check(hw1 - hw0 == delay_sum - d0 && n_pkts > p0, {name, ": delay sums match per-packet delays"});
      $display("%s: %0d flits delivered in %0d cycles of injection, average packet delay %0.1f cycles",
               name, tot_sent, cycles, real'(hw1 - hw0) / real'(n_pkts - p0));
    end
  endtask

  initial begin
    foreach (min_lat[i]) min_lat[i] = 0;
    foreach (n_port[i]) n_port[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_pattern(TRAFFIC_FIXED,     2000, "fixed");
    run_pattern(TRAFFIC_UNIFORM,   2000, "uniform");
    run_pattern(TRAFFIC_NEIGHBOUR, 2000, "neighbour");
    check(n_bad_lat == 0, "no flit faster than hops + 1");
    // Distances 1 and 2 occur without contention in the neighbour and fixed patterns.
    for (int h = 1; h <= 2; h++)
      check(min_lat[h] == h + 1, $sformatf("zero-load latency %0d hops: %0d cycles", h, min_lat[h]));
    for (int h = 3; h <= 6; h++)
      check(min_lat[h] >= h + 1, $sformatf("latency %0d hops at least %0d cycles", h, h + 1));
    check(n_full > 0,      $sformatf("full buffer held a sender: %0d", n_full));
    check(n_reserved > 0,  $sformatf("head waited behind reserved output: %0d", n_reserved));
    check(n_sink_busy > 0, $sformatf("sink throttled router: %0d", n_sink_busy));
    for (int p = 0; p < NPORTS; p++) check(n_port[p] > 0, $sformatf("port %0d used: %0d", p, n_port[p]));
    $display("mechanisms: full=%0d reserved=%0d sink_busy=%0d ports L/N/E/S/W=%0d/%0d/%0d/%0d/%0d",
             n_full, n_reserved, n_sink_busy, n_port[0], n_port[1], n_port[2], n_port[3], n_port[4]);
    $display("zero-load latency by hops 1..6: %0d %0d %0d %0d %0d %0d",
             min_lat[1], min_lat[2], min_lat[3], min_lat[4], min_lat[5], min_lat[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
