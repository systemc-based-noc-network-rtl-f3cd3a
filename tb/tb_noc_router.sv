// tb_noc_router: self-checking test of one router (address 5, x = 1, y = 1,
// of a 4x4 mesh).
//
// Five senders offer packets of five flits on the five inputs, each with
// destinations that XY routing can bring to that input; five receivers on
// the outputs are busy at random. Each flit's data field tags its input and
// sequence number. Checked: every flit leaves by the XY output for its
// destination, in order per input, none lost or repeated; the flits of a
// packet leave an output back to back, with no other packet in between; a
// flit never leaves to a busy receiver; the one-cycle hop latency through an
// empty router; flit_count. The test also counts that buffers filled (ack
// held a sender) and that requests lost arbitration.
module tb_noc_router;
  import noc_pkg::*;

  localparam logic [3:0] RID = 4'd5;

  logic                clk = 0, rst_n = 0;
  flit_t [NPORTS-1:0]  in_flit, out_flit;
  logic  [NPORTS-1:0]  in_valid, in_ack, out_valid, out_ack;
  logic  [31:0]        flit_count;
  int checks = 0, failures = 0;

  noc_router #(.XW(2), .YW(2)) dut (
    .rclk(clk), .rst_n, .router_id(RID), .in_flit, .in_valid, .in_ack,
    .out_flit, .out_valid, .out_ack, .flit_count);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int xy_out(input int dest);
    int dx = dest % 4, dy = dest / 4;
    if (dx > 1) return P_E;
    if (dx < 1) return P_W;
    if (dy > 1) return P_S;
    if (dy < 1) return P_N;
    return P_L;
  endfunction

  // A destination that can arrive on input port p under XY routing.
  function automatic logic [3:0] legal_dest(input int p);
    int x, y;
    case (p)
      P_E: begin x = $urandom_range(0, 1); y = $urandom_range(0, 3); end        // moving west
      P_W: begin x = $urandom_range(1, 3); y = $urandom_range(0, 3); end        // moving east
      P_N: begin x = 1; y = $urandom_range(1, 3); end                           // moving south
      P_S: begin x = 1; y = $urandom_range(0, 1); end                           // moving north
      default: begin
        do begin x = $urandom_range(0, 3); y = $urandom_range(0, 3); end while (x == 1 && y == 1);
      end
    endcase
    return 4'(y * 4 + x);
  endfunction

  flit_t expq [NPORTS][$];      // flits taken by the router, per input
  int    owner [NPORTS];        // input whose packet holds an output, -1 if none
  int    sent_idx [NPORTS];     // flits built per input
  logic [3:0] cur_dest [NPORTS];
  int    delivered = 0, taken = 0, n_full = 0, n_conflict = 0;
  bit    running = 0;
  int    pct_ack = 20;

  // Senders: next flit when the current one is taken.
  always @(posedge clk) if (rst_n && running) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (in_valid[p] && in_ack[p]) n_full++;
      if (in_valid[p] && !in_ack[p]) begin
        expq[p].push_back(in_flit[p]);
        taken++;
      end
    end
  end

  // Receivers and scoreboard.
  always @(posedge clk) if (rst_n && running) begin
    for (int o = 0; o < NPORTS; o++) begin
      if (out_valid[o]) begin
        int src;
        flit_t f;
        check(!out_ack[o], "no flit to a busy receiver");
        src = int'(out_flit[o].data[10:8]);
        if (src >= NPORTS || expq[src].size() == 0) begin
          check(0, "flit from unknown input");
        end else begin
          f = expq[src].pop_front();
          check(out_flit[o] == f, "flit order per input");
          check(xy_out(int'(f.dest)) == o, "XY output");
          if (owner[o] >= 0) check(owner[o] == src, "packet not interleaved");
          owner[o] = f.h_t ? -1 : src;
          delivered++;
        end
      end
    end
  end

  // Arbitration conflicts: a buffer with a flit that got no grant while its output was free.
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NPORTS; p++)
      if (dut.req_s[p].valid && !dut.gr_s[p]) n_conflict++;

  task automatic next_flit(input int p);
    int i;
    i = sent_idx[p];
    if (i % 5 == 0) cur_dest[p] = legal_dest(p);
    in_flit[p] = '{data: {3'(p), 8'(i)}, id: 4'(p), dest: cur_dest[p], pkt_clk: 1'(i), h_t: (i % 5 == 4)};
    sent_idx[p] = i + 1;
  endtask

  initial begin
    for (int p = 0; p < NPORTS; p++) begin owner[p] = -1; sent_idx[p] = 0; end
    in_valid = '0; in_flit = '0; out_ack = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // latency: one single-flit packet from the west input to the east output
    in_flit[P_W] = '{data: 11'h700, id: 4'd4, dest: 4'd7, pkt_clk: 1'b1, h_t: 1'b1};
    in_valid[P_W] = 1;
    @(negedge clk);
    in_valid[P_W] = 0;
    check(out_valid == 5'b00100 && out_flit[P_E] == '{data: 11'h700, id: 4'd4, dest: 4'd7, pkt_clk: 1'b1, h_t: 1'b1},
          "one-cycle hop to east");
    @(negedge clk);
    check(out_valid == 0 && flit_count == 1, "hop done, one flit counted");
    // random traffic
    running = 1;
    for (int c = 0; c < 6000; c++) begin
      if (c == 3000) pct_ack = 70;
      for (int p = 0; p < NPORTS; p++) begin
        if (!in_valid[p] || !in_ack[p]) begin
          if (in_valid[p] || $urandom_range(0, 9) < 7) begin
            in_valid[p] = 1;
            next_flit(p);
          end
        end
        out_ack[p] = ($urandom_range(0, 99) < pct_ack);
      end
      @(negedge clk);
    end
    // finish open packets, then drain
    while (1) begin
      bit busy;
      busy = 0;
      for (int p = 0; p < NPORTS; p++) begin
        if (!in_valid[p] || !in_ack[p]) begin
          if (sent_idx[p] % 5 != 0) begin in_valid[p] = 1; next_flit(p); busy = 1; end
          else in_valid[p] = 0;
        end else busy = 1;
      end
      out_ack = '0;
      @(negedge clk);
      if (!busy) break;
    end
    repeat (40) @(negedge clk);
    check(delivered == taken && delivered > 1000, $sformatf("all flits delivered (%0d of %0d)", delivered, taken));
    for (int p = 0; p < NPORTS; p++) check(expq[p].size() == 0, "no flit left behind");
    check(int'(flit_count) == taken + 1, "flit_count");
    check(n_full > 0, $sformatf("buffers filled and held senders (%0d)", n_full));
    check(n_conflict > 0, $sformatf("requests waited for an output (%0d)", n_conflict));
    $display("held by full buffer: %0d, waiting requests: %0d", n_full, n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
