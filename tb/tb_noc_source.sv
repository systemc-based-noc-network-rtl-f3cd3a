// tb_noc_source: self-checking test of the traffic source.
//
// Source 2 sends to node 5 while the router side holds it off at random. Every
// flit taken is compared with the expected sequence: data 1000 + 3k (k-th flit,
// source id 2), id 2, the imaginary clock bit flipping on every flit, the tail
// bit on every fifth flit, and one destination per packet even when the
// traffic generator changes it in mid-packet. Also checked: a held flit does
// not change; one flit per cycle with no hold-off; one flit per three cycles
// with a tick every third cycle; the sum of header send times; run = 0 stops at a packet end; no packet to
// the node itself.
module tb_noc_source;
  import noc_pkg::*;

  logic        clk = 0, rst_n = 0, en, run, ack_in, valid_out;
  logic [3:0]  source_id, traffic_id;
  flit_t       packet_out;
  logic [31:0] pkt_snt, now = 0;
  logic [63:0] hdr_time_sum;
  longint      exp_sum = 0;
  int checks = 0, failures = 0;
  int k = 0;               // flits taken so far
  logic [3:0] pkt_dest;
  bit   exp_clk = 0;

  noc_source dut (.clk, .rst_n, .en, .run, .source_id, .traffic_id, .ack_in,
                  .packet_out, .valid_out, .pkt_snt, .now, .hdr_time_sum);
  always @(posedge clk) now <= now + 32'd7;   // any time base will do

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
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Checks every flit taken at a clock edge.
  flit_t held;
  bit    was_held = 0;
  always @(posedge clk) if (rst_n) begin
    if (valid_out && was_held) check(packet_out == held, "held flit unchanged");
    was_held <= valid_out && ack_in;
    held     <= packet_out;
    if (valid_out && !ack_in) begin
      if (k % 5 == 0) exp_sum += longint'(now);
      if (k % 5 == 0) begin
        pkt_dest = packet_out.dest;
        check(pkt_dest == 4'd5 || pkt_dest == 4'd7, "header destination from traffic generator");
      end
      exp_clk = !exp_clk;
      check(packet_out.data == 11'(1000 + 3 * (k + 1)), "data sequence");
      check(packet_out.id == 4'd2, "source id");
      check(packet_out.pkt_clk == exp_clk, "imaginary clock flips");
      check(packet_out.h_t == (k % 5 == 4), "tail every fifth flit");
      if (k % 5 != 0) check(packet_out.dest == pkt_dest, "one destination per packet");
      k++;
    end
  end

  initial begin
    source_id = 4'd2; traffic_id = 4'd5; en = 1; run = 1; ack_in = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // full rate: 20 cycles, no hold-off
    repeat (20) @(negedge clk);
    check(k >= 19 && k <= 20, $sformatf("one flit per cycle (%0d in 20)", k));
    // random hold-off and destination changes
    for (int c = 0; c < 2000; c++) begin
      ack_in = ($urandom_range(0, 2) == 0);
      if ($urandom_range(0, 6) == 0) traffic_id = ($urandom_range(0, 1) == 0) ? 4'd5 : 4'd7;
      @(negedge clk);
    end
    ack_in = 0; traffic_id = 4'd5;
    // stop at packet end
    run = 0;
    repeat (10) @(negedge clk);
    check(!valid_out && k % 5 == 0, "run = 0 stops after a tail");
    check(pkt_snt == 32'(k), "pkt_snt counts flits taken");
    check(hdr_time_sum == 64'(exp_sum), "sum of header send times");
    // own address: nothing sent
    run = 1; traffic_id = 4'd2;
    begin
      int k0;
      k0 = k;
      repeat (20) @(negedge clk);
      check(k == k0 && !valid_out, "no packet to itself");
    end
    // slow source clock: tick every third cycle
    traffic_id = 4'd5;
    begin
      int k0;
      k0 = k;
      for (int c = 0; c < 30; c++) begin
        en = (c % 3 == 0);
        @(negedge clk);
      end
      check(k - k0 >= 9 && k - k0 <= 10, $sformatf("one flit per tick (%0d in 30 cycles)", k - k0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
