// tb_noc_sink: self-checking test of the sink.
//
// Plays the router side: offers a flit only while ack_out is low, as the
// router does. Sends packets from two sources to sink 6, then flits with a
// wrong destination, a repeated imaginary clock bit and a source change inside
// a packet, and checks the flit, packet and error counts, the sum of tail
// arrival times and the last flit.
// Checks the rate: with its clock ticking every cycle the sink takes one flit
// every two cycles; with a tick every fourth cycle, one every four.
module tb_noc_sink;
  import noc_pkg::*;

  logic        clk = 0, rst_n = 0, en, valid_in, ack_out;
  logic [3:0]  sink_id;
  flit_t       packet_in, last_flit;
  logic [31:0] pkt_rcv, pkts_done, errors, now = 32'd100;
  logic [63:0] tail_time_sum;
  longint      exp_sum = 0;
  int checks = 0, failures = 0;

  noc_sink dut (.clk, .rst_n, .en, .sink_id, .packet_in, .valid_in, .ack_out,
                .pkt_rcv, .pkts_done, .errors, .last_flit, .now, .tail_time_sum);
  always @(posedge clk) begin
    if (valid_in && !ack_out && packet_in.h_t) exp_sum += longint'(now);
    now <= now + 32'd3;
  end

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

  // Sends one flit: waits until the sink is free, shows it for one cycle.
  // Returns the number of cycles it waited.
  task automatic send(input flit_t f, output int waited);
    waited = 0;
    while (ack_out) begin @(negedge clk); waited++; end
    packet_in = f; valid_in = 1;
    @(negedge clk);
    valid_in = 0;
  endtask

  task automatic send_packet(input logic [3:0] src, input logic [3:0] dst, inout bit clk_bit);
    int w;
    for (int i = 0; i < 5; i++) begin
      clk_bit = !clk_bit;
      send('{data: 11'(100 * src + i), id: src, dest: dst, pkt_clk: clk_bit, h_t: (i == 4)}, w);
    end
  endtask

  initial begin
    bit c1 = 0, c2 = 1;
    int w, t0;
    sink_id = 4'd6; en = 1; valid_in = 0; packet_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(!ack_out && pkt_rcv == 0, "idle after reset");
    send_packet(4'd1, 4'd6, c1);
    send_packet(4'd3, 4'd6, c2);
    send_packet(4'd1, 4'd6, c1);
    check(pkt_rcv == 15 && pkts_done == 3 && errors == 0, "three good packets");
    check(last_flit.id == 4'd1 && last_flit.h_t && last_flit.data == 11'd104, "last flit kept");
    // errors: wrong destination
    send('{data: 11'd1, id: 4'd1, dest: 4'd7, pkt_clk: 1'b0, h_t: 1'b1}, w);
    check(errors == 1, "wrong destination counted");
    // repeated imaginary clock bit inside a packet
    send('{data: 11'd2, id: 4'd1, dest: 4'd6, pkt_clk: 1'b0, h_t: 1'b0}, w);
    send('{data: 11'd3, id: 4'd1, dest: 4'd6, pkt_clk: 1'b0, h_t: 1'b0}, w);
    check(errors == 2, "repeated imaginary clock counted");
    // source change inside a packet
    send('{data: 11'd4, id: 4'd2, dest: 4'd6, pkt_clk: 1'b1, h_t: 1'b1}, w);
    check(errors == 3, "source change inside packet counted");
    check(pkts_done == 5 && pkt_rcv == 19, "counts after error flits");
    check(tail_time_sum == 64'(exp_sum) && exp_sum > 0, "sum of tail arrival times");
    // rate, tick every cycle: busy for exactly one cycle after each flit
    @(negedge clk);
    check(!ack_out, "free again");
    packet_in = '{data: 11'd9, id: 4'd4, dest: 4'd6, pkt_clk: 1'b0, h_t: 1'b1};
    valid_in = 1;
    @(negedge clk);
    valid_in = 0;
    check(ack_out, "busy right after a flit");
    @(negedge clk);
    check(!ack_out, "free one cycle later");
    // rate, tick every fourth cycle
    t0 = 0;
    fork
      forever begin @(negedge clk); t0++; en = (t0 % 4 == 0); end
    join_none
    begin
      int n0, c0;
      n0 = int'(pkt_rcv);
      c0 = t0;
      for (int i = 0; i < 10; i++)
        send('{data: 11'(i), id: 4'd4, dest: 4'd6, pkt_clk: 1'(i), h_t: 1'b1}, w);
      check(int'(pkt_rcv) - n0 == 10, "ten flits at slow clock");
      check(t0 - c0 >= 36 && t0 - c0 <= 41, $sformatf("one flit per four cycles (%0d cycles)", t0 - c0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
