// tb_flit_fifo: self-checking test of the router input buffer.
//
// Drives random writes (with the sender holding its flit while ack is high) and
// random grants, and compares head flit, request, ack and the order of the
// flits that leave with a queue model kept in the testbench. Also checks that
// the buffer fills at exactly 4 flits and that a flit written into an empty
// buffer is at the head one cycle later.
module tb_flit_fifo;
  import noc_pkg::*;

  logic  clk = 0, rst_n = 0;
  flit_t wr;
  logic  wr_valid, ack, grant;
  flit_t re;
  req_t  req;
  int    checks = 0, failures = 0;
  int    fills = 0;
  bit    do_push, do_pop;
  flit_t model [$];

  flit_fifo dut (.clk, .rst_n, .wr, .wr_valid, .ack, .re, .req, .grant);

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

  initial begin
    wr = '0; wr_valid = 0; grant = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!req.valid && !ack, "empty after reset");
    // latency: one flit into an empty buffer
    wr = '{data: 11'd77, id: 4'd3, dest: 4'd9, pkt_clk: 1'b1, h_t: 1'b0};
    wr_valid = 1;
    @(negedge clk);
    wr_valid = 0;
    check(req.valid && re.data == 11'd77 && req.dest == 4'd9 && !req.tail, "head one cycle after write");
    grant = 1;
    @(negedge clk);
    grant = 0;
    check(!req.valid, "empty after pop");
    // random traffic
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // model-side decisions, made before the edge
      if (!wr_valid || !ack) begin
        wr_valid = ($urandom_range(0, 99) < ((cyc / 500) % 2 ? 80 : 40));
        wr.data  = 11'($urandom);
        wr.id    = 4'($urandom);
        wr.dest  = 4'($urandom);
        wr.pkt_clk = 1'($urandom);
        wr.h_t   = 1'($urandom);
      end
      grant = req.valid && ($urandom_range(0, 99) < ((cyc / 500) % 2 ? 30 : 70));
      #1;
      check(ack == (model.size() == 4), "ack is full flag");
      check(req.valid == (model.size() != 0), "req.valid is not-empty");
      if (model.size() != 0) begin
        check(re == model[0], "head flit");
        check(req.dest == model[0].dest && req.tail == model[0].h_t, "request fields");
      end
      if (model.size() == 4) fills++;
      do_push = wr_valid && model.size() != 4;
      do_pop  = grant && model.size() != 0;
      @(posedge clk);
      if (do_pop) void'(model.pop_front());
      if (do_push) model.push_back(wr);
      @(negedge clk);
    end
    check(fills > 0, "buffer filled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
