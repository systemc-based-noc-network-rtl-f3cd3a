// tb_traffic_gen: checks the destination patterns of the traffic generator on
// a 4x4 and a 1x2 mesh: the fixed pattern, and that the uniform and
// neighbouring patterns are one-to-one, never send a node to itself, and that
// every neighbouring destination is one hop away.
module tb_traffic_gen;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  traffic_e mode;
  logic [FW-1:0] d44 [16];
  logic [FW-1:0] d12 [2];
  int checks = 0, failures = 0;

  traffic_gen #(.ROWS(4), .COLS(4), .XW(2)) u44 (.clk, .rst_n, .mode, .traffic_id(d44));
  traffic_gen #(.ROWS(1), .COLS(2), .XW(1)) u12 (.clk, .rst_n, .mode, .traffic_id(d12));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    mode = TRAFFIC_FIXED;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 16; n++) check(d44[n] == 4'd1, "fixed 4x4");
    check(d12[0] == 4'd1 && d12[1] == 4'd1, "fixed 1x2");
    // uniform
    mode = TRAFFIC_UNIFORM;
    @(negedge clk);
    begin
      int seen [16];
      foreach (seen[i]) seen[i] = 0;
      for (int n = 0; n < 16; n++) begin
        check(int'(d44[n]) != n, "uniform 4x4 not to itself");
        check(int'(d44[n]) == 15 - n, "uniform 4x4 mirrored node");
        seen[d44[n]]++;
      end
      foreach (seen[i]) check(seen[i] == 1, "uniform 4x4 one sender per sink");
    end
    check(d12[0] == 4'd1 && d12[1] == 4'd0, "uniform 1x2");
    // neighbour
    mode = TRAFFIC_NEIGHBOUR;
    @(negedge clk);
    begin
      int seen [16];
      foreach (seen[i]) seen[i] = 0;
      for (int n = 0; n < 16; n++) begin
        int dx, dy;
        dx = int'(d44[n]) % 4 - n % 4;
        dy = int'(d44[n]) / 4 - n / 4;
        check((dx * dx + dy * dy) == 1, "neighbour 4x4 one hop");
        seen[d44[n]]++;
      end
      foreach (seen[i]) check(seen[i] == 1, "neighbour 4x4 one sender per sink");
    end
    check(d12[0] == 4'd1 && d12[1] == 4'd0, "neighbour 1x2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
