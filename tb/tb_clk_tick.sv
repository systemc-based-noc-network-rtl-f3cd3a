// tb_clk_tick: checks that clk_tick gives one tick every DIV cycles, for
// DIV = 1, 3 and 4, starting in the first cycle after reset.
module tb_clk_tick;
  logic clk = 0, rst_n = 0;
  logic t1, t3, t4;
  int checks = 0, failures = 0;

  clk_tick #(.DIV(1)) u1 (.clk, .rst_n, .tick(t1));
  clk_tick #(.DIV(3)) u3 (.clk, .rst_n, .tick(t3));
  clk_tick #(.DIV(4)) u4 (.clk, .rst_n, .tick(t4));

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
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 60; c++) begin
      check(t1 == 1'b1, "DIV=1 ticks every cycle");
      check(t3 == (c % 3 == 0), "DIV=3 tick pattern");
      check(t4 == (c % 4 == 0), "DIV=4 tick pattern");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
