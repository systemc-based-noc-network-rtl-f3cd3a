// tb_noc_arbiter: self-checking test of route computation and wormhole
// switch allocation.
//
// Directed part: every destination of a 4x4 mesh seen from router (1,2) must be
// routed to the XY direction worked out from the coordinates; a busy receiver
// blocks a grant; input 0 wins over input 3 for the same output; a packet
// holds its output from header to tail against other inputs. Random part:
// random requests and busy flags, compared cycle by cycle with a reference
// model of the allocation rules kept in the testbench.
module tb_noc_arbiter;
  import noc_pkg::*;

  logic                clk = 0, rst_n = 0;
  logic [FW-1:0]       arbiter_id;
  req_t  [NPORTS-1:0]  req;
  logic  [NPORTS-1:0]  free_out, grant;
  logic  [SEL_W-1:0]   aselect;
  int checks = 0, failures = 0;

  noc_arbiter #(.XW(2), .YW(2)) dut (.clk, .rst_n, .arbiter_id, .req, .free_out, .grant, .aselect);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // Reference route: compare columns first, then rows.
  function automatic int ref_route(input int id, input int dest);
    int ix = id % 4, iy = id / 4, dx = dest % 4, dy = dest / 4;
    if (dx > ix) return 3;
    if (dx < ix) return 5;
    if (dy > iy) return 4;
    if (dy < iy) return 2;
    return 1;
  endfunction

  // Reference model state
  bit m_conn [NPORTS];
  int m_route [NPORTS];
  bit m_res [NPORTS];

  task automatic idle();
    req = '0; free_out = '0;
  endtask

  initial begin
    arbiter_id = 4'd9;  // x = 1, y = 2
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. routing of single-flit packets on input 2
    for (int d = 0; d < 16; d++) begin
      idle();
      req[2] = '{valid: 1'b1, dest: 4'(d), tail: 1'b1};
      #1;
      if (ref_route(9, d) == 3) begin
        check(grant == 5'b0, "no U-turn to east from east input");
      end else begin
        check(grant == 5'b00100, "grant single request");
        check(aselect[8:6] == 3'(ref_route(9, d)), $sformatf("route to %0d", d));
        check(aselect[5:0] == 0 && aselect[14:9] == 0, "other select fields zero");
      end
      @(negedge clk);
    end
    // 2. busy receiver blocks the grant
    idle();
    req[0] = '{valid: 1'b1, dest: 4'd11, tail: 1'b1};  // east
    free_out[2] = 1'b1;
    #1 check(grant == 0, "busy output not granted");
    free_out[2] = 1'b0;
    #1 check(grant == 5'b00001 && aselect[2:0] == 3'd3, "free output granted");
    @(negedge clk);
    // 3. fixed priority
    idle();
    req[0] = '{valid: 1'b1, dest: 4'd8, tail: 1'b1};   // west
    req[3] = '{valid: 1'b1, dest: 4'd8, tail: 1'b1};   // west
    #1 check(grant == 5'b00001, "input 0 wins");
    @(negedge clk);
    // 4. wormhole: input 1 reserves south with a header, input 0 waits
    idle();
    req[1] = '{valid: 1'b1, dest: 4'd13, tail: 1'b0};  // south
    #1 check(grant == 5'b00010 && aselect[5:3] == 3'd4, "header granted");
    @(negedge clk);
    req[0] = '{valid: 1'b1, dest: 4'd13, tail: 1'b1};
    req[1] = '{valid: 1'b1, dest: 4'd0,  tail: 1'b0};   // body: destination ignored
    #1 check(grant == 5'b00010 && aselect[5:3] == 3'd4, "body follows stored route, output held");
    @(negedge clk);
    req[1] = '{valid: 1'b0, dest: 4'd0, tail: 1'b0};
    #1 check(grant == 5'b00000, "reserved output idle while packet stalls");
    @(negedge clk);
    req[1] = '{valid: 1'b1, dest: 4'd0, tail: 1'b1};
    #1 check(grant == 5'b00010 && aselect[5:3] == 3'd4, "tail follows stored route");
    @(negedge clk);
    req[1] = '0;
    #1 check(grant == 5'b00001 && aselect[2:0] == 3'd4, "output free after tail");
    @(negedge clk);
    // 5. random against the reference model; all packets start from clean state
    idle();
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int i = 0; i < NPORTS; i++) begin m_conn[i] = 0; m_res[i] = 0; m_route[i] = 0; end
    for (int cyc = 0; cyc < 5000; cyc++) begin
      bit [NPORTS-1:0] exp_grant, v_free;
      int r [NPORTS];
      for (int i = 0; i < NPORTS; i++) begin
        req[i].valid = ($urandom_range(0, 3) != 0);
        req[i].dest  = 4'($urandom);
        req[i].tail  = ($urandom_range(0, 3) == 0);
        free_out[i]  = ($urandom_range(0, 4) == 0);
      end
      v_free = ~free_out;
      exp_grant = '0;
      for (int i = 0; i < NPORTS; i++) begin
        r[i] = m_conn[i] ? m_route[i] : ref_route(9, int'(req[i].dest));
        if (req[i].valid && r[i] != i + 1 && v_free[r[i]-1] && (m_conn[i] || !m_res[r[i]-1])) begin
          exp_grant[i] = 1;
          v_free[r[i]-1] = 0;
        end
      end
      #1;
      check(grant == exp_grant, "grant matches model");
      for (int i = 0; i < NPORTS; i++)
        if (grant[i]) check(int'(aselect[3*i +: 3]) == r[i], "select matches model");
      if (grant != exp_grant) begin
        // resynchronise after a mismatch
        @(negedge clk);
        rst_n = 0; @(negedge clk); rst_n = 1;
        for (int i = 0; i < NPORTS; i++) begin m_conn[i] = 0; m_res[i] = 0; end
        continue;
      end
      for (int i = 0; i < NPORTS; i++) begin
        if (exp_grant[i]) begin
          if (req[i].tail) begin m_conn[i] = 0; m_res[r[i]-1] = 0; end
          else begin m_conn[i] = 1; m_route[i] = r[i]; m_res[r[i]-1] = 1; end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
