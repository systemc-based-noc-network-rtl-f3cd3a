// tb_noc_crossbar: self-checking test of the 5x5 crossbar.
//
// Each step draws a random permutation of outputs, gives a random subset of the
// inputs a distinct output (skipping U-turns) through the 15-bit select word,
// and checks every output's flit and valid against the expected connection.
module tb_noc_crossbar;
  import noc_pkg::*;

  flit_t [NPORTS-1:0] in_flit, out_flit;
  logic  [NPORTS-1:0] in_valid, out_valid;
  logic  [SEL_W-1:0]  config_sel;
  int checks = 0, failures = 0;
  int paths [NPORTS][NPORTS];

  noc_crossbar dut (.in_flit, .in_valid, .config_sel, .out_flit, .out_valid);

  initial begin
    #1000000;
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
    foreach (paths[i, o]) paths[i][o] = 0;
    for (int t = 0; t < 3000; t++) begin
      int perm [NPORTS];
      int src_of [NPORTS];
      for (int i = 0; i < NPORTS; i++) begin perm[i] = i; src_of[i] = -1; end
      for (int i = NPORTS - 1; i > 0; i--) begin
        int j, tmp;
        j = $urandom_range(0, i);
        tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
      end
      config_sel = '0;
      in_valid   = '0;
      for (int i = 0; i < NPORTS; i++) begin
        in_flit[i] = flit_t'($urandom);
        if (perm[i] != i && $urandom_range(0, 3) != 0) begin
          in_valid[i] = 1'b1;
          config_sel[3*i +: 3] = 3'(perm[i] + 1);
          src_of[perm[i]] = i;
        end else if ($urandom_range(0, 1) == 1) begin
          config_sel[3*i +: 3] = 3'($urandom_range(1, 5));  // ignored: input not valid
        end
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        if (src_of[o] >= 0) begin
          check(out_valid[o] && out_flit[o] == in_flit[src_of[o]], "routed flit");
          paths[src_of[o]][o]++;
        end else begin
          check(!out_valid[o], "idle output");
        end
      end
      #9;
    end
    foreach (paths[i, o]) if (i != o) check(paths[i][o] > 0, $sformatf("path %0d->%0d used", i, o));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
