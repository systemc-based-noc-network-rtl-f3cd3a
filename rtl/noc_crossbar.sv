// noc_crossbar: 5x5 switch of the router.
//
// Each input i carries the head flit of input buffer i; when in_valid[i] is set
// (the arbiter granted that input) the flit goes to the output whose code
// (1 = local ... 5 = west, output index = code - 1) is in bits 3i+2..3i of the
// select word config. An output is driven by at most one input per cycle,
// which the arbiter guarantees; an input never goes back out of its own port.
// Purely combinational: a granted flit appears on its output in the same cycle.
//
// Follows the original crossbar's select word (three bits per input, fifteen in
// all) and its set of legal input-to-output paths. An explicit valid per
// output replaces the change event that marked a new flit in the original.
module noc_crossbar
  import noc_pkg::*;
(
  input  flit_t [NPORTS-1:0] in_flit,
  input  logic  [NPORTS-1:0] in_valid,
  input  logic  [SEL_W-1:0]  config_sel,
  output flit_t [NPORTS-1:0] out_flit,
  output logic  [NPORTS-1:0] out_valid
);

  always_comb begin
    out_flit  = '0;
    out_valid = '0;
    for (int o = 0; o < NPORTS; o++) begin
      for (int i = 0; i < NPORTS; i++) begin
        if (i != o && in_valid[i] && config_sel[3*i +: 3] == 3'(o + 1)) begin
          out_flit[o]  = in_flit[i];
          out_valid[o] = 1'b1;
        end
      end
    end
  end

endmodule
