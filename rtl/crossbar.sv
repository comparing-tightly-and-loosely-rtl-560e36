// crossbar: connects the switch inputs to its outputs.
//
// For every output o the one-hot grant row sel[o] chooses one input flit;
// out_valid[o] is high when some input is granted to o. Purely
// combinational. The crossbar is only named in the switch drawings; an
// AND-OR mux per output is this design's choice.
//
// Interface: in_flit[NI], sel[NO] (NI bits each) -> out_flit[NO],
// out_valid[NO].
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned NI = 4,
  parameter int unsigned NO = 4
) (
  input  flit_t          in_flit [NI],
  input  logic  [NI-1:0] sel     [NO],
  output flit_t          out_flit [NO],
  output logic  [NO-1:0] out_valid
);

  always_comb begin
    for (int o = 0; o < NO; o++) begin
      out_flit[o]  = '0;
      out_valid[o] = |sel[o];
      for (int i = 0; i < NI; i++)
        if (sel[o][i]) out_flit[o] = out_flit[o] | in_flit[i];
    end
  end

endmodule
