// tb_crossbar: random flits and random one-hot (or empty) grant rows; each
// output must carry exactly the flit of its granted input and be valid
// only when some input is granted.
`timescale 1ns/1ns
module tb_crossbar;
  import noc_pkg::*;
  localparam int NI = 4, NO = 4;
  flit_t          in_flit [NI];
  logic  [NI-1:0] sel [NO];
  flit_t          out_flit [NO];
  logic  [NO-1:0] out_valid;
  int             checks = 0, failures = 0;

  crossbar #(.NI(NI), .NO(NO)) dut (.in_flit(in_flit), .sel(sel), .out_flit(out_flit), .out_valid(out_valid));

  initial begin
    for (int k = 0; k < 500; k++) begin
      int g [NO];
      for (int i = 0; i < NI; i++) in_flit[i] = {2'($urandom), 32'($urandom)};
      for (int o = 0; o < NO; o++) begin
        g[o]   = int'($urandom % (NI + 1)) - 1;   // -1: no grant
        sel[o] = (g[o] < 0) ? '0 : NI'(1 << g[o]);
      end
      #1;
      for (int o = 0; o < NO; o++) begin
        checks++;
        if (out_valid[o] !== (g[o] >= 0) || (g[o] >= 0 && out_flit[o] !== in_flit[g[o]])) begin
          failures++;
          $display("FAIL out %0d grant %0d: valid %b flit %h", o, g[o], out_valid[o], out_flit[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
