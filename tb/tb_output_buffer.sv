// tb_output_buffer: random pushes (only when not full) and random stalls
// from the next hop, checked against a queue model: full exactly at DEPTH
// flits, out_valid exactly when non-empty, flits leave in order. A run
// without stalls checks one flit per cycle and a one-edge latency.
`timescale 1ns/1ns
module tb_output_buffer;
  import noc_pkg::*;
  logic  clk = 1'b0, rst = 1'b1, push = 1'b0, full, out_valid, out_stall = 1'b0;
  flit_t push_flit = '0, out_flit;
  flit_t model [$];
  int    checks = 0, failures = 0, p_push = 70, p_stall = 40;

  output_buffer dut (.clk(clk), .rst(rst), .push(push), .push_flit(push_flit), .full(full),
                     .out_valid(out_valid), .out_flit(out_flit), .out_stall(out_stall));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (full !== (model.size() == 2) || out_valid !== (model.size() != 0) ||
          (model.size() != 0 && out_flit !== model[0])) begin
        failures++;
        $display("FAIL: full %b valid %b flit %h, model holds %0d", full, out_valid, out_flit, model.size());
      end
      if (out_valid && !out_stall) void'(model.pop_front());
      if (push && !full) model.push_back(push_flit);
    end
  end

  always @(negedge clk) begin
    push      <= (($urandom % 100) < p_push) && !full;
    push_flit <= {2'($urandom), 32'($urandom)};
    out_stall <= ($urandom % 100) < p_stall;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    repeat (1000) @(posedge clk);
    // Full rate: push every cycle, never stalled; the flit pushed at one
    // edge must be on the output after that edge.
    p_push = 100; p_stall = 0;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 50; k++) begin
      flit_t pushed;
      @(negedge clk); #1;
      pushed = push_flit;
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_flit !== pushed) begin
        failures++;
        $display("FAIL rate: %h not on the output one edge after its push", pushed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
