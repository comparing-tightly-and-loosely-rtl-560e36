// tb_ring_counter: checks the rotating one-hot pointer against an integer
// model: reset position, hold while advance is low, step and wrap while it
// is high, for N = 3 (the synchronizer's size) and a second instance with
// N = 5 and a non-zero reset position.
`timescale 1ns/1ns
module tb_ring_counter;
  logic       clk = 1'b0, rst = 1'b1, adv = 1'b0;
  logic [2:0] p3;
  logic [4:0] p5;
  int         m3, m5, checks = 0, failures = 0;

  ring_counter dut3 (.clk(clk), .rst(rst), .advance(adv), .ptr(p3));
  ring_counter #(.N(5), .RESET_POS(2)) dut5 (.clk(clk), .rst(rst), .advance(adv), .ptr(p5));

  always #5 clk = ~clk;

  task automatic check();
    checks += 2;
    if (p3 !== 3'(1 << m3)) begin failures++; $display("FAIL N=3: %b expected slot %0d", p3, m3); end
    if (p5 !== 5'(1 << m5)) begin failures++; $display("FAIL N=5: %b expected slot %0d", p5, m5); end
  endtask

  initial begin
    #12; m3 = 0; m5 = 2; check();
    rst = 1'b0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      adv = ($urandom % 3) != 0;
      @(posedge clk); #1;
      if (adv) begin m3 = (m3 + 1) % 3; m5 = (m5 + 1) % 5; end
      check();
    end
    rst = 1'b1; #1; m3 = 0; m5 = 2; check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
