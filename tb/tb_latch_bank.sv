// tb_latch_bank: checks the latch bank's write rule. With clk low and we
// high, the latch chosen by en follows d (transparent) while the others
// hold; raising clk, lowering we or moving en closes it, and it keeps its
// value while d changes. Reset clears every latch. Expected values come
// from an array model updated only where the rule allows a write.
`timescale 1ns/1ns
module tb_latch_bank;
  localparam int N = 3, W = 8;
  logic         clk = 1'b1, rst = 1'b1, we = 1'b0;
  logic [N-1:0] en = 3'b001;
  logic [W-1:0] d = '0;
  logic [W-1:0] q [N];
  logic [W-1:0] m [N];
  int           checks = 0, failures = 0;

  latch_bank #(.N(N), .W(W)) dut (.clk(clk), .rst(rst), .we(we), .en(en), .d(d), .q(q));

  task automatic check(string what);
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (q[i] !== m[i]) begin failures++; $display("FAIL %s: q[%0d]=%h expected %h", what, i, q[i], m[i]); end
    end
  endtask

  initial begin
    #1;
    for (int i = 0; i < N; i++) m[i] = '0;
    check("reset");
    rst = 1'b0;
    for (int k = 0; k < 300; k++) begin
      clk = $urandom % 2;
      we  = $urandom % 2;
      en  = 3'(1 << ($urandom % N));
      d   = W'($urandom);
      for (int i = 0; i < N; i++) if (we && en[i] && !clk) m[i] = d;
      check("step");
    end
    rst = 1'b1;
    for (int i = 0; i < N; i++) m[i] = '0;
    check("reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
