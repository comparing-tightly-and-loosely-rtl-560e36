// tb_meso_ctrl_sync: the backward flow-control synchronizer on its own.
// The strobe lags the receiver clock by 3 or 7 ns of a 10 ns period. The
// test keeps the true number of occupied slots (pushes minus pops). The
// sender pushes whenever tx_go allows and it has a flit; the receiver pops
// at random while a flit is held. Checked at every strobe edge: tx_go is
// never high while all three slots are occupied (no overwrite). With both
// sides always ready the sender must push on every strobe cycle.
`timescale 1ns/1ns
module tb_meso_ctrl_sync;
  logic clk = 1'b0, strobe = 1'b0, rst = 1'b1;
  logic push, pop, tx_go, want, pop_en;
  int unsigned t = 0;
  int   skew = 3, checks = 0, failures = 0, occ = 0, n_push = 0, stalled = 0;

  meso_ctrl_sync dut (.rst(rst), .rx_clk(clk), .rx_pop(pop), .tx_clk(strobe), .tx_push(push), .tx_go(tx_go));

  always begin
    #1 t++;
    clk    = (t % 10) >= 5;
    strobe = ((t + 10 - skew) % 10) >= 5;
  end

  int p_want = 100, p_pop = 100;
  assign push = want && tx_go;
  assign pop  = pop_en && (occ > 0);

  always @(posedge strobe) begin
    if (rst) want <= 1'b0;
    else begin
      checks++;
      if (tx_go && occ >= 3) begin failures++; $display("FAIL: go with %0d slots occupied", occ); end
      if (want && !tx_go) stalled++;
      if (push) begin occ++; n_push++; end
      want <= ($urandom % 100) < p_want;
    end
  end

  always @(posedge clk) begin
    if (rst) pop_en <= 1'b0;
    else begin
      if (pop) occ--;
      pop_en <= ($urandom % 100) < p_pop;
    end
  end

  task automatic run(int sk, int pw, int pp, bit rate);
    int n_start;
    rst = 1'b1; skew = sk; p_want = pw; p_pop = pp; occ = 0; stalled = 0;
    repeat (3) @(posedge clk);
    #2 rst = 1'b0;
    repeat (20) @(posedge strobe);
    n_start = n_push;
    repeat (200) @(posedge strobe);
    if (rate) begin
      checks++;
      if (n_push - n_start != 200 || stalled != 0) begin
        failures++; $display("FAIL rate skew %0d: %0d pushes in 200 cycles", sk, n_push - n_start);
      end
    end else begin
      checks++;
      if (stalled == 0) begin failures++; $display("FAIL: sender never held back at skew %0d", sk); end
    end
  endtask

  initial begin
    run(3, 100, 100, 1'b1);
    run(3, 90, 30, 1'b0);
    run(7, 100, 100, 1'b1);
    run(7, 90, 30, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
