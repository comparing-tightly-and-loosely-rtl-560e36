// tb_meso_data_sync: the data half of the synchronizer on its own. The
// sender's strobe lags the receiver clock by a skew (3 and 7 ns of a
// 10 ns period). The test itself plays the flow control: it pushes only
// while fewer than three flits are in the latches, counting pushes and
// pops. The receiver pops the head flit at random. Checked: rx_valid is
// high exactly when a flit is held (at receiver edges, away from the
// strobe edges), popped flits come out in order and unaltered, and with
// both sides always ready one flit leaves per receiver cycle.
`timescale 1ns/1ns
module tb_meso_data_sync;
  import noc_pkg::*;
  logic  clk = 1'b0, strobe = 1'b0, rst = 1'b1;
  logic  push, rx_valid, rx_pop, pop_en;
  flit_t tx_flit, rx_flit;
  int unsigned t = 0;
  int    skew = 3, checks = 0, failures = 0;
  int    n_push, n_pop, p_push, p_pop, limit;
  longint cyc = 0, first_pop, last_pop;

  meso_data_sync dut (.rst(rst), .tx_clk(strobe), .tx_push(push), .tx_flit(tx_flit),
                      .rx_clk(clk), .rx_valid(rx_valid), .rx_flit(rx_flit), .rx_pop(rx_pop));

  always begin
    #1 t++;
    clk    = (t % 10) >= 5;
    strobe = ((t + 10 - skew) % 10) >= 5;
  end

  function automatic flit_t mk(int id);
    return {id[0], id[2], 32'(id) * 32'h0101_0107 + 32'h55};
  endfunction

  always @(posedge strobe) begin
    if (rst) begin
      push <= 1'b0; n_push <= 0; tx_flit <= '0;
    end else begin
      int np;
      np = n_push + (push ? 1 : 0);
      n_push <= np;
      push    <= (np - n_pop < 3) && (np < limit) && (($urandom % 100) < p_push);
      tx_flit <= mk(np);
    end
  end

  assign rx_pop = rx_valid && pop_en;

  always @(posedge clk) begin
    cyc++;
    if (rst) begin
      n_pop <= 0; pop_en <= 1'b0;
    end else begin
      checks++;
      if (rx_valid !== ((n_push - n_pop + ((push && !strobe) ? 1 : 0)) > 0)) begin
        failures++;
        $display("FAIL: rx_valid %b with %0d pushed, %0d popped", rx_valid, n_push, n_pop);
      end
      if (rx_pop) begin
        checks++;
        if (rx_flit !== mk(n_pop)) begin
          failures++; $display("FAIL: flit %0d is %h, expected %h", n_pop, rx_flit, mk(n_pop));
        end
        if (n_pop == 0) first_pop = cyc;
        last_pop = cyc;
        n_pop <= n_pop + 1;
      end
      pop_en <= ($urandom % 100) < p_pop;
    end
  end

  task automatic run(int sk, int pp, int pq, int n, bit rate);
    rst = 1'b1; skew = sk; p_push = pp; p_pop = pq; limit = n;
    repeat (3) @(posedge clk);
    #2 rst = 1'b0;
    while (n_pop < n) @(posedge clk);
    repeat (4) @(posedge clk);
    checks++;
    if (n_pop != n || n_push != n) begin failures++; $display("FAIL: %0d pushed %0d popped", n_push, n_pop); end
    if (rate) begin
      checks++;
      if (last_pop - first_pop != longint'(n - 1)) begin
        failures++; $display("FAIL rate skew %0d: %0d flits in %0d cycles", sk, n, last_pop - first_pop + 1);
      end
    end
  endtask

  initial begin
    run(3, 100, 100, 50, 1'b1);
    run(3, 70, 50, 300, 1'b0);
    run(7, 100, 100, 50, 1'b1);
    run(7, 50, 70, 300, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
