// tb_tc_input_port: self-checking test of the tightly coupled mesochronous
// input port.
//
// The switch clock and the sender's strobe have the same 10 ns period; the
// strobe lags the switch clock by a skew that the test steps through
// 0..9 ns, i.e. 0..90% of the period (a lag of 90% is the same as the
// strobe leading by 10%). At 0 and 50% edges of the two clocks fall in
// the same instant. For each
// skew the sender offers a numbered flit sequence, randomly idle, and
// obeys in_stall; the receiver pops the head flit at random. Every popped
// flit is compared with the sequence (nothing lost, nothing repeated,
// order kept). A run with both sides always ready checks the rate: one
// flit per switch cycle, with no stall. Random runs must show the port
// stalling the sender at least once.
`timescale 1ns/1ns
module tb_tc_input_port;
  import noc_pkg::*;

  logic  clk = 1'b0, strobe = 1'b0, rst = 1'b1;
  logic  in_valid, in_stall, rx_valid, rx_pop, pop_en;
  flit_t in_flit, rx_flit;

  int unsigned t = 0;
  int          skew = 0;
  int          checks = 0, failures = 0;
  int          n_total, p_send, p_recv;
  int          sent, recv, stalls;
  longint      cyc = 0, first_pop, last_pop;

  tc_input_port dut (
    .clk(clk), .rst(rst),
    .in_strobe(strobe), .in_valid(in_valid), .in_flit(in_flit), .in_stall(in_stall),
    .rx_valid(rx_valid), .rx_flit(rx_flit), .rx_pop(rx_pop)
  );

  // Both clocks from one time base: clk rises at 5 mod 10, strobe skew later.
  always begin
    #1 t++;
    clk    = (t % 10) >= 5;
    strobe = ((t + 10 - skew) % 10) >= 5;
  end

  function automatic flit_t make_flit(int id);
    flit_t f;
    f.data = 32'(id) * 32'h9e37_79b1 ^ 32'(skew);
    f.head = id[0];
    f.tail = id[1];
    return f;
  endfunction

  // Sender, strobe domain, stall/go.
  always @(posedge strobe) begin
    if (rst) begin
      in_valid <= 1'b0;
      in_flit  <= '0;
      sent     <= 0;
    end else begin
      int nxt;
      nxt = sent;
      if (in_valid && !in_stall) nxt = sent + 1;
      if (in_valid && in_stall) stalls++;
      sent <= nxt;
      if (!(in_valid && in_stall)) begin
        in_valid <= (nxt < n_total) && (($urandom % 100) < p_send);
        in_flit  <= make_flit(nxt);
      end
    end
  end

  // Receiver, switch domain.
  assign rx_pop = rx_valid && pop_en;

  always @(posedge clk) begin
    cyc++;
    if (rst) begin
      pop_en <= 1'b0;
      recv   <= 0;
    end else begin
      if (rx_pop) begin
        checks++;
        if (rx_flit !== make_flit(recv)) begin
          failures++;
          $display("FAIL skew=%0d flit %0d: got %h expected %h", skew, recv, rx_flit, make_flit(recv));
        end
        if (recv == 0) first_pop = cyc;
        last_pop = cyc;
        recv <= recv + 1;
      end
      pop_en <= ($urandom % 100) < p_recv;
    end
  end

  task automatic run(int sk, int ps, int pr, int n, bit check_rate);
    rst = 1'b1;
    skew = sk; p_send = ps; p_recv = pr; n_total = n; stalls = 0;
    repeat (3) @(posedge clk);
    #2 rst = 1'b0;
    checks++;
    if (rx_valid) begin failures++; $display("FAIL skew=%0d: valid right after reset", sk); end
    while (recv < n) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (recv != n || sent != n) begin
      failures++;
      $display("FAIL skew=%0d: sent %0d received %0d of %0d", sk, sent, recv, n);
    end
    if (check_rate) begin
      checks++;
      if (last_pop - first_pop != longint'(n - 1) || stalls != 0) begin
        failures++;
        $display("FAIL skew=%0d: %0d flits took %0d cycles, %0d stalls", sk, n, last_pop - first_pop + 1, stalls);
      end
    end
  endtask

  int total_stalls = 0;

  initial begin
    for (int sk = 0; sk < 10; sk++) begin
      run(sk, 100, 100, 60, 1'b1);
      run(sk, 90, 40, 150, 1'b0);
      total_stalls += stalls;
      run(sk, 40, 90, 100, 1'b0);
    end
    checks++;
    if (total_stalls == 0) begin failures++; $display("FAIL: the port never stalled the sender"); end
    $display("stall cycles seen by the sender: %0d", total_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
