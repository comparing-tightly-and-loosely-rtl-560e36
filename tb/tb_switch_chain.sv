// tb_switch_chain: two default switches joined by a mesochronous link.
//
// Switch A runs on clk_a (10 ns period); switch B runs on clk_b, the same
// clock delayed by a skew that the test steps through 2, 5 and 8 ns.
// A's output 0 drives B's input 0: A's forwarded clock out_strobe[0] is
// B's in_strobe[0], and B's in_stall[0] is A's out_stall[0], so the link
// crosses from A's clock domain into B's through B's tightly coupled
// input port. Four senders (strobes 0, 3, 6 and 9 ns after clk_a) send
// packets of 1..4 flits into A, all routed to A's output 0 (route bits
// 1:0 = 0) and on to a random output of B (route bits 3:2). The senders
// contend for A's output 0, and B's outputs stall at random. Every flit
// leaving B is checked against a scoreboard per (B output, sender), with
// the head flit's route shifted by both switches.
`timescale 1ns/1ns
module tb_switch_chain;
  import noc_pkg::*;

  localparam int NP = 4;
  localparam int SKEW [NP] = '{0, 3, 6, 9};

  logic          clk_a = 1'b0, clk_b = 1'b0, rst = 1'b1;
  logic [NP-1:0] in_strobe = '0, in_valid, in_stall;
  flit_t         in_flit [NP];
  logic [NP-1:0] a_out_strobe, a_out_valid, a_out_stall;
  flit_t         a_out_flit [NP];
  logic [NP-1:0] b_in_strobe, b_in_valid, b_in_stall;
  flit_t         b_in_flit [NP];
  logic [NP-1:0] b_out_strobe, b_out_valid, b_out_stall;
  flit_t         b_out_flit [NP];

  noc_switch u_a (
    .clk(clk_a), .rst(rst),
    .in_strobe(in_strobe), .in_valid(in_valid), .in_flit(in_flit), .in_stall(in_stall),
    .out_strobe(a_out_strobe), .out_valid(a_out_valid), .out_flit(a_out_flit), .out_stall(a_out_stall)
  );

  // Link A.out0 -> B.in0; B's other inputs idle, A's other outputs unused.
  always_comb begin
    b_in_strobe = '0;
    b_in_valid  = '0;
    for (int i = 0; i < NP; i++) b_in_flit[i] = '0;
    b_in_strobe[0] = a_out_strobe[0];
    b_in_valid[0]  = a_out_valid[0];
    b_in_flit[0]   = a_out_flit[0];
    a_out_stall    = {{(NP-1){1'b0}}, b_in_stall[0]};
  end

  noc_switch u_b (
    .clk(clk_b), .rst(rst),
    .in_strobe(b_in_strobe), .in_valid(b_in_valid), .in_flit(b_in_flit), .in_stall(b_in_stall),
    .out_strobe(b_out_strobe), .out_valid(b_out_valid), .out_flit(b_out_flit), .out_stall(b_out_stall)
  );

  int unsigned t = 0;
  int          skew_b = 2;
  always begin
    #1 t++;
    clk_a = (t % 10) >= 5;
    clk_b = ((t + 10 - skew_b) % 10) >= 5;
    for (int i = 0; i < NP; i++) in_strobe[i] = ((t + 10 - SKEW[i]) % 10) >= 5;
  end

  int    checks = 0, failures = 0, link_stalls = 0;
  int    pkts_left [NP], flits_left [NP], cur_dest [NP], n_sent [NP], n_recv [NP], rx_src [NP];
  flit_t exp_q [NP][NP][$];

  for (genvar i = 0; i < NP; i++) begin : g_send
    always @(posedge in_strobe[i]) begin
      if (rst) begin
        in_valid[i]   <= 1'b0;
        in_flit[i]    <= '0;
        flits_left[i] = 0;
      end else begin
        if (in_valid[i] && !in_stall[i]) begin
          flit_t e;
          e = in_flit[i];
          if (e.head) e.data = e.data >> 4;
          exp_q[cur_dest[i]][i].push_back(e);
          n_sent[i]++;
          flits_left[i]--;
        end
        if (!(in_valid[i] && in_stall[i])) begin
          flit_t f;
          bit    go;
          f  = '0;
          go = 1'b0;
          if (flits_left[i] > 0) begin
            f.data = $urandom;
            go = ($urandom % 100) < 85;
          end else if (pkts_left[i] > 0 && ($urandom % 100) < 50) begin
            flits_left[i] = 1 + int'($urandom % 4);
            cur_dest[i]   = int'($urandom % NP);
            pkts_left[i]--;
            f.head = 1'b1;
            f.data = {2'(i), 26'($urandom), 2'(cur_dest[i]), 2'd0};
            go = 1'b1;
          end
          if (go) f.tail = (flits_left[i] == 1);
          in_valid[i] <= go;
          in_flit[i]  <= f;
        end
      end
    end
  end

  always @(posedge clk_a)
    if (!rst && a_out_valid[0] && b_in_stall[0]) link_stalls++;

  always @(posedge clk_b) begin
    if (rst) b_out_stall <= '0;
    else begin
      for (int o = 0; o < NP; o++) begin
        if (b_out_valid[o] && !b_out_stall[o]) begin
          flit_t f, e;
          f = b_out_flit[o];
          if (f.head) rx_src[o] = int'(f.data[27:26]);
          checks++;
          if (exp_q[o][rx_src[o]].size() == 0) begin
            failures++; $display("FAIL B out %0d: unexpected %h", o, f);
          end else begin
            e = exp_q[o][rx_src[o]].pop_front();
            if (f !== e) begin failures++; $display("FAIL B out %0d: got %h expected %h", o, f, e); end
          end
          n_recv[o]++;
        end
        b_out_stall[o] <= ($urandom % 100) < 40;
      end
    end
  end

  function automatic int sum(int a [NP]);
    int s = 0;
    foreach (a[k]) s += a[k];
    return s;
  endfunction

  initial begin
    foreach (SKEW[k]) begin
      n_sent[k] = 0; n_recv[k] = 0; rx_src[k] = 0; cur_dest[k] = 0; pkts_left[k] = 0;
    end
    for (int r = 0; r < 3; r++) begin
      int guard = 0;
      rst = 1'b1;
      skew_b = 2 + 3 * r;
      repeat (3) @(posedge clk_a);
      #2 rst = 1'b0;
      for (int i = 0; i < NP; i++) pkts_left[i] = 60;
      while ((sum(pkts_left) > 0 || sum(flits_left) > 0 || sum(n_sent) != sum(n_recv)) && guard < 20000) begin
        @(posedge clk_a);
        guard++;
      end
      repeat (10) @(posedge clk_a);
      for (int o = 0; o < NP; o++)
        for (int i = 0; i < NP; i++) begin
          checks++;
          if (exp_q[o][i].size() != 0) begin
            failures++; $display("FAIL skew %0d: %0d flits from %0d to B out %0d lost", skew_b, exp_q[o][i].size(), i, o);
          end
        end
    end
    checks++;
    if (link_stalls == 0) begin failures++; $display("FAIL: the link between the switches never stalled"); end
    $display("flits through both switches: %0d, link stall cycles: %0d", sum(n_recv), link_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
