// tb_noc_switch_mixed: end-to-end test of a switch that mixes port types.
//
// Inputs 0 and 2 are synchronous (2-slot flip-flop input buffers, their
// senders clocked by the switch clock itself); inputs 1 and 3 are
// mesochronous, with senders whose strobes lag the switch clock by 3 and
// 9 ns. Traffic, scoreboard, rate and latency checks and the mechanism
// counts are those of tb_noc_switch: a permutation phase at full rate
// without stalls, then random packets with random output stalls.
`timescale 1ns/1ns
module tb_noc_switch_mixed;
  import noc_pkg::*;

  localparam int NP = 4;
  localparam int SKEW [NP] = '{0, 3, 0, 9};

  logic          clk = 1'b0, rst = 1'b1;
  logic [NP-1:0] in_strobe = '0, in_valid, in_stall;
  flit_t         in_flit  [NP];
  logic [NP-1:0] out_strobe, out_valid, out_stall;
  flit_t         out_flit [NP];

  noc_switch #(.MESO_PORTS(4'b1010)) dut (
    .clk(clk), .rst(rst),
    .in_strobe(in_strobe), .in_valid(in_valid), .in_flit(in_flit), .in_stall(in_stall),
    .out_strobe(out_strobe), .out_valid(out_valid), .out_flit(out_flit), .out_stall(out_stall)
  );

  int unsigned t = 0;
  always begin
    #1 t++;
    clk = (t % 10) >= 5;
    for (int i = 0; i < NP; i++) in_strobe[i] = ((t + 10 - SKEW[i]) % 10) >= 5;
  end

  int     checks = 0, failures = 0;
  int     phase = 0;          // 0 idle, 1 permutation, 2 random
  int     pkts_left [NP];
  int     flits_left [NP];    // flits left in the current packet
  int     cur_dest [NP];
  int     n_sent [NP], n_recv [NP];
  int     rx_src [NP];
  flit_t  exp_q [NP][NP][$];
  int     p_stall = 0;
  longint cyc = 0;
  longint first_in = -1;
  longint first_out [NP], last_out [NP];

  int     cnt_in_stall = 0, cnt_out_stall = 0, cnt_contention = 0, cnt_held = 0;

  // Senders, one per input, in their strobe domain.
  for (genvar i = 0; i < NP; i++) begin : g_send
    always @(posedge in_strobe[i]) begin
      if (rst) begin
        in_valid[i]   <= 1'b0;
        in_flit[i]    <= '0;
        flits_left[i] = 0;
      end else begin
        bit take;
        take = in_valid[i] && !in_stall[i];
        if (in_valid[i] && in_stall[i]) cnt_in_stall++;
        if (take) begin
          flit_t e;
          e = in_flit[i];
          if (e.head) e.data = e.data >> 2;
          exp_q[cur_dest[i]][i].push_back(e);
          n_sent[i]++;
          if (first_in < 0) first_in = cyc;
          flits_left[i]--;
        end
        if (!(in_valid[i] && in_stall[i])) begin
          flit_t f;
          bit    go;
          go = 1'b0;
          f  = '0;
          if (flits_left[i] > 0) begin
            f.data = $urandom;
            go = (phase == 1) || (($urandom % 100) < 80);
          end else if (pkts_left[i] > 0 && phase != 0 &&
                       (phase == 1 || ($urandom % 100) < 60)) begin
            flits_left[i] = (phase == 1) ? 8 : 1 + int'($urandom % 4);
            cur_dest[i]   = (phase == 1) ? (i + 1) % NP : int'($urandom % NP);
            pkts_left[i]--;
            f.head = 1'b1;
            f.data = {2'(i), 26'($urandom), 2'($urandom), 2'(cur_dest[i])};
            go = 1'b1;
          end
          if (go) f.tail = (flits_left[i] == 1);
          in_valid[i] <= go;
          in_flit[i]  <= f;
        end
      end
    end
  end

  // Receivers at the outputs, switch clock domain.
  always @(posedge clk) begin
    cyc++;
    if (rst) begin
      out_stall <= '0;
    end else begin
      for (int o = 0; o < NP; o++) begin
        if (out_valid[o] && out_stall[o]) cnt_out_stall++;
        if (out_valid[o] && !out_stall[o]) begin
          flit_t f, e;
          f = out_flit[o];
          if (f.head) rx_src[o] = int'(f.data[29:28]);
          checks++;
          if (exp_q[o][rx_src[o]].size() == 0) begin
            failures++;
            $display("FAIL out %0d: unexpected flit %h (src %0d)", o, f, rx_src[o]);
          end else begin
            e = exp_q[o][rx_src[o]].pop_front();
            if (f !== e) begin
              failures++;
              $display("FAIL out %0d src %0d: got %h expected %h", o, rx_src[o], f, e);
            end
          end
          n_recv[o]++;
          if (first_out[o] < 0) first_out[o] = cyc;
          last_out[o] = cyc;
        end
        out_stall[o] <= ($urandom % 100) < p_stall;
      end
      for (int o = 0; o < NP; o++) begin
        if ($countones(dut.req[o]) > 1) cnt_contention++;
        if (dut.xfer[o] && !dut.xb_flit[o].head) cnt_held++;
      end
    end
  end

  function automatic int sum(int a [NP]);
    int s = 0;
    foreach (a[k]) s += a[k];
    return s;
  endfunction

  task automatic drain();
    int guard = 0;
    while ((sum(pkts_left) > 0 || sum(flits_left) > 0 || sum(n_sent) != sum(n_recv)) && guard < 20000) begin
      @(posedge clk);
      guard++;
    end
    repeat (10) @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < NP; i++) begin
      pkts_left[i] = 0; n_sent[i] = 0; n_recv[i] = 0; rx_src[i] = 0;
      first_out[i] = -1; last_out[i] = -1; cur_dest[i] = 0;
    end
    repeat (4) @(posedge clk);
    #2 rst = 1'b0;
    repeat (3) @(posedge clk);

    // Phase 1: permutation, 4 packets of 8 flits per input, no stalls.
    phase = 1;
    for (int i = 0; i < NP; i++) pkts_left[i] = 4;
    drain();
    for (int o = 0; o < NP; o++) begin
      checks++;
      if (n_recv[o] != 32 || last_out[o] - first_out[o] != 31) begin
        failures++;
        $display("FAIL rate out %0d: %0d flits in %0d cycles", o, n_recv[o], last_out[o] - first_out[o] + 1);
      end
      checks++;
      if (first_out[o] - first_in > 3) begin
        failures++;
        $display("FAIL latency out %0d: first flit after %0d cycles", o, first_out[o] - first_in);
      end
    end

    // Phase 2: random traffic with random output stalls.
    phase = 2;
    p_stall = 30;
    for (int i = 0; i < NP; i++) pkts_left[i] = 150;
    drain();

    for (int o = 0; o < NP; o++)
      for (int i = 0; i < NP; i++) begin
        checks++;
        if (exp_q[o][i].size() != 0) begin
          failures++;
          $display("FAIL: %0d flits from %0d to %0d never delivered", exp_q[o][i].size(), i, o);
        end
      end
    $display("mechanisms: sender stalled %0d, output stalled %0d, contention %0d, packet held %0d",
             cnt_in_stall, cnt_out_stall, cnt_contention, cnt_held);
    checks += 4;
    if (cnt_in_stall == 0)   begin failures++; $display("FAIL: no sender stall"); end
    if (cnt_out_stall == 0)  begin failures++; $display("FAIL: no output stall"); end
    if (cnt_contention == 0) begin failures++; $display("FAIL: no contention"); end
    if (cnt_held == 0)       begin failures++; $display("FAIL: no multi-flit packet"); end
    $display("flits delivered: %0d", sum(n_recv));
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
