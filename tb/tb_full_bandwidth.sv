// tb_full_bandwidth: full-bandwidth parallel flows through the default
// switch, the traffic under which the tightly coupled switch is compared
// with a fully synchronous one for power.
//
// Every input streams 64-flit packets to its own output (input i to output
// (i+k) mod 4, k = 1, 2, 3 in turn), so all four flows run at once with
// no contention. The payload alternates between a fixed word and a word
// that grows by 0x800 per flit (00028e5a, d12b047a, 00028e5a, d12b847a,
// ...), a high-toggle pattern. Input i's strobe lags the switch clock by
// (s + 2i) mod 10 ns of a 10 ns period, and s is swept over 0..9, so each
// port sees every offset. For every run: all 4 x 128 flits arrive intact
// and in order, each output delivers one flit per switch cycle with no
// gap, and no sender is ever stalled.
`timescale 1ns/1ns
module tb_full_bandwidth;
  import noc_pkg::*;

  localparam int NP = 4, PKT = 64, NPKT = 2, NFLIT = PKT * NPKT;

  logic          clk = 1'b0, rst = 1'b1;
  logic [NP-1:0] in_strobe = '0, in_valid, in_stall;
  flit_t         in_flit  [NP];
  logic [NP-1:0] out_strobe, out_valid;
  logic [NP-1:0] out_stall = '0;
  flit_t         out_flit [NP];

  noc_switch dut (
    .clk(clk), .rst(rst),
    .in_strobe(in_strobe), .in_valid(in_valid), .in_flit(in_flit), .in_stall(in_stall),
    .out_strobe(out_strobe), .out_valid(out_valid), .out_flit(out_flit), .out_stall(out_stall)
  );

  int unsigned t = 0;
  int          s = 0, k = 1;
  always begin
    #1 t++;
    clk = (t % 10) >= 5;
    for (int i = 0; i < NP; i++) in_strobe[i] = ((t + 20 - ((s + 2 * i) % 10)) % 10) >= 5;
  end

  int     checks = 0, failures = 0, stalls = 0;
  int     n_sent [NP], n_recv [NP];
  longint cyc = 0, first_out [NP], last_out [NP];

  // Flit n of the stream from input i; the head flit of each packet names
  // its output in the low data bits.
  function automatic flit_t stream_flit(int i, int n);
    flit_t f;
    int    pos;
    pos    = n % PKT;
    f.head = (pos == 0);
    f.tail = (pos == PKT - 1);
    if (f.head)        f.data = {2'(i), 28'(n), 2'((i + k) % NP)};
    else if (n[0])     f.data = 32'hd12b_047a + 32'(n / 2) * 32'h800;
    else               f.data = 32'h0002_8e5a;
    return f;
  endfunction

  for (genvar i = 0; i < NP; i++) begin : g_send
    always @(posedge in_strobe[i]) begin
      if (rst) begin
        in_valid[i] <= 1'b0;
        n_sent[i]   = 0;
      end else begin
        if (in_valid[i] && in_stall[i]) stalls++;
        if (in_valid[i] && !in_stall[i]) n_sent[i]++;
        if (!(in_valid[i] && in_stall[i])) begin
          in_valid[i] <= (n_sent[i] < NFLIT);
          in_flit[i]  <= stream_flit(i, n_sent[i]);
        end
      end
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst)
      for (int o = 0; o < NP; o++)
        if (out_valid[o]) begin
          int    src;
          flit_t e;
          src = (o - k + NP) % NP;
          e   = stream_flit(src, n_recv[o]);
          if (e.head) e.data = e.data >> 2;
          checks++;
          if (out_flit[o] !== e) begin
            failures++;
            $display("FAIL s=%0d k=%0d out %0d flit %0d: got %h expected %h", s, k, o, n_recv[o], out_flit[o], e);
          end
          if (n_recv[o] == 0) first_out[o] = cyc;
          last_out[o] = cyc;
          n_recv[o]++;
        end
  end

  initial begin
    for (int sk = 0; sk < 10; sk++)
      for (int kk = 1; kk < NP; kk++) begin
        rst = 1'b1;
        s = sk; k = kk; stalls = 0;
        for (int o = 0; o < NP; o++) n_recv[o] = 0;
        repeat (3) @(posedge clk);
        #2 rst = 1'b0;
        repeat (NFLIT + 20) @(posedge clk);
        for (int o = 0; o < NP; o++) begin
          checks++;
          if (n_recv[o] != NFLIT || last_out[o] - first_out[o] != NFLIT - 1) begin
            failures++;
            $display("FAIL s=%0d k=%0d out %0d: %0d flits over %0d cycles", s, k, o, n_recv[o], last_out[o] - first_out[o] + 1);
          end
        end
        checks++;
        if (stalls != 0) begin failures++; $display("FAIL s=%0d k=%0d: %0d sender stalls", s, k, stalls); end
      end
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
