// tb_rr_arbiter: the wormhole round-robin arbiter against a reference
// model written here. Requests are random; each cycle the granted flit
// crosses with some probability and is a tail with some probability.
// Checked every cycle: the grant equals the model's (first requester at or
// after the pointer when free, only the owner while a packet holds the
// output), it is one-hot or empty, and the output is both locked and
// contended at least once.
`timescale 1ns/1ns
module tb_rr_arbiter;
  localparam int N = 4;
  logic         clk = 1'b0, rst = 1'b1, xfer, xfer_tail;
  logic [N-1:0] req, gnt, exp_gnt;
  int           checks = 0, failures = 0, m_ptr = 0, m_owner = 0, n_locked = 0, n_contend = 0;
  bit           m_locked = 0;

  rr_arbiter #(.N(N)) dut (.clk(clk), .rst(rst), .req(req), .gnt(gnt), .xfer(xfer), .xfer_tail(xfer_tail));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] model_gnt();
    logic [N-1:0] g = '0;
    if (m_locked) g[m_owner] = req[m_owner];
    else
      for (int k = 0; k < N; k++)
        if (g == '0 && req[(m_ptr + k) % N]) g[(m_ptr + k) % N] = 1'b1;
    return g;
  endfunction

  initial begin
    req = '0; xfer = 1'b0; xfer_tail = 1'b0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      req = N'($urandom);
      #1;
      exp_gnt = model_gnt();
      checks++;
      if (gnt !== exp_gnt) begin
        failures++; $display("FAIL cycle %0d: req %b gnt %b expected %b", c, req, gnt, exp_gnt);
      end
      if ($countones(req) > 1) n_contend++;
      if (m_locked) n_locked++;
      xfer      = (gnt != '0) && (($urandom % 100) < 70);
      xfer_tail = ($urandom % 100) < 30;
      @(posedge clk);
      if (xfer) begin
        int g = 0;
        for (int i = 0; i < N; i++) if (exp_gnt[i]) g = i;
        if (xfer_tail) begin m_locked = 0; m_ptr = (g + 1) % N; end
        else if (!m_locked) begin m_locked = 1; m_owner = g; end
      end
    end
    checks++;
    if (n_locked == 0 || n_contend == 0) begin failures++; $display("FAIL: lock %0d contention %0d", n_locked, n_contend); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
