// tb_sync_input_buffer: the 2-slot synchronous input buffer under random
// sending (obeying in_stall) and random popping, against a queue model:
// in_stall exactly when two flits are held, rx_valid exactly when one is,
// flits leave in order. With both sides always ready it must pass one
// flit per cycle and never stall.
`timescale 1ns/1ns
module tb_sync_input_buffer;
  import noc_pkg::*;
  logic  clk = 1'b0, rst = 1'b1, in_valid, in_stall, rx_valid, rx_pop, pop_en;
  flit_t in_flit, rx_flit;
  flit_t model [$];
  int    checks = 0, failures = 0, p_send = 80, p_pop = 50, n_sent = 0, stalls = 0, pops = 0;

  sync_input_buffer dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_flit(in_flit), .in_stall(in_stall),
                         .rx_valid(rx_valid), .rx_flit(rx_flit), .rx_pop(rx_pop));

  always #5 clk = ~clk;
  assign rx_pop = rx_valid && pop_en;

  always @(posedge clk) begin
    if (rst) begin
      in_valid <= 1'b0; in_flit <= '0; pop_en <= 1'b0;
    end else begin
      checks++;
      if (in_stall !== (model.size() == 2) || rx_valid !== (model.size() != 0) ||
          (rx_valid && rx_flit !== model[0])) begin
        failures++;
        $display("FAIL: stall %b valid %b flit %h, model holds %0d", in_stall, rx_valid, rx_flit, model.size());
      end
      if (rx_pop) begin void'(model.pop_front()); pops++; end
      if (in_valid && in_stall) stalls++;
      if (in_valid && !in_stall) begin model.push_back(in_flit); n_sent++; end
      if (!(in_valid && in_stall)) begin
        in_valid <= ($urandom % 100) < p_send;
        in_flit  <= {2'($urandom), 32'($urandom)};
      end
      pop_en <= ($urandom % 100) < p_pop;
    end
  end

  initial begin
    int p0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    repeat (1000) @(posedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL: never stalled"); end
    p_send = 100; p_pop = 100;
    repeat (10) @(posedge clk);
    stalls = 0; p0 = pops;
    repeat (100) @(posedge clk);
    checks++;
    if (pops - p0 != 100 || stalls != 0) begin
      failures++; $display("FAIL rate: %0d pops in 100 cycles, %0d stalls", pops - p0, stalls);
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
