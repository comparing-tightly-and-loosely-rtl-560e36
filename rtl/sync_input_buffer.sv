// sync_input_buffer: 2-slot input buffer of a synchronous switch port.
//
// A switch may mix synchronous and mesochronous input ports. A
// synchronous port has no synchronizer and keeps the conventional
// two-slot input buffer that stall/go flow control needs: the stall
// answer reaches the sender one cycle late, so one extra slot absorbs the
// flit already on its way. The buffer is a 2-entry FIFO of flip-flops;
// in_stall is high exactly when both slots are full and is a function of
// registers only.
//
// Interface: same as tc_input_port, with the upstream link in the
// switch's own clock domain. A flit is taken on a rising edge where
// in_valid is high and in_stall low; the head flit is offered on
// rx_valid/rx_flit and leaves on a rising edge where rx_pop is high.
// Timing: a flit taken at edge n is offered from edge n on (one cycle of
// latency through the buffer), one flit per cycle sustained.
module sync_input_buffer
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  in_stall,
  output logic  rx_valid,
  output flit_t rx_flit,
  input  logic  rx_pop
);

  flit_t      mem [2];
  logic       wr_idx, rd_idx;
  logic [1:0] count;
  logic       push;

  assign in_stall = (count == 2'd2);
  assign push     = in_valid && !in_stall;
  assign rx_valid = (count != 2'd0);
  assign rx_flit  = mem[rd_idx];

  always_ff @(posedge clk) begin
    if (push) mem[wr_idx] <= in_flit;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wr_idx <= 1'b0;
      rd_idx <= 1'b0;
      count  <= '0;
    end else begin
      if (push)   wr_idx <= !wr_idx;
      if (rx_pop) rd_idx <= !rd_idx;
      count <= count + 2'(push) - 2'(rx_pop);
    end
  end

  a_pop_valid : assert property (@(posedge clk) disable iff (rst) rx_pop |-> rx_valid);

endmodule
