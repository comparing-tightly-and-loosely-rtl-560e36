// ring_counter: rotating one-hot slot pointer of the mesochronous
// synchronizer.
//
// The same circuit serves as the front-end counter (clocked by the
// sender's strobe, its bits are the latch enables enable_0..enable_2), as
// the back-end counter (clocked by the receiver clock, its bits select
// the 3-to-1 output mux) and as the two counters of the control
// synchronizer. The pointer is one-hot so that each bit can drive one
// latch enable or one mux leg directly. It moves to the next slot on a
// rising clock edge when `advance` is high and wraps from the last slot
// to slot 0.
//
// Both counters of a synchronizer are reset by the receiver's reset, as
// the reset diagram of the synchronizer shows; reset is asynchronous and
// active high. The reset slot is a parameter so that the write and the
// read pointer can be given their bootstrap positions.
//
// Interface: clk, rst, advance -> ptr (one-hot, N bits).
// Timing: ptr changes only on a rising edge of clk, or at once on rst.
module ring_counter #(
  parameter int unsigned N         = 3,
  parameter int unsigned RESET_POS = 0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         advance,
  output logic [N-1:0] ptr
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)          ptr <= N'(1) << RESET_POS;
    else if (advance) ptr <= {ptr[N-2:0], ptr[N-1]};
  end

  // The pointer must stay one-hot: two open latches or two mux legs at once
  // would merge flits.
  a_onehot : assert property (@(posedge clk) disable iff (rst) $onehot(ptr));

endmodule
