// latch_bank: the front-end storage of a mesochronous synchronizer.
//
// N level-sensitive latches share one data input. The one-hot `en` from a
// ring counter chooses which latch is written; the chosen latch is
// transparent while `we` is high and the writing clock `clk` is low, and
// it holds its value from the next rising edge of `clk` until it is
// chosen again. Data launched on a rising edge therefore settles in the
// latch during the low half of that cycle and then stays stable for the
// whole time the other latches are in use, which is the window the
// reading side samples in. The same module, one bit wide, forms the
// control latches of the backward flow-control synchronizer.
//
// Opening the latch in the low half of the writing clock is this
// design's choice: the synchronizer is described as clocking its latches
// with the sender's strobe, without saying which phase.
//
// The latches are intended: they are the synchronizer. Tools that report
// inferred latches in this module report the design as meant. Verilator's
// lint may instead say it finds no latch here when the bank stores a
// packed struct; synthesis does build one latch per stored bit.
//
// `rst` clears every latch, so that the slot state bits they carry start
// from a known value; the clear is this design's choice.
//
// Interface: clk (strobe), rst, we (write this cycle), en (one-hot slot),
// d -> q[N] (all latch outputs, for the read mux).
module latch_bank #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 34
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [N-1:0] en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q [N]
);

  for (genvar i = 0; i < N; i++) begin : g_latch
    always_latch begin
      if (rst)                      q[i] = '0;
      else if (we && en[i] && !clk) q[i] = d;
    end
  end

endmodule
