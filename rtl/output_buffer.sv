// output_buffer: flit FIFO at one switch output.
//
// Flits from the crossbar are written on the rising edge of clk when push
// is high; `full` tells the arbiter not to send. The head flit is driven
// from a register onto out_valid/out_flit, so the output link leaves the
// switch straight from flip-flops; it leaves on an edge where out_stall
// (stall/go from the next hop) is low. The depth is this design's choice:
// the switch drawings show an output buffer per port without its size.
//
// Interface: push/push_flit/full (switch side), out_valid/out_flit/
// out_stall (link side). Timing: a flit pushed at edge n is on out_flit
// after edge n; one flit per cycle sustained with DEPTH >= 2.
module output_buffer
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  push,
  input  flit_t push_flit,
  output logic  full,
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  out_stall
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t         mem [DEPTH];
  logic [AW-1:0] wr_idx, rd_idx;
  logic [AW:0]   count;
  logic          pop;

  assign out_valid = (count != '0);
  assign out_flit  = mem[rd_idx];
  assign full      = (count == (AW+1)'(DEPTH));
  assign pop       = out_valid && !out_stall;

  always_ff @(posedge clk) begin
    if (push && !full) mem[wr_idx] <= push_flit;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wr_idx <= '0;
      rd_idx <= '0;
      count  <= '0;
    end else begin
      if (push && !full) wr_idx <= (wr_idx == AW'(DEPTH-1)) ? '0 : wr_idx + 1'b1;
      if (pop)           rd_idx <= (rd_idx == AW'(DEPTH-1)) ? '0 : rd_idx + 1'b1;
      count <= count + (AW+1)'(push && !full) - (AW+1)'(pop);
    end
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (rst) push |-> !full);

endmodule
