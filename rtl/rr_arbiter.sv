// rr_arbiter: arbiter of one switch output, for wormhole switching.
//
// Every input whose head-of-line flit wants this output raises its bit of
// req. While no packet owns the output, the arbiter grants the first
// requester at or after a round-robin pointer. When a head flit that is
// not also a tail flit crosses (xfer with xfer_tail low), the granted
// input owns the output until its tail flit crosses; meanwhile only the
// owner can be granted. After a tail flit the pointer moves to the input
// after the owner, so all inputs get a turn. Round robin and wormhole
// locking are this design's choices; the arbiter is only named in the
// switch drawings.
//
// Interface: req[N] in, gnt[N] one-hot or zero out (combinational from
// req and registered state), xfer/xfer_tail report the flit that crossed
// in this cycle. State changes on the rising edge of clk.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt,
  input  logic         xfer,
  input  logic         xfer_tail
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr_q, owner_q, pick;
  logic          locked_q, found;

  always_comb begin
    pick  = ptr_q;
    found = 1'b0;
    for (int k = N - 1; k >= 0; k--) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(ptr_q) + k) % N);
      if (req[idx]) begin
        pick  = idx;
        found = 1'b1;
      end
    end
    gnt = '0;
    if (locked_q)   gnt[owner_q] = req[owner_q];
    else if (found) gnt[pick]    = 1'b1;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ptr_q    <= '0;
      owner_q  <= '0;
      locked_q <= 1'b0;
    end else if (xfer) begin
      if (xfer_tail) begin
        locked_q <= 1'b0;
        ptr_q    <= IW'(((locked_q ? int'(owner_q) : int'(pick)) + 1) % int'(N));
      end else if (!locked_q) begin
        locked_q <= 1'b1;
        owner_q  <= pick;
      end
    end
  end

  a_onehot_gnt : assert property (@(posedge clk) disable iff (rst) $onehot0(gnt));
  a_xfer_gnt   : assert property (@(posedge clk) disable iff (rst) xfer |-> |gnt);

endmodule
