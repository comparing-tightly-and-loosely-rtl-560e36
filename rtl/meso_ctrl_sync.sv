// meso_ctrl_sync: backward (flow-control) half of the tightly coupled
// mesochronous synchronizer.
//
// It mirrors the data synchronizer in the opposite direction. In the
// receiver domain a ring counter points at one of NSLOTS one-bit control
// latches (CTR_Latch_0..2); after the switch pops a flit out of slot i,
// control latch i is written with the reader's new phase bit for that
// slot, during the low half of the following receiver cycle. The pop is
// registered first so that the latch enable never depends on the
// combinational pop decision, which may settle late in the cycle. In the sender's strobe
// domain a second ring counter, stepping with every push, selects one
// control latch through a mux. The sender may write its current slot
// again once the control latch shows that the reader has caught up with
// the writer's phase for that slot.
//
// The go decision is registered on the strobe edge and holds for the whole
// strobe cycle, so a pop that lands while the slot is being written
// cannot cut a write short. Registering it, and encoding the control bit
// as a phase, are this design's choices; the structure of latches, two
// counters and a mux follows the control synchronizer drawing.
//
// Interface
//   rx_clk, rx_pop   receiver domain; one flit left the buffer this cycle
//   tx_clk, tx_push  strobe domain; one flit was written this cycle
//   tx_go            strobe domain; the current slot may be written
//   rst              receiver reset
// Timing: tx_go changes only on a rising strobe edge. A pop reaches its
// control latch half a receiver cycle after the pop edge and is seen at
// the next strobe edge after that; a slot written in strobe cycle n is
// checked again at the edge that starts cycle n+3, so three slots sustain
// one flit per cycle at any phase offset.
module meso_ctrl_sync #(
  parameter int unsigned N = noc_pkg::NSLOTS
) (
  input  logic rst,
  input  logic rx_clk,
  input  logic rx_pop,
  input  logic tx_clk,
  input  logic tx_push,
  output logic tx_go
);

  logic [N-1:0] rx_ptr, tx_ptr, tx_ptr_next;
  logic [N-1:0] rx_phase, tx_phase, tx_phase_next;
  logic [N-1:0] popped_q;
  logic         ctr_d;
  logic [0:0]   ctr_q [N];
  logic         free_next;

  // Receiver side: counter, phase bits, control latches.
  ring_counter #(.N(N), .RESET_POS(0)) u_rx_counter (
    .clk(rx_clk), .rst(rst), .advance(rx_pop), .ptr(rx_ptr)
  );

  always_ff @(posedge rx_clk or posedge rst) begin
    if (rst) begin
      rx_phase <= '0;
      popped_q <= '0;
    end else begin
      if (rx_pop) rx_phase <= rx_phase ^ rx_ptr;
      popped_q <= rx_pop ? rx_ptr : '0;
    end
  end

  assign ctr_d = |(rx_phase & popped_q);

  latch_bank #(.N(N), .W(1)) u_ctr_latches (
    .clk(rx_clk), .rst(rst), .we(|popped_q), .en(popped_q), .d(ctr_d), .q(ctr_q)
  );

  // Sender side: counter, phase bits, mux and registered go.
  ring_counter #(.N(N), .RESET_POS(0)) u_tx_counter (
    .clk(tx_clk), .rst(rst), .advance(tx_push), .ptr(tx_ptr)
  );

  always_comb begin
    tx_ptr_next   = tx_push ? {tx_ptr[N-2:0], tx_ptr[N-1]} : tx_ptr;
    tx_phase_next = tx_push ? (tx_phase ^ tx_ptr) : tx_phase;
    free_next     = 1'b0;
    for (int i = 0; i < N; i++)
      if (tx_ptr_next[i]) free_next = (ctr_q[i][0] == tx_phase_next[i]);
  end

  always_ff @(posedge tx_clk or posedge rst) begin
    if (rst) begin
      tx_phase <= '0;
      tx_go    <= 1'b1;
    end else begin
      tx_phase <= tx_phase_next;
      tx_go    <= free_next;
    end
  end

  a_push_go : assert property (@(posedge tx_clk) disable iff (rst) tx_push |-> tx_go);

endmodule
