// meso_data_sync: forward (data) half of the tightly coupled mesochronous
// synchronizer.
//
// Front end, in the sender's domain: the sender forwards its clock as a
// strobe together with the flits. A ring counter clocked by the strobe
// points at one of NSLOTS latches; a pushed flit is written into that
// latch during the low half of the strobe cycle and the counter moves on.
// Back end, in the receiver's domain: a second ring counter clocked by the
// receiver clock selects one latch through an NSLOTS-to-1 mux, and its
// output goes straight to the switch's arbiter and crossbar. There is no
// sampling flip-flop behind the mux: the latches are the switch input
// buffer, and a flit waits in its latch until the switch pops it.
//
// Slot state: each latch stores, next to the flit, a phase bit that the
// writer flips on every write of that slot. The reader keeps its own phase
// bit per slot and flips it on every pop. A slot holds an unread flit when
// the two bits differ. This lets the front and back counters drift apart
// under stalls without losing or repeating flits; it is this design's way
// of giving the latches flow control, which the synchronizer slides ask
// for without giving the encoding. The sender must only push into a free
// slot: that permission comes from meso_ctrl_sync.
//
// Interface
//   tx_clk, tx_push, tx_flit   strobe domain; push writes the current slot
//   rx_clk, rx_valid, rx_flit  receiver domain; head flit of the buffer
//   rx_pop                     receiver domain; head flit leaves this cycle
//   rst                        receiver reset, clears both sides
// Timing: a flit pushed in strobe cycle n is visible at rx_flit from the
// low half of cycle n on (latches are transparent then), and it can leave
// on the first receiver edge after that. One flit per cycle each way.
module meso_data_sync
  import noc_pkg::*;
#(
  parameter int unsigned N = NSLOTS
) (
  input  logic  rst,
  // sender (strobe) domain
  input  logic  tx_clk,
  input  logic  tx_push,
  input  flit_t tx_flit,
  // receiver domain
  input  logic  rx_clk,
  output logic  rx_valid,
  output flit_t rx_flit,
  input  logic  rx_pop
);

  typedef struct packed {
    logic  phase;
    flit_t flit;
  } slot_t;

  logic [N-1:0] wr_ptr, rd_ptr;
  logic [N-1:0] tx_phase, rx_phase;
  slot_t        slot_q [N];
  slot_t        slot_d;
  slot_t        head;

  // Front-end counter and writer phase bits.
  ring_counter #(.N(N), .RESET_POS(0)) u_fe_counter (
    .clk(tx_clk), .rst(rst), .advance(tx_push), .ptr(wr_ptr)
  );

  always_ff @(posedge tx_clk or posedge rst) begin
    if (rst)          tx_phase <= '0;
    else if (tx_push) tx_phase <= tx_phase ^ wr_ptr;
  end

  always_comb begin
    slot_d.flit  = tx_flit;
    slot_d.phase = |(~tx_phase & wr_ptr);
  end

  latch_bank #(.N(N), .W($bits(slot_t))) u_latches (
    .clk(tx_clk), .rst(rst), .we(tx_push), .en(wr_ptr), .d(slot_d), .q(slot_q)
  );

  // Back-end counter, mux and reader phase bits.
  ring_counter #(.N(N), .RESET_POS(0)) u_be_counter (
    .clk(rx_clk), .rst(rst), .advance(rx_pop), .ptr(rd_ptr)
  );

  always_comb begin
    head = '0;
    for (int i = 0; i < N; i++)
      if (rd_ptr[i]) head = slot_q[i];
  end

  always_ff @(posedge rx_clk or posedge rst) begin
    if (rst)         rx_phase <= '0;
    else if (rx_pop) rx_phase <= rx_phase ^ rd_ptr;
  end

  assign rx_valid = head.phase != |(rx_phase & rd_ptr);
  assign rx_flit  = head.flit;

  a_pop_valid : assert property (@(posedge rx_clk) disable iff (rst) rx_pop |-> rx_valid);

endmodule
