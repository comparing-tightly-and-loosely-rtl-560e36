// tc_input_port: multi-purpose switch input buffer of a mesochronous
// port. One 3-slot latch structure does synchronization, buffering and
// stall/go flow control, so the switch needs no input FIFO behind the
// synchronizer and no sampling flip-flop after its mux.
//
// The upstream sender presents a flit with in_valid in its own clock
// domain and forwards that clock as in_strobe. The port answers with
// in_stall in the same domain: while in_stall is high the sender keeps
// the flit; a flit is taken on a strobe edge where in_valid is high and
// in_stall is low (stall/go). In the switch's domain the head flit is
// offered on rx_valid/rx_flit and leaves when the switch raises rx_pop.
//
// The data path is meso_data_sync; the backward stall/go is produced by
// meso_ctrl_sync. Both share the switch's reset.
//
// Timing: one flit per cycle sustained, with any constant phase offset
// between strobe and switch clock. A flit is written into its latch during
// the low half of the strobe cycle that ends with the edge taking it, and
// is on rx_flit from then on.
module tc_input_port
  import noc_pkg::*;
(
  input  logic  clk,        // switch (receiver) clock
  input  logic  rst,        // switch reset, active high
  // upstream link, strobe domain
  input  logic  in_strobe,
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  in_stall,
  // towards arbiter and crossbar, switch domain
  output logic  rx_valid,
  output flit_t rx_flit,
  input  logic  rx_pop
);

  logic go, push;

  assign push     = in_valid && go;
  assign in_stall = !go;

  meso_data_sync u_data (
    .rst(rst), .tx_clk(in_strobe), .tx_push(push), .tx_flit(in_flit),
    .rx_clk(clk), .rx_valid(rx_valid), .rx_flit(rx_flit), .rx_pop(rx_pop)
  );

  meso_ctrl_sync u_ctrl (
    .rst(rst), .rx_clk(clk), .rx_pop(rx_pop),
    .tx_clk(in_strobe), .tx_push(push), .tx_go(go)
  );

endmodule
