// noc_switch: wormhole NoC switch with tightly coupled mesochronous
// synchronizers as its input buffers.
//
// The switch lives in one clock domain (clk), while each neighbour may run
// on the same frequency with an arbitrary, constant phase offset. Instead
// of putting a synchronizer in front of the switch and a FIFO behind it,
// every mesochronous input port is a tc_input_port: three latches written
// under the neighbour's forwarded clock (in_strobe) hold the incoming
// flits, and the switch's arbiters and crossbar read them directly
// through the port's back-end mux. The latches also act as the stall/go
// input buffer, and a small control synchronizer carries the stall/go
// answer back into the neighbour's domain. Input ports whose bit in
// MESO_PORTS is 0 are synchronous and use a 2-slot sync_input_buffer;
// their in_strobe is unused.
//
// Routing is source routing: a head flit names its output port in its low
// ROUTE_W data bits, and the switch shifts the data right by ROUTE_W when
// it forwards a head flit. Each output has a round-robin wormhole arbiter
// and an output buffer; the output link is launched from the output
// buffer's registers and clk is forwarded with it as out_strobe.
//
// Ports: per input i, in_strobe[i], in_valid[i], in_flit[i] and the
// answer in_stall[i] (in the strobe domain of input i); per output o,
// out_valid[o], out_flit[o], out_strobe[o] and the answer out_stall[o]
// (in the clk domain). A flit moves on a link on a rising edge of that
// link's clock where valid is high and stall is low.
//
// Timing: a flit taken by a mesochronous port crosses the crossbar on the
// first switch edge after it settled in its latch and is on out_flit one
// edge later; every input/output pair sustains one flit per cycle.
//
// The port count and output buffer depth follow the switch drawings only
// loosely (four outputs are drawn); routing, arbitration and depth are
// this design's choices.
module noc_switch
  import noc_pkg::*;
#(
  parameter int unsigned  N_PORTS      = 4,
  parameter logic [N_PORTS-1:0] MESO_PORTS = '1,
  parameter int unsigned  OUTBUF_DEPTH = 2
) (
  input  logic               clk,
  input  logic               rst,
  // input links
  input  logic [N_PORTS-1:0] in_strobe,
  input  logic [N_PORTS-1:0] in_valid,
  input  flit_t              in_flit  [N_PORTS],
  output logic [N_PORTS-1:0] in_stall,
  // output links
  output logic [N_PORTS-1:0] out_strobe,
  output logic [N_PORTS-1:0] out_valid,
  output flit_t              out_flit [N_PORTS],
  input  logic [N_PORTS-1:0] out_stall
);

  localparam int unsigned ROUTE_W = (N_PORTS > 1) ? $clog2(N_PORTS) : 1;

  logic [N_PORTS-1:0] rx_valid, rx_pop;
  flit_t              rx_flit [N_PORTS];
  logic [ROUTE_W-1:0] dest    [N_PORTS];
  logic [ROUTE_W-1:0] cur_out_q [N_PORTS];
  logic [N_PORTS-1:0] req     [N_PORTS];   // [output][input]
  logic [N_PORTS-1:0] gnt     [N_PORTS];   // [output][input]
  logic [N_PORTS-1:0] xb_valid, ob_full, xfer;
  flit_t              xb_flit [N_PORTS];

  // Input ports.
  for (genvar i = 0; i < N_PORTS; i++) begin : g_in
    if (MESO_PORTS[i]) begin : g_meso
      tc_input_port u_port (
        .clk(clk), .rst(rst),
        .in_strobe(in_strobe[i]), .in_valid(in_valid[i]), .in_flit(in_flit[i]),
        .in_stall(in_stall[i]),
        .rx_valid(rx_valid[i]), .rx_flit(rx_flit[i]), .rx_pop(rx_pop[i])
      );
    end else begin : g_sync
      sync_input_buffer u_port (
        .clk(clk), .rst(rst),
        .in_valid(in_valid[i]), .in_flit(in_flit[i]), .in_stall(in_stall[i]),
        .rx_valid(rx_valid[i]), .rx_flit(rx_flit[i]), .rx_pop(rx_pop[i])
      );
    end

    // Output wanted by the head-of-line flit: from the route for a head
    // flit, from the packet's remembered output otherwise.
    assign dest[i] = rx_flit[i].head ? rx_flit[i].data[ROUTE_W-1:0] : cur_out_q[i];

    always_ff @(posedge clk or posedge rst) begin
      if (rst)                                 cur_out_q[i] <= '0;
      else if (rx_pop[i] && rx_flit[i].head)   cur_out_q[i] <= rx_flit[i].data[ROUTE_W-1:0];
    end
  end

  always_comb begin
    for (int o = 0; o < N_PORTS; o++)
      for (int i = 0; i < N_PORTS; i++)
        req[o][i] = rx_valid[i] && (int'(dest[i]) == o);
  end

  // Arbiters, one per output.
  for (genvar o = 0; o < N_PORTS; o++) begin : g_arb
    rr_arbiter #(.N(N_PORTS)) u_arb (
      .clk(clk), .rst(rst), .req(req[o]), .gnt(gnt[o]),
      .xfer(xfer[o]), .xfer_tail(xb_flit[o].tail)
    );
  end

  crossbar #(.NI(N_PORTS), .NO(N_PORTS)) u_xbar (
    .in_flit(rx_flit), .sel(gnt), .out_flit(xb_flit), .out_valid(xb_valid)
  );

  assign xfer = xb_valid & ~ob_full;

  always_comb begin
    rx_pop = '0;
    for (int o = 0; o < N_PORTS; o++)
      if (xfer[o]) rx_pop = rx_pop | gnt[o];
  end

  // Output buffers.
  for (genvar o = 0; o < N_PORTS; o++) begin : g_out
    output_buffer #(.DEPTH(OUTBUF_DEPTH)) u_obuf (
      .clk(clk), .rst(rst),
      .push(xfer[o]), .push_flit(route_shift(xb_flit[o], ROUTE_W)), .full(ob_full[o]),
      .out_valid(out_valid[o]), .out_flit(out_flit[o]), .out_stall(out_stall[o])
    );
    assign out_strobe[o] = clk;
  end

endmodule
