// hibs_interface: the interface module between a layer's router and its transfer stage.
//
// It synchronises the two clock domains with two bi-synchronous FIFOs. The transmit FIFO
// takes packets the router sends to other layers (written in the router clock) and presents
// them to the transfer stage's D3 demultiplexer (read in the bus clock). The receive FIFO takes
// packets the transfer stage delivers to this layer through M3 (written in the bus clock) and
// hands them to the router (read in the router clock). Flits pass unchanged; wormhole packets
// stay contiguous because each FIFO has a single writer.
//
// sh_status_o is this layer's SH_Status: the receive FIFO is at or above the congestion
// threshold (80 % of its capacity), seen from the bus side. Neighbouring transfer stages use
// it to steer single-hop packets away from a congested interface.
//
// Following the document: the FIFOs themselves, their placement and the congestion threshold.
// This design's choices: FIFO depth 8 (power of two for Gray pointers) and valid/ready
// handshakes on all four sides.
module hibs_interface
  import hibs_pkg::*;
#(
  parameter int unsigned DEPTH      = 8,
  parameter int unsigned THRESH_PCT = 80
) (
  // bus side (bus clock)
  input  logic  clk_bus,
  input  logic  rst_bus_n,
  output logic  inj_valid,     // to D3
  input  logic  inj_ready,
  output flit_t inj_flit,
  input  logic  ej_valid,      // from M3
  output logic  ej_ready,
  input  flit_t ej_flit,
  output logic  sh_status_o,

  // router side (layer clock)
  input  logic  clk_layer,
  input  logic  rst_layer_n,
  input  logic  r_tx_valid,    // router -> bus
  output logic  r_tx_ready,
  input  flit_t r_tx_flit,
  output logic  r_rx_valid,    // bus -> router
  input  logic  r_rx_ready,
  output flit_t r_rx_flit
);

  localparam int unsigned W = $bits(flit_t);

  logic [$clog2(DEPTH):0] tx_count, rx_count;
  logic                   tx_congested;

  bisync_fifo #(.WIDTH(W), .DEPTH(DEPTH), .THRESH_PCT(THRESH_PCT)) u_tx_fifo (
    .wclk       (clk_layer),
    .wrst_n     (rst_layer_n),
    .wvalid     (r_tx_valid),
    .wready     (r_tx_ready),
    .wdata      (r_tx_flit),
    .wcount     (tx_count),
    .w_congested(tx_congested),
    .rclk       (clk_bus),
    .rrst_n     (rst_bus_n),
    .rvalid     (inj_valid),
    .rready     (inj_ready),
    .rdata      (inj_flit)
  );

  bisync_fifo #(.WIDTH(W), .DEPTH(DEPTH), .THRESH_PCT(THRESH_PCT)) u_rx_fifo (
    .wclk       (clk_bus),
    .wrst_n     (rst_bus_n),
    .wvalid     (ej_valid),
    .wready     (ej_ready),
    .wdata      (ej_flit),
    .wcount     (rx_count),
    .w_congested(sh_status_o),
    .rclk       (clk_layer),
    .rrst_n     (rst_layer_n),
    .rvalid     (r_rx_valid),
    .rready     (r_rx_ready),
    .rdata      (r_rx_flit)
  );

endmodule
