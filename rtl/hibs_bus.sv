// hibs_bus: the High-performance Inter-layer Bus Structure for a stack of N_LAYERS layers.
//
// A conventional vertical bus lets one layer at a time own the shared wires and needs a
// central arbiter with control wires through every layer. This bus is instead a
// bidirectional pipeline: a transfer stage per layer cuts it into segments, each segment is
// an upward and a downward point-to-point link, and every layer sends whenever the buffer in
// its own stage has room, without asking for a grant. Packets of several layers therefore
// travel at the same time, in both directions and on all segments.
//
// Per layer l (0 = bottom) the top holds a transfer_stage and an hibs_interface. The
// interface synchronises the layer's router clock clk_layer[l] with the common bus clock
// clk_bus through two bi-synchronous FIFOs. Stage l's up output feeds stage l+1's lower input
// and stage l+1's down output feeds stage l's upper input, each through a credit_link
// (credit-based flow control, LINK_CREDITS words of receive buffer per link); SH_Status and
// MH_Status wires run alongside. The ends of the stack have no neighbour: their open inputs are tied idle and
// their open status inputs are tied to "not congested".
//
// Router ports, per layer, in the layer clock: r_tx_* carries packets from the router to the
// bus (header flit first, destination layer in the header, see hibs_pkg), r_rx_* delivers
// packets addressed to this layer. Each router is outside this design. A router must not send
// a packet addressed to its own layer.
//
// The ev_*, *_status_o and seg_*_fire_o outputs only expose internal events for monitors.
//
// Timing: every transfer stage registers a flit once, in a TS unit, and an idle link passes
// a flit through in the cycle it is sent, so without contention a flit read from the sender's
// interface FIFO is written into the receiver's interface FIFO d bus cycles later for a
// distance of d layers; the two clock-domain crossings add about two cycles of the receiving
// clock each. Every link carries one flit per bus cycle with the default of 2 credits.
//
// Following the document: the per-layer transfer stage and interface, two opposite links
// per segment with credit-based flow control, the status wires, the default sizes. This
// design's choices: one bus clock for all stages, the credit count, and the stack-end ties.
module hibs_bus
  import hibs_pkg::*;
#(
  parameter int unsigned N_LAYERS   = 4,
  parameter int unsigned TS_DEPTH   = 5,
  parameter int unsigned IF_DEPTH   = 8,
  parameter int unsigned AGE_W      = 3,
  parameter int unsigned THRESH_PCT = 80,
  parameter int unsigned LINK_CREDITS = 2
) (
  input  logic                clk_bus,
  input  logic                rst_bus_n,
  input  logic [N_LAYERS-1:0] clk_layer,
  input  logic [N_LAYERS-1:0] rst_layer_n,

  input  logic [N_LAYERS-1:0] r_tx_valid,
  output logic [N_LAYERS-1:0] r_tx_ready,
  input  flit_t               r_tx_flit [N_LAYERS],
  output logic [N_LAYERS-1:0] r_rx_valid,
  input  logic [N_LAYERS-1:0] r_rx_ready,
  output flit_t               r_rx_flit [N_LAYERS],

  // observation, bus clock: per layer
  output logic [N_LAYERS-1:0] ev_bypass_o,        // a TS unit reordered (non-blocking)
  output logic [N_LAYERS-1:0] ev_m3_conflict_o,   // both pipelines wanted M3
  output logic [N_LAYERS-1:0] sh_status_o,        // SH_Status of each layer
  output logic [N_LAYERS-1:0] mh_status_o,        // either MH_Status of each layer
  // per segment s (between layers s and s+1; bit N_LAYERS-1 unused, 0)
  output logic [N_LAYERS-1:0] seg_up_fire_o,      // a flit was sent up the segment
  output logic [N_LAYERS-1:0] seg_dn_fire_o,      // a flit was sent down the segment
  output logic [N_LAYERS-1:0] seg_credit_stall_o  // a sender on the segment waits for a credit
);

  initial assert (N_LAYERS >= 2 && N_LAYERS <= (1 << LAYER_W))
    else $error("hibs_bus: N_LAYERS must be between 2 and %0d", 1 << LAYER_W);

  // segment s joins stage s (below) and stage s+1 (above); index N_LAYERS-1 is unused.
  // Each direction of a segment is a credit_link: *_tx is its sending end, *_rx its
  // receiving end.
  logic  [N_LAYERS-1:0] up_tx_valid, up_tx_ready, up_rx_valid, up_rx_ready;  // s -> s+1
  flit_t                up_tx_flit [N_LAYERS];
  flit_t                up_rx_flit [N_LAYERS];
  logic  [N_LAYERS-1:0] dn_tx_valid, dn_tx_ready, dn_rx_valid, dn_rx_ready;  // s+1 -> s
  flit_t                dn_tx_flit [N_LAYERS];
  flit_t                dn_rx_flit [N_LAYERS];

  for (genvar s = 0; s < N_LAYERS - 1; s++) begin : g_segment
    credit_link #(.CREDITS(LINK_CREDITS)) u_up (
      .clk(clk_bus), .rst_n(rst_bus_n),
      .tx_valid(up_tx_valid[s]), .tx_ready(up_tx_ready[s]), .tx_flit(up_tx_flit[s]),
      .rx_valid(up_rx_valid[s]), .rx_ready(up_rx_ready[s]), .rx_flit(up_rx_flit[s])
    );
    credit_link #(.CREDITS(LINK_CREDITS)) u_dn (
      .clk(clk_bus), .rst_n(rst_bus_n),
      .tx_valid(dn_tx_valid[s]), .tx_ready(dn_tx_ready[s]), .tx_flit(dn_tx_flit[s]),
      .rx_valid(dn_rx_valid[s]), .rx_ready(dn_rx_ready[s]), .rx_flit(dn_rx_flit[s])
    );
  end

  logic [N_LAYERS-1:0] sh_status, mh_status_up, mh_status_dn;
  assign sh_status_o = sh_status;

  // interface <-> stage
  logic  [N_LAYERS-1:0] inj_valid, inj_ready, ej_valid, ej_ready, ej_congested;
  flit_t                inj_flit [N_LAYERS];
  flit_t                ej_flit  [N_LAYERS];

  for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
    // upper-side connections of stage l
    logic  up_in_valid, up_out_ready, up_sh, up_mh, up_in_ready, up_out_valid;
    flit_t up_in_flit, up_out_flit;
    // lower-side connections of stage l
    logic  dn_in_valid, dn_out_ready, dn_sh, dn_mh, dn_in_ready, dn_out_valid;
    flit_t dn_in_flit, dn_out_flit;

    if (l < N_LAYERS - 1) begin : g_above
      assign up_in_valid    = dn_rx_valid[l];
      assign up_in_flit     = dn_rx_flit[l];
      assign dn_rx_ready[l] = up_in_ready;
      assign up_tx_valid[l] = up_out_valid;
      assign up_tx_flit[l]  = up_out_flit;
      assign up_out_ready   = up_tx_ready[l];
      assign up_sh        = sh_status[l+1];
      assign up_mh        = mh_status_dn[l+1];
    end else begin : g_top_end
      assign up_in_valid  = 1'b0;
      assign up_in_flit   = '0;
      assign up_out_ready = 1'b0;
      assign up_sh        = 1'b0;
      assign up_mh        = 1'b0;
      // no segment above the top stage
      assign up_tx_valid[l] = 1'b0;
      assign up_tx_flit[l]  = '0;
      assign up_tx_ready[l] = 1'b0;
      assign up_rx_valid[l] = 1'b0;
      assign up_rx_flit[l]  = '0;
      assign up_rx_ready[l] = 1'b0;
      assign dn_tx_valid[l] = 1'b0;
      assign dn_tx_flit[l]  = '0;
      assign dn_tx_ready[l] = 1'b0;
      assign dn_rx_valid[l] = 1'b0;
      assign dn_rx_flit[l]  = '0;
      assign dn_rx_ready[l] = 1'b0;
    end

    if (l > 0) begin : g_below
      assign dn_in_valid      = up_rx_valid[l-1];
      assign dn_in_flit       = up_rx_flit[l-1];
      assign up_rx_ready[l-1] = dn_in_ready;
      assign dn_tx_valid[l-1] = dn_out_valid;
      assign dn_tx_flit[l-1]  = dn_out_flit;
      assign dn_out_ready     = dn_tx_ready[l-1];
      assign dn_sh         = sh_status[l-1];
      assign dn_mh         = mh_status_up[l-1];
    end else begin : g_bottom_end
      assign dn_in_valid  = 1'b0;
      assign dn_in_flit   = '0;
      assign dn_out_ready = 1'b0;
      assign dn_sh        = 1'b0;
      assign dn_mh        = 1'b0;
    end

    logic bypass_up, bypass_dn;
    assign ev_bypass_o[l]   = bypass_up || bypass_dn;
    assign mh_status_o[l]   = mh_status_up[l] || mh_status_dn[l];
    assign seg_up_fire_o[l] = up_tx_valid[l] && up_tx_ready[l];
    assign seg_dn_fire_o[l] = dn_tx_valid[l] && dn_tx_ready[l];
    assign seg_credit_stall_o[l] = (up_tx_valid[l] && !up_tx_ready[l]) ||
                                   (dn_tx_valid[l] && !dn_tx_ready[l]);

    transfer_stage #(
      .MY_LAYER(l), .N_LAYERS(N_LAYERS), .TS_DEPTH(TS_DEPTH), .AGE_W(AGE_W),
      .THRESH_PCT(THRESH_PCT)
    ) u_stage (
      .clk           (clk_bus),
      .rst_n         (rst_bus_n),
      .up_in_valid   (up_in_valid),
      .up_in_ready   (up_in_ready),
      .up_in_flit    (up_in_flit),
      .up_out_valid  (up_out_valid),
      .up_out_ready  (up_out_ready),
      .up_out_flit   (up_out_flit),
      .up_sh_status_i(up_sh),
      .up_mh_status_i(up_mh),
      .mh_status_up_o(mh_status_up[l]),
      .dn_in_valid   (dn_in_valid),
      .dn_in_ready   (dn_in_ready),
      .dn_in_flit    (dn_in_flit),
      .dn_out_valid  (dn_out_valid),
      .dn_out_ready  (dn_out_ready),
      .dn_out_flit   (dn_out_flit),
      .dn_sh_status_i(dn_sh),
      .dn_mh_status_i(dn_mh),
      .mh_status_dn_o(mh_status_dn[l]),
      .sh_status_o   (sh_status[l]),
      .inj_valid     (inj_valid[l]),
      .inj_ready     (inj_ready[l]),
      .inj_flit      (inj_flit[l]),
      .ej_valid      (ej_valid[l]),
      .ej_ready      (ej_ready[l]),
      .ej_flit       (ej_flit[l]),
      .ej_congested_i(ej_congested[l]),
      .bypass_up_o   (bypass_up),
      .bypass_dn_o   (bypass_dn),
      .m3_conflict_o (ev_m3_conflict_o[l])
    );

    hibs_interface #(.DEPTH(IF_DEPTH), .THRESH_PCT(THRESH_PCT)) u_if (
      .clk_bus    (clk_bus),
      .rst_bus_n  (rst_bus_n),
      .inj_valid  (inj_valid[l]),
      .inj_ready  (inj_ready[l]),
      .inj_flit   (inj_flit[l]),
      .ej_valid   (ej_valid[l]),
      .ej_ready   (ej_ready[l]),
      .ej_flit    (ej_flit[l]),
      .sh_status_o(ej_congested[l]),
      .clk_layer  (clk_layer[l]),
      .rst_layer_n(rst_layer_n[l]),
      .r_tx_valid (r_tx_valid[l]),
      .r_tx_ready (r_tx_ready[l]),
      .r_tx_flit  (r_tx_flit[l]),
      .r_rx_valid (r_rx_valid[l]),
      .r_rx_ready (r_rx_ready[l]),
      .r_rx_flit  (r_rx_flit[l])
    );
  end

endmodule
