// transfer_stage: the transfer stage (TS) that attaches one layer to the pipelined bus.
//
// The vertical bus is cut into segments by one transfer stage per layer. Each segment is two
// independent unidirectional links, one upward and one downward, so every segment and both
// directions carry flits at the same time and no central bus arbiter exists. A stage:
//   - forwards packets that pass through this layer (D1->M2 downward, D2->M1 upward) into the
//     TS unit of their direction,
//   - delivers packets for this layer (D1 or D2 -> M3) to the interface FIFO of the router,
//   - injects packets of its own router (D3 -> M1 upward or M2 downward).
// The two TS units (ts_unit) are the only flit storage of the stage; the demultiplexers and
// multiplexers and their controller (ts_ctrl) are combinational apart from the route and
// M3 lock registers.
//
// Status wires (SH_Status, MH_Status) run between neighbours. This stage drives towards
// both neighbours the same SH_Status (its interface receive FIFO is congested, taken in from
// ej_congested_i), and towards each neighbour the MH_Status of the TS unit that packets from
// that neighbour would continue into: mh_status_up_o is the down TS unit, mh_status_dn_o the
// up TS unit. Each TS unit uses the status its downstream neighbour sends to avoid a blocked
// path.
//
// Timing: a flit arriving on up_in/dn_in/inj is written into a TS unit or offered to the
// interface FIFO in the same cycle, and can leave the TS unit on the next cycle, so each
// stage adds one cycle and a segment carries one flit per cycle. All ports use a same-cycle
// valid/ready handshake; between two stages a credit_link turns the credit-based segment
// protocol into this handshake. The MY_LAYER default of 1 only gives the module a standalone
// default; the top sets it.
//
// Following the document: the D1-D3/M1-M3 connections, one TS unit per direction, the status
// exchange. This design's choices: the port handshake, and which TS unit's state is sent as
// MH_Status to which neighbour.
module transfer_stage
  import hibs_pkg::*;
#(
  parameter int unsigned MY_LAYER   = 1,
  parameter int unsigned N_LAYERS   = 4,
  parameter int unsigned TS_DEPTH   = 5,
  parameter int unsigned AGE_W      = 3,
  parameter int unsigned THRESH_PCT = 80
) (
  input  logic  clk,
  input  logic  rst_n,

  // upper segment
  input  logic  up_in_valid,      // from the upper stage, travelling down (D1)
  output logic  up_in_ready,
  input  flit_t up_in_flit,
  output logic  up_out_valid,     // to the upper stage, from the up TS unit
  input  logic  up_out_ready,
  output flit_t up_out_flit,
  input  logic  up_sh_status_i,   // status of the upper stage
  input  logic  up_mh_status_i,
  output logic  mh_status_up_o,   // this stage's status sent to the upper stage

  // lower segment
  input  logic  dn_in_valid,      // from the lower stage, travelling up (D2)
  output logic  dn_in_ready,
  input  flit_t dn_in_flit,
  output logic  dn_out_valid,     // to the lower stage, from the down TS unit
  input  logic  dn_out_ready,
  output flit_t dn_out_flit,
  input  logic  dn_sh_status_i,   // status of the lower stage
  input  logic  dn_mh_status_i,
  output logic  mh_status_dn_o,   // this stage's status sent to the lower stage

  output logic  sh_status_o,      // SH_Status, to both neighbours

  // interface
  input  logic  inj_valid,        // D3
  output logic  inj_ready,
  input  flit_t inj_flit,
  output logic  ej_valid,         // M3
  input  logic  ej_ready,
  output flit_t ej_flit,
  input  logic  ej_congested_i,   // interface receive FIFO congestion

  // events, for observation
  output logic  bypass_up_o,
  output logic  bypass_dn_o,
  output logic  m3_conflict_o
);

  initial assert (MY_LAYER < N_LAYERS) else $error("transfer_stage: MY_LAYER out of range");

  // the up TS unit feeds layer MY_LAYER+1, the down TS unit layer MY_LAYER-1
  localparam int unsigned UP_NEXT = MY_LAYER + 1;
  localparam int unsigned DN_NEXT = (MY_LAYER == 0) ? N_LAYERS : MY_LAYER - 1;

  logic  m1_valid, m1_sel, m1_ready;
  logic  m2_valid, m2_sel, m2_ready;
  logic  m3_valid, m3_sel;
  flit_t m1_flit, m2_flit;

  ts_ctrl #(.MY_LAYER(MY_LAYER)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .d1_valid     (up_in_valid),
    .d1_ready     (up_in_ready),
    .d1_flit      (up_in_flit),
    .d2_valid     (dn_in_valid),
    .d2_ready     (dn_in_ready),
    .d2_flit      (dn_in_flit),
    .d3_valid     (inj_valid),
    .d3_ready     (inj_ready),
    .d3_flit      (inj_flit),
    .m1_valid     (m1_valid),
    .m1_sel       (m1_sel),
    .m1_ready     (m1_ready),
    .m2_valid     (m2_valid),
    .m2_sel       (m2_sel),
    .m2_ready     (m2_ready),
    .m3_valid     (m3_valid),
    .m3_sel       (m3_sel),
    .m3_ready     (ej_ready),
    .m3_conflict_o(m3_conflict_o)
  );

  // multiplexer datapath
  assign m1_flit  = m1_sel ? inj_flit   : dn_in_flit;
  assign m2_flit  = m2_sel ? inj_flit   : up_in_flit;
  assign ej_flit  = m3_sel ? dn_in_flit : up_in_flit;
  assign ej_valid = m3_valid;

  logic up_congested, dn_congested;
  logic [$clog2(TS_DEPTH+1)-1:0] up_occ, dn_occ;

  ts_unit #(
    .DEPTH(TS_DEPTH), .AGE_W(AGE_W), .THRESH_PCT(THRESH_PCT), .NEXT_LAYER(UP_NEXT)
  ) u_ts_up (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (m1_valid),
    .in_ready   (m1_ready),
    .in_flit    (m1_flit),
    .in_src     (m1_sel),
    .out_valid  (up_out_valid),
    .out_ready  (up_out_ready),
    .out_flit   (up_out_flit),
    .sh_status_i(up_sh_status_i),
    .mh_status_i(up_mh_status_i),
    .congested_o(up_congested),
    .occupancy_o(up_occ),
    .bypass_o   (bypass_up_o)
  );

  ts_unit #(
    .DEPTH(TS_DEPTH), .AGE_W(AGE_W), .THRESH_PCT(THRESH_PCT), .NEXT_LAYER(DN_NEXT)
  ) u_ts_dn (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (m2_valid),
    .in_ready   (m2_ready),
    .in_flit    (m2_flit),
    .in_src     (m2_sel),
    .out_valid  (dn_out_valid),
    .out_ready  (dn_out_ready),
    .out_flit   (dn_out_flit),
    .sh_status_i(dn_sh_status_i),
    .mh_status_i(dn_mh_status_i),
    .congested_o(dn_congested),
    .occupancy_o(dn_occ),
    .bypass_o   (bypass_dn_o)
  );

  assign sh_status_o    = ej_congested_i;
  assign mh_status_up_o = dn_congested;
  assign mh_status_dn_o = up_congested;

endmodule
