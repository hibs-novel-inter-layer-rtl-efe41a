// ts_ctrl: controller of a transfer stage (the "Ctrl" of the transfer stage).
//
// It decodes header flits and drives the three demultiplexers and three multiplexers of the
// stage:
//   D1  input from the upper stage (travelling down): to M3 if the packet's destination is
//       this layer, else to M2 (down TS unit).
//   D2  input from the lower stage (travelling up):  to M3 if for this layer, else to M1.
//   D3  local packets from the interface: to M1 if the destination layer is above this one,
//       to M2 if below. A router must not send a packet for its own layer to the bus.
//   M1  writes the up TS unit, from D2 (forwarding) or D3 (injection).
//   M2  writes the down TS unit, from D1 (forwarding) or D3 (injection).
//   M3  writes the interface FIFO towards the router, from D1 or D2.
// Routing is decided on the header flit and held until the tail flit has passed. M1 and M2
// write TS units, whose linked-list buffers keep interleaved packets apart, so they are
// arbitrated flit by flit: when both inputs request, the grant alternates every cycle. M3 writes the plain
// interface FIFO, so it is arbitrated per packet: when both pipelines present headers for a
// free M3 in the same cycle a round-robin pointer chooses, and the winner keeps M3 until its
// tail flit is written. This is the arbitration that keeps the two pipelines from writing
// the interface FIFO at the same time.
//
// Interface: valid/ready per input and per multiplexer output; all decisions are
// combinational, so a flit crosses a demultiplexer and a multiplexer in the cycle it arrives.
// mX_sel names the granted input (0: first input listed above, 1: second).
// m3_conflict_o pulses when both pipelines request a free M3 in the same cycle.
// Following the document: the D/M connection pattern, header-based decisions in the
// controller, the M3 arbitration. This design's choices: per-flit arbitration of M1/M2,
// per-packet locking of M3 and round-robin order.
module ts_ctrl
  import hibs_pkg::*;
#(
  parameter int unsigned MY_LAYER = 1
) (
  input  logic  clk,
  input  logic  rst_n,

  input  logic  d1_valid,
  output logic  d1_ready,
  input  flit_t d1_flit,
  input  logic  d2_valid,
  output logic  d2_ready,
  input  flit_t d2_flit,
  input  logic  d3_valid,
  output logic  d3_ready,
  input  flit_t d3_flit,

  output logic  m1_valid,
  output logic  m1_sel,
  input  logic  m1_ready,
  output logic  m2_valid,
  output logic  m2_sel,
  input  logic  m2_ready,
  output logic  m3_valid,
  output logic  m3_sel,
  input  logic  m3_ready,

  output logic  m3_conflict_o
);

  typedef enum logic [1:0] {
    TO_M1 = 2'd0,
    TO_M2 = 2'd1,
    TO_M3 = 2'd2
  } route_e;

  // ---------------- demultiplexer routes ----------------
  route_e d1_route_q, d2_route_q, d3_route_q;
  route_e d1_route, d2_route, d3_route;

  assign d1_route = !d1_flit.head ? d1_route_q :
                    (32'(hdr_layer(d1_flit)) == MY_LAYER) ? TO_M3 : TO_M2;
  assign d2_route = !d2_flit.head ? d2_route_q :
                    (32'(hdr_layer(d2_flit)) == MY_LAYER) ? TO_M3 : TO_M1;
  assign d3_route = !d3_flit.head ? d3_route_q :
                    (32'(hdr_layer(d3_flit)) > MY_LAYER) ? TO_M1 : TO_M2;

  // requests per multiplexer: [0] first input, [1] second input
  logic [1:0] m1_req, m2_req, m3_req;
  assign m1_req = {d3_valid && d3_route == TO_M1, d2_valid && d2_route == TO_M1};
  assign m2_req = {d3_valid && d3_route == TO_M2, d1_valid && d1_route == TO_M2};
  assign m3_req = {d2_valid && d2_route == TO_M3, d1_valid && d1_route == TO_M3};

  // ---------------- per-packet multiplexer arbitration ----------------
  logic m3_busy;                        // a packet owns M3
  logic m3_own;                         // its input
  logic m1_last, m2_last, m3_last;      // last winner, for round robin

  function automatic logic grant(logic busy, logic own, logic last, logic [1:0] req);
    if (busy)          return own;
    if (req == 2'b11)  return !last;
    return req[1];
  endfunction

  // M1 and M2 feed linked-list TS units, which accept interleaved packets: arbitrated per flit
  assign m1_sel = grant(1'b0, 1'b0, m1_last, m1_req);
  assign m2_sel = grant(1'b0, 1'b0, m2_last, m2_req);
  assign m3_sel = grant(m3_busy, m3_own, m3_last, m3_req);

  assign m1_valid = m1_req[m1_sel];
  assign m2_valid = m2_req[m2_sel];
  assign m3_valid = m3_req[m3_sel];

  flit_t m3_flit;
  assign m3_flit = m3_sel ? d2_flit : d1_flit;

  logic m3_fire;
  assign m3_fire = m3_valid && m3_ready;

  // an input is ready when the multiplexer of its route is granted to it and can take the flit
  always_comb begin
    unique case (d1_route)
      TO_M2:   d1_ready = (m2_sel == 1'b0) && m2_ready;
      TO_M3:   d1_ready = (m3_sel == 1'b0) && m3_ready;
      default: d1_ready = 1'b0;
    endcase
    unique case (d2_route)
      TO_M1:   d2_ready = (m1_sel == 1'b0) && m1_ready;
      TO_M3:   d2_ready = (m3_sel == 1'b1) && m3_ready;
      default: d2_ready = 1'b0;
    endcase
    unique case (d3_route)
      TO_M1:   d3_ready = (m1_sel == 1'b1) && m1_ready;
      TO_M2:   d3_ready = (m2_sel == 1'b1) && m2_ready;
      default: d3_ready = 1'b0;
    endcase
  end

  assign m3_conflict_o = !m3_busy && (m3_req == 2'b11);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d1_route_q <= TO_M2;
      d2_route_q <= TO_M1;
      d3_route_q <= TO_M1;
      m3_busy <= 1'b0;
      m3_own  <= 1'b0;
      {m1_last, m2_last, m3_last} <= '0;
    end else begin
      if (d1_valid && d1_ready && d1_flit.head) d1_route_q <= d1_route;
      if (d2_valid && d2_ready && d2_flit.head) d2_route_q <= d2_route;
      if (d3_valid && d3_ready && d3_flit.head) d3_route_q <= d3_route;

      // the M1/M2 pointer moves whenever both inputs request, taken or not: a TS unit may
      // refuse one writer's flit (reserved slot) and must then see the other one
      if (m1_req == 2'b11) m1_last <= m1_sel;
      if (m2_req == 2'b11) m2_last <= m2_sel;
      if (m3_fire) begin
        m3_busy <= !m3_flit.tail;
        m3_own  <= m3_sel;
        if (m3_flit.head) m3_last <= m3_sel;
      end
    end
  end

  // ---------------- protocol rules ----------------
  // a packet injected from this layer must be for another layer
  assert property (@(posedge clk) disable iff (!rst_n)
                   d3_valid && d3_flit.head |-> 32'(hdr_layer(d3_flit)) != MY_LAYER)
    else $error("ts_ctrl: local packet addressed to its own layer");
  // a multiplexer that is owned by a packet only ever takes flits of that packet
  assert property (@(posedge clk) disable iff (!rst_n)
                   m3_fire && m3_busy |-> !m3_flit.head)
    else $error("ts_ctrl: header entered M3 while another packet owned it");

endmodule
