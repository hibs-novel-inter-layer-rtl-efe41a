// ts_unit: transfer-stage (TS) unit, the output buffer of one direction of a transfer stage.
//
// Packets leaving a transfer stage towards the next layer (upward or downward) wait here.
// The unit holds a small flit buffer and a packet table. Each table row describes one packet:
// a valid tag (v), its type (T: single-hop SH or multiple-hop MH), its age (A) and a pointer
// to its oldest buffered flit (P). The flits of a packet are chained in the buffer as a linked
// list: every buffer slot holds a flit and a pointer to the next flit of the same packet, so
// several packets share the buffer without fixed partitions.
//
// Type: a packet whose destination layer is the next layer (parameter NEXT_LAYER) is SH, it
// will leave the bus there through the interface; any other is MH and will be forwarded.
// This is how an MH packet becomes SH once its destination is one layer away.
//
// Non-blocking arbiter: whenever no packet is in flight on the output, the arbiter chooses
// among the packets whose header flit is buffered. Only packets whose path in the next
// stage is not congested compete (sh_status_i for SH packets, mh_status_i for MH packets);
// if every waiting packet's path is congested they all compete. Among the competitors the
// oldest (highest age) wins, ties going to the lowest table row. When the winner's header
// leaves, every other packet of the same type ages by one (saturating), so a packet cannot
// starve. The winner then owns the output until its tail flit has left (wormhole).
//
// Two writers share the input (forwarded packets and packets injected by the local router);
// in_src tells which one sends the present flit, and their flits may interleave cycle by
// cycle: the unit keeps one open packet per writer and links each flit to its own packet.
// Flits of one writer arrive in packet order. While the packet that owns the output still
// waits for flits, the last free slot is kept for it, so the other writer cannot fill the
// buffer and stall both.
//
// Interface: valid/ready input and output, one flit per cycle each way; a flit written in
// one cycle can leave in the next. in_ready needs a free slot (two if the slot is reserved
// as above), and for a header also a free table row. congested_o (this unit's MH_Status) is high when the occupancy
// reaches THRESH_PCT percent of DEPTH. bypass_o pulses when a header leaves that the arbiter
// would not have chosen without the status inputs, i.e. the non-blocking scheme reordered.
//
// Following the document: table fields, linked-list buffer, age-based arbitration on path
// stress, same-type ageing, 5-flit depth and 80 % threshold. This design's choices: table
// rows (= DEPTH), 3-bit age, tie-break and the fallback when every path is congested.
module ts_unit
  import hibs_pkg::*;
#(
  parameter int unsigned DEPTH      = 5,
  parameter int unsigned ROWS       = DEPTH,
  parameter int unsigned AGE_W      = 3,
  parameter int unsigned THRESH_PCT = 80,
  parameter int unsigned NEXT_LAYER = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,

  input  logic                       in_valid,
  output logic                       in_ready,
  input  flit_t                      in_flit,
  input  logic                       in_src,      // which of the two writers sends in_flit

  output logic                       out_valid,
  input  logic                       out_ready,
  output flit_t                      out_flit,

  input  logic                       sh_status_i,
  input  logic                       mh_status_i,
  output logic                       congested_o,
  output logic [$clog2(DEPTH+1)-1:0] occupancy_o,
  output logic                       bypass_o
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef logic [PW-1:0]    ptr_t;
  typedef logic [RW-1:0]    row_t;
  typedef logic [AGE_W-1:0] age_t;
  typedef logic [CW-1:0]    cnt_t;

  // flit buffer
  flit_t            slot_flit [DEPTH];
  ptr_t             slot_next [DEPTH];
  logic [DEPTH-1:0] slot_used;

  // packet table
  logic [ROWS-1:0]  row_v;
  pkt_type_e        row_type [ROWS];
  age_t             row_age  [ROWS];
  ptr_t             row_head [ROWS];   // P: oldest buffered flit
  ptr_t             row_last [ROWS];   // newest buffered flit, where the list grows
  cnt_t             row_cnt  [ROWS];   // flits of the packet now in the buffer

  logic [ROWS-1:0]  row_open;          // tail not yet written

  logic             rd_lock;           // a packet owns the output
  row_t             rd_row;
  row_t             wr_row [2];        // packet being written, per writer

  // ---------------- free slot and free row ----------------
  logic free_slot_ok, free_row_ok;
  ptr_t free_slot;
  row_t free_row;

  always_comb begin
    free_slot_ok = 1'b0;
    free_slot    = '0;
    for (int i = int'(DEPTH) - 1; i >= 0; i--)
      if (!slot_used[i]) begin
        free_slot_ok = 1'b1;
        free_slot    = ptr_t'(i);
      end
    free_row_ok = 1'b0;
    free_row    = '0;
    for (int i = int'(ROWS) - 1; i >= 0; i--)
      if (!row_v[i]) begin
        free_row_ok = 1'b1;
        free_row    = row_t'(i);
      end
  end

  // One slot is kept for the packet that owns the output while its tail has not arrived:
  // otherwise the other writer could fill the buffer and neither packet could move.
  cnt_t free_cnt;
  logic lock_waits, owns_lock;
  always_comb begin
    free_cnt = '0;
    for (int i = 0; i < int'(DEPTH); i++) free_cnt += cnt_t'(!slot_used[i]);
  end
  assign lock_waits = rd_lock && row_open[rd_row];
  assign owns_lock  = !in_flit.head && (wr_row[in_src] == rd_row);
  assign in_ready   = free_slot_ok && (!in_flit.head || free_row_ok) &&
                      (!lock_waits || owns_lock || free_cnt >= cnt_t'(2));

  logic wr_en;
  row_t wrow;
  assign wr_en = in_valid && in_ready;
  assign wrow  = wr_row[in_src];

  // ---------------- arbiter ----------------
  logic [ROWS-1:0] cand, path_free, elig;

  always_comb begin
    for (int r = 0; r < int'(ROWS); r++) begin
      cand[r]      = !rd_lock && row_v[r] && (row_cnt[r] != '0);
      path_free[r] = (row_type[r] == PKT_SH) ? !sh_status_i : !mh_status_i;
    end
    elig = cand & path_free;
    if (elig == '0) elig = cand;
  end

  // oldest requester, lowest row on a tie
  function automatic row_t pick_oldest(logic [ROWS-1:0] req, age_t ages [ROWS]);
    row_t best = '0;
    logic found = 1'b0;
    for (int r = 0; r < int'(ROWS); r++)
      if (req[r] && (!found || ages[r] > ages[best])) begin
        best  = row_t'(r);
        found = 1'b1;
      end
    return best;
  endfunction

  row_t pick, pick_blind;
  assign pick       = pick_oldest(elig, row_age);
  assign pick_blind = pick_oldest(cand, row_age);

  row_t cur;
  assign cur       = rd_lock ? rd_row : pick;
  assign out_valid = rd_lock ? (row_cnt[rd_row] != '0) : (cand != '0);
  assign out_flit  = slot_flit[row_head[cur]];

  logic pop;
  ptr_t pop_slot;
  assign pop      = out_valid && out_ready;
  assign pop_slot = row_head[cur];
  assign bypass_o = pop && !rd_lock && (pick != pick_blind);

  // ---------------- next state ----------------
  logic [DEPTH-1:0] slot_used_n;
  ptr_t             slot_next_n [DEPTH];
  logic [ROWS-1:0]  row_v_n, row_open_n;
  pkt_type_e        row_type_n  [ROWS];
  age_t             row_age_n   [ROWS];
  ptr_t             row_head_n  [ROWS];
  ptr_t             row_last_n  [ROWS];
  cnt_t             row_cnt_n   [ROWS];
  logic             rd_lock_n;
  row_t             rd_row_n;
  row_t             wr_row_n [2];

  always_comb begin
    slot_used_n = slot_used;
    slot_next_n = slot_next;
    row_v_n     = row_v;
    row_open_n  = row_open;
    row_type_n  = row_type;
    row_age_n   = row_age;
    row_head_n  = row_head;
    row_last_n  = row_last;
    row_cnt_n   = row_cnt;
    rd_lock_n   = rd_lock;
    rd_row_n    = rd_row;
    wr_row_n    = wr_row;

    if (pop) begin
      slot_used_n[pop_slot] = 1'b0;
      row_cnt_n[cur]        = row_cnt[cur] - 1'b1;
      row_head_n[cur]       = slot_next[pop_slot];
      if (out_flit.tail) begin
        row_v_n[cur] = 1'b0;
        rd_lock_n    = 1'b0;
      end else begin
        rd_lock_n = 1'b1;
        rd_row_n  = cur;
      end
      if (out_flit.head)
        for (int r = 0; r < int'(ROWS); r++)
          if (row_t'(r) != cur && row_v[r] && row_type[r] == row_type[cur] && row_age[r] != '1)
            row_age_n[r] = row_age[r] + 1'b1;
    end

    if (wr_en) begin
      slot_used_n[free_slot] = 1'b1;
      if (in_flit.head) begin
        row_v_n[free_row]    = 1'b1;
        row_type_n[free_row] = (32'(hdr_layer(in_flit)) == NEXT_LAYER) ? PKT_SH : PKT_MH;
        row_age_n[free_row]  = '0;
        row_head_n[free_row] = free_slot;
        row_last_n[free_row] = free_slot;
        row_cnt_n[free_row]  = cnt_t'(1);
        row_open_n[free_row] = !in_flit.tail;
        wr_row_n[in_src]     = free_row;
      end else begin
        if (row_cnt_n[wrow] == '0) row_head_n[wrow] = free_slot;
        else                       slot_next_n[row_last[wrow]] = free_slot;
        row_last_n[wrow] = free_slot;
        row_cnt_n[wrow]  = row_cnt_n[wrow] + 1'b1;
        if (in_flit.tail) row_open_n[wrow] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot_used <= '0;
      row_v     <= '0;
      row_open  <= '0;
      rd_lock   <= 1'b0;
      rd_row    <= '0;
      wr_row    <= '{default: '0};
      for (int r = 0; r < int'(ROWS); r++) begin
        row_type[r] <= PKT_SH;
        row_age[r]  <= '0;
        row_head[r] <= '0;
        row_last[r] <= '0;
        row_cnt[r]  <= '0;
      end
      for (int i = 0; i < int'(DEPTH); i++) slot_next[i] <= '0;
    end else begin
      slot_used <= slot_used_n;
      slot_next <= slot_next_n;
      row_v     <= row_v_n;
      row_open  <= row_open_n;
      row_type  <= row_type_n;
      row_age   <= row_age_n;
      row_head  <= row_head_n;
      row_last  <= row_last_n;
      row_cnt   <= row_cnt_n;
      rd_lock   <= rd_lock_n;
      rd_row    <= rd_row_n;
      wr_row    <= wr_row_n;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) slot_flit[free_slot] <= in_flit;
  end

  // ---------------- status ----------------
  always_comb begin
    occupancy_o = '0;
    for (int i = 0; i < int'(DEPTH); i++) occupancy_o += cnt_t'(slot_used[i]);
  end
  assign congested_o = (32'(occupancy_o) * 100) >= (DEPTH * THRESH_PCT);

endmodule
