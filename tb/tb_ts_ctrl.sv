// tb_ts_ctrl: self-checking testbench of the transfer-stage controller (layer 1 of 4).
//
// Directed part: both pipelines present headers for this layer at once; exactly one gets M3,
// the conflict is flagged, the loser waits until the winner's tail has passed, then goes.
// M1 and M2, which feed linked-list buffers, must interleave packets flit by flit instead.
// Route decisions of D1, D2 and D3 are checked for each destination. Random part: three
// sources send packets with random destinations and gaps, three sinks stall at random; every
// flit written through M1, M2 or M3 is checked against the source it came from, the route
// rule for its destination, and per-source packet order (M3: no interleaving at all).
module tb_ts_ctrl;
  import hibs_pkg::*;

  localparam int MY = 1;     // the module default

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  [2:0] dv;            // d1, d2, d3 valid
  logic  [2:0] dr;
  flit_t       df [3];
  logic        m1_valid, m1_sel, m1_ready;
  logic        m2_valid, m2_sel, m2_ready;
  logic        m3_valid, m3_sel, m3_ready;
  logic        conflict;

  ts_ctrl dut (
    .clk(clk), .rst_n(rst_n),
    .d1_valid(dv[0]), .d1_ready(dr[0]), .d1_flit(df[0]),
    .d2_valid(dv[1]), .d2_ready(dr[1]), .d2_flit(df[1]),
    .d3_valid(dv[2]), .d3_ready(dr[2]), .d3_flit(df[2]),
    .m1_valid(m1_valid), .m1_sel(m1_sel), .m1_ready(m1_ready),
    .m2_valid(m2_valid), .m2_sel(m2_sel), .m2_ready(m2_ready),
    .m3_valid(m3_valid), .m3_sel(m3_sel), .m3_ready(m3_ready),
    .m3_conflict_o(conflict)
  );

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  function automatic flit_t mk(int layer, int src, int pid, int seq, bit head, bit tail);
    flit_t f;
    f.head = head;
    f.tail = tail;
    f.data = {layer[2:0], 4'd0, src[1:0], pid[10:0], seq[11:0]};
    return f;
  endfunction

  // expected multiplexer (1, 2 or 3) for a header on input i (0: D1, 1: D2, 2: D3)
  function automatic int exp_mux(int i, int layer);
    if (i == 0) return (layer == MY) ? 3 : 2;
    if (i == 1) return (layer == MY) ? 3 : 1;
    return (layer > MY) ? 1 : 2;
  endfunction

  // source index behind each multiplexer selection
  function automatic int src_of(int m, logic sel);
    case (m)
      1: return sel ? 2 : 1;
      2: return sel ? 2 : 0;
      default: return sel ? 1 : 0;
    endcase
  endfunction

  // ---------------- scoreboard on the multiplexer outputs ----------------
  // per multiplexer and source: M1/M2 may interleave sources flit by flit, M3 may not
  bit  m_busy [4][3];
  int  m_seq  [4][3];
  int  interleaved = 0;
  int  m_prev [4];
  int  pkts_out = 0;
  int  conflicts = 0;

  task automatic observe(int m, logic valid, logic ready, logic sel);
    flit_t f;
    int    s;
    if (!(valid && ready)) return;
    s = src_of(m, sel);
    f = df[s];
    checks++;
    if (!(dv[s] && dr[s])) begin
      failures++;
      $display("FAIL: M%0d wrote without the source handshake (t=%0t)", m, $time);
    end
    if (f.head) begin
      if (m_busy[m][s] || exp_mux(s, int'(hdr_layer(f))) != m ||
          (m == 3 && (m_busy[3][0] || m_busy[3][1] || m_busy[3][2]))) begin
        failures++;
        $display("FAIL: M%0d header from source %0d misrouted or interleaved (t=%0t)", m, s, $time);
      end
      m_busy[m][s] = 1'b1;
      m_seq[m][s]  = 0;
    end else if (!m_busy[m][s] || int'(f.data[11:0]) != m_seq[m][s]) begin
      failures++;
      $display("FAIL: M%0d body flit out of packet (t=%0t)", m, $time);
    end
    if (m_prev[m] != s && m_busy[m][m_prev[m]]) interleaved++;
    m_prev[m] = s;
    m_seq[m][s]++;
    if (f.tail) begin
      m_busy[m][s] = 1'b0;
      pkts_out++;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    observe(1, m1_valid, m1_ready, m1_sel);
    observe(2, m2_valid, m2_ready, m2_sel);
    observe(3, m3_valid, m3_ready, m3_sel);
    if (conflict) conflicts++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- random sources ----------------
  bit run_random = 1'b0;
  int pkts_in = 0;

  task automatic source(int i, int npk);
    for (int p = 0; p < npk; p++) begin
      int len, layer;
      len = 1 + ($urandom % 8);
      do layer = $urandom % 4; while (i == 2 && layer == MY);
      for (int s = 0; s < len; s++) begin
        @(negedge clk);
        while (($urandom % 4) == 0) begin
          dv[i] = 1'b0;
          @(negedge clk);
        end
        dv[i] = 1'b1;
        df[i] = mk(layer, i, p, s, s == 0, s == len - 1);
        #1;
        while (!dr[i]) begin
          @(negedge clk);
          #1;
        end
        @(posedge clk);
      end
      pkts_in++;
      #1 dv[i] = 1'b0;
    end
  endtask

  initial begin
    dv = '0;
    for (int i = 0; i < 3; i++) df[i] = '0;
    {m1_ready, m2_ready, m3_ready} = 3'b111;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- directed: both pipelines want M3 ----
    @(negedge clk);
    dv[0] = 1'b1; df[0] = mk(MY, 0, 1, 0, 1, 0);
    dv[1] = 1'b1; df[1] = mk(MY, 1, 1, 0, 1, 0);
    #1;
    check(conflict, "M3 conflict flagged");
    check(dr[0] ^ dr[1], "exactly one pipeline gets M3");
    check(m3_valid, "M3 valid");
    begin
      int w, l;
      w = dr[0] ? 0 : 1;
      l = 1 - w;
      @(negedge clk);                   // winner sends its tail, loser holds its header
      df[w] = mk(MY, w, 1, 1, 0, 1);
      #1;
      check(dr[w] && !dr[l], "winner keeps M3 until its tail");
      @(negedge clk);
      dv[w] = 1'b0;
      #1;
      check(dr[l] && m3_sel == logic'(l), "loser gets M3 after the tail");
      df[l] = mk(MY, l, 1, 0, 1, 1);    // make it a one-flit packet
      #1;
      @(negedge clk);
      dv[l] = 1'b0;
    end

    // ---- directed: route decisions ----
    for (int lay = 0; lay < 4; lay++) begin
      @(negedge clk);
      dv = 3'b001; df[0] = mk(lay, 0, 2, 0, 1, 1);
      #1;
      check(lay == MY ? (m3_valid && m3_sel == 1'b0) : (m2_valid && m2_sel == 1'b0),
            $sformatf("D1 route for layer %0d", lay));
      dv = 3'b010; df[1] = mk(lay, 1, 2, 0, 1, 1);
      #1;
      check(lay == MY ? (m3_valid && m3_sel == 1'b1) : (m1_valid && m1_sel == 1'b0),
            $sformatf("D2 route for layer %0d", lay));
      if (lay != MY) begin
        dv = 3'b100; df[2] = mk(lay, 2, 2, 0, 1, 1);
        #1;
        check(lay > MY ? (m1_valid && m1_sel == 1'b1) : (m2_valid && m2_sel == 1'b1),
              $sformatf("D3 route for layer %0d", lay));
      end
    end
    @(negedge clk);
    dv = '0;

    // ---- random ----
    pkts_out = 0;
    fork
      forever begin
        @(negedge clk);
        m1_ready = ($urandom % 3) != 0;
        m2_ready = ($urandom % 3) != 0;
        m3_ready = ($urandom % 3) != 0;
      end
    join_none
    fork
      source(0, 200);
      source(1, 200);
      source(2, 200);
    join
    repeat (5) @(posedge clk);
    check(pkts_out == 600, $sformatf("random: all packets passed (%0d)", pkts_out));
    check(conflicts > 0, "random: M3 conflicts happened");
    check(interleaved > 0, "random: M1/M2 interleaved two packets flit by flit");
    disable fork;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
