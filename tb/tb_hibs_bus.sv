// tb_hibs_bus: end-to-end testbench of the whole bus at its default parameters (4 layers,
// 5-flit TS buffers, 8-flit interface FIFOs, 80 % thresholds).
//
// The bus runs at 10 ns; the four layer clocks run at 8, 12, 10 and 15 ns, so every
// interface really crosses clock domains. Every layer's router model sends 8-flit packets
// while it receives. First a single packet crosses the empty bus from layer 0 to layer 3: its
// header must move one segment per bus cycle, every segment must carry one flit per cycle,
// and the packet's router-to-router latency must lie within a bound worked out from the
// clock periods. The average latency of every phase is printed.
// Then three traffic phases follow:
//   uniform  destination layer uniform over the other three layers;
//   hotspot  the four hotspot nodes of the original evaluation (2,2,1) (3,3,2) (2,3,3) (3,2,4), one per layer,
//            each draw 20 % of the packets on top of the uniform share; the router of
//            layer 2 (index) also drains slowly, so its interface FIFO congests;
//   processor/cache  the top layer (processors) sends to the three layers below (cache
//            banks, 9 nodes per layer), which send only to the top layer.
// Checks: every packet arrives exactly once, at the layer its header names, whole, in order
// within itself and never interleaved with another. The testbench also counts the bus
// mechanisms and fails if one never happened: the non-blocking reordering in a TS unit, the
// M3 arbitration between the two pipelines, SH_Status and MH_Status assertions, packets
// passing through an intermediate layer, upward and downward injection, both directions of
// one segment moving flits in the same cycle, all three segments moving flits together, and
// a link sender waiting for a credit.
module tb_hibs_bus;
  import hibs_pkg::*;

  localparam int N  = 4;
  localparam int PL = 8;     // packet length in flits (document: 8)

  logic       clk_bus = 1'b0, rst_bus_n = 1'b0;
  logic [N-1:0] clk_layer = '0, rst_layer_n = '0;
  always #5 clk_bus = ~clk_bus;
  always #4 clk_layer[0] = ~clk_layer[0];
  always #6 clk_layer[1] = ~clk_layer[1];
  always #5 clk_layer[2] = ~clk_layer[2];
  always #7.5 clk_layer[3] = ~clk_layer[3];

  logic [N-1:0] tx_valid = '0, tx_ready, rx_valid, rx_ready = '0;
  flit_t        tx_flit [N];
  flit_t        rx_flit [N];
  logic [N-1:0] ev_bypass, ev_m3c, sh_st, mh_st, seg_up, seg_dn, seg_cstall;

  hibs_bus dut (
    .clk_bus(clk_bus), .rst_bus_n(rst_bus_n), .clk_layer(clk_layer), .rst_layer_n(rst_layer_n),
    .r_tx_valid(tx_valid), .r_tx_ready(tx_ready), .r_tx_flit(tx_flit),
    .r_rx_valid(rx_valid), .r_rx_ready(rx_ready), .r_rx_flit(rx_flit),
    .ev_bypass_o(ev_bypass), .ev_m3_conflict_o(ev_m3c), .sh_status_o(sh_st), .mh_status_o(mh_st),
    .seg_up_fire_o(seg_up), .seg_dn_fire_o(seg_dn),
    .seg_credit_stall_o(seg_cstall)
  );

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  // data: layer(3) core(4) src(2) pid(11) seq(12)
  function automatic flit_t mk(int layer, int core, int src, int pid, int seq, bit head, bit tail);
    flit_t f;
    f.head = head;
    f.tail = tail;
    f.data = {layer[2:0], core[3:0], src[1:0], pid[10:0], seq[11:0]};
    return f;
  endfunction

  int sent_core [int];       // key src*4096 + pid -> destination core
  int sent_layer [int];
  realtime sent_t [int];     // header accepted by the bus interface
  // latency per phase (0 zero load, 1 uniform, 2 hotspot, 3 processor/cache), from the
  // header entering the sender's interface to the tail leaving the receiver's interface
  realtime lat_sum [4] = '{default: 0.0};
  int      lat_n   [4] = '{default: 0};
  function automatic int phase_of(int pid);
    if (pid >= 2000) return 0;
    if (pid >= 1500) return 3;
    if (pid >= 1000) return 2;
    return 1;
  endfunction
  int seen [int];
  int delivered = 0, passed_through = 0, inj_up = 0, inj_dn = 0;
  bit hot_phase = 1'b0;
  bit rx_all_ready = 1'b0;

  // ---------------- routers: senders ----------------
  task automatic router_send(int l, int pid, int layer, int core);
    sent_core[l * 4096 + pid]  = core;
    sent_layer[l * 4096 + pid] = layer;
    if (layer > l) inj_up++; else inj_dn++;
    if ((layer > l ? layer - l : l - layer) >= 2) passed_through++;
    for (int s = 0; s < PL; s++) begin
      @(negedge clk_layer[l]);
      tx_valid[l] = 1'b1;
      tx_flit[l]  = mk(layer, core, l, pid, s, s == 0, s == PL - 1);
      #0.1;
      while (!tx_ready[l]) begin
        @(negedge clk_layer[l]);
        #0.1;
      end
      @(posedge clk_layer[l]);
      if (s == 0) sent_t[l * 4096 + pid] = $realtime;
      #0.1 tx_valid[l] = 1'b0;
    end
  endtask

  // hotspot nodes of the document, (x, y, layer) with layers numbered from 1
  function automatic void hotspot(int h, output int layer, output int core);
    int x, y, z;
    case (h)
      0: begin x = 2; y = 2; z = 1; end
      1: begin x = 3; y = 3; z = 2; end
      2: begin x = 2; y = 3; z = 3; end
      default: begin x = 3; y = 2; z = 4; end
    endcase
    layer = z - 1;
    core  = (y - 1) * 4 + (x - 1);
  endfunction

  // mode 0 uniform, 1 hotspot, 2 processor/cache: processors on the top layer talk to cache
  // banks in the three layers below, which answer only to the top layer
  task automatic router_traffic(int l, int npk, int mode, int pid0);
    for (int p = 0; p < npk; p++) begin
      int layer, core, r;
      r = $urandom % 100;
      layer = l;
      if (mode == 2) begin
        layer = (l == N - 1) ? int'($urandom % (N - 1)) : N - 1;
        core  = $urandom % 9;
      end else if (mode == 1 && r < 80) begin
        // 4 hotspots x 20 %; a hotspot in the sender's own layer is reached without the bus
        while (layer == l) hotspot($urandom % 4, layer, core);
      end else begin
        while (layer == l) layer = $urandom % N;
        core = $urandom % 16;
      end
      repeat ($urandom % 6) @(negedge clk_layer[l]);
      router_send(l, pid0 + p, layer, core);
    end
  endtask

  // ---------------- routers: receivers ----------------
  bit rx_busy [N];
  int rx_key [N], rx_seq [N];

  for (genvar l = 0; l < N; l++) begin : g_rx
    always @(negedge clk_layer[l])
      rx_ready[l] <= rx_all_ready ? 1'b1 :
                     (hot_phase && l == 2) ? (($urandom % 5) == 0) : (($urandom % 4) != 0);

    always @(posedge clk_layer[l]) if (rst_layer_n[l] && rx_valid[l] && rx_ready[l]) begin
      flit_t f;
      int key;
      f = rx_flit[l];
      key = int'(f.data[24:23]) * 4096 + int'(f.data[22:12]);
      checks++;
      if (f.head) begin
        if (rx_busy[l] || int'(hdr_layer(f)) != l) begin
          failures++;
          $display("FAIL: layer %0d got a header for layer %0d or mid-packet (t=%0t)",
                   l, hdr_layer(f), $time);
        end
        rx_busy[l] = 1'b1;
        rx_key[l]  = key;
        rx_seq[l]  = 0;
      end else if (!rx_busy[l] || key != rx_key[l]) begin
        failures++;
        $display("FAIL: layer %0d body flit of another packet (t=%0t)", l, $time);
      end
      if (int'(f.data[11:0]) != rx_seq[l] || f.tail != (rx_seq[l] == PL - 1)) begin
        failures++;
        $display("FAIL: layer %0d flit order (t=%0t)", l, $time);
      end
      rx_seq[l]++;
      if (f.tail) begin
        checks++;
        if (!sent_core.exists(key) || sent_core[key] != int'(hdr_core(f)) ||
            sent_layer[key] != l || seen.exists(key)) begin
          failures++;
          $display("FAIL: layer %0d unknown, misdelivered or duplicate packet (t=%0t)", l, $time);
        end
        seen[key] = 1;
        if (sent_t.exists(key)) begin
          lat_sum[phase_of(key % 4096)] += $realtime - sent_t[key];
          lat_n[phase_of(key % 4096)]++;
        end
        rx_busy[l] = 1'b0;
        delivered++;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_bypass = 0, n_m3c = 0, n_sh = 0, n_mh = 0, n_bidir = 0, n_allseg = 0, n_txstall = 0, n_cstall = 0;

  longint bus_cyc = 0;
  longint seg_first [N], seg_last [N];
  int     seg_cnt [N];
  always @(posedge clk_bus) begin
    bus_cyc <= bus_cyc + 1;
    if (rx_all_ready)
      for (int s = 0; s < N - 1; s++) if (seg_up[s]) begin
        if (seg_cnt[s] == 0) seg_first[s] = bus_cyc;
        seg_last[s] = bus_cyc;
        seg_cnt[s]++;
      end
  end

  always @(posedge clk_bus) if (rst_bus_n) begin
    int act;
    n_bypass += $countones(ev_bypass);
    n_m3c    += $countones(ev_m3c);
    n_sh     += $countones(sh_st);
    n_mh     += $countones(mh_st);
    act = 0;
    for (int s = 0; s < N - 1; s++) begin
      if (seg_up[s] && seg_dn[s]) n_bidir++;
      if (seg_cstall[s]) n_cstall++;
      if (seg_up[s] || seg_dn[s]) act++;
    end
    if (act == N - 1) n_allseg++;
    if ((tx_valid & ~tx_ready) != '0) n_txstall++;
  end

  initial begin
    repeat (400000) @(posedge clk_bus);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int npk;
    npk = 120;
    for (int l = 0; l < N; l++) tx_flit[l] = '0;
    repeat (5) @(posedge clk_layer[3]);
    rst_bus_n = 1'b1;
    rst_layer_n = '1;
    repeat (3) @(posedge clk_bus);

    // zero load: one packet from layer 0 to layer 3 moves one segment per bus cycle and
    // every segment carries its 8 flits
    rx_all_ready = 1'b1;
    router_send(0, 2000, 3, 5);
    begin
      int guard;
      guard = 0;
      while (delivered < 1 && guard < 200) begin
        @(posedge clk_bus);
        guard++;
      end
    end
    check(seg_first[1] == seg_first[0] + 1 && seg_first[2] == seg_first[0] + 2,
          $sformatf("zero load: header crosses one segment per cycle (%0d %0d %0d)",
                    seg_first[0], seg_first[1], seg_first[2]));
    check(seg_cnt[0] == PL && seg_cnt[1] == PL && seg_cnt[2] == PL,
          "zero load: each segment carried the 8 flits");
    check(seg_last[2] - seg_first[2] == PL - 1, "zero load: one flit per cycle on the last segment");
    // router to router: at most 4 bus cycles into the bus, 4 across it, 3 receiver cycles
    // (15 ns) out of it, then the other 7 flits at the receiver's rate; at least the 3
    // segments plus those 7 flits
    check(lat_n[0] == 1 && lat_sum[0] <= 40.0 + 40.0 + 45.0 + 105.0 && lat_sum[0] >= 30.0 + 105.0,
          $sformatf("zero load: packet latency %0.1f ns within 135..230 ns", lat_sum[0]));
    rx_all_ready = 1'b0;

    // uniform phase
    fork
      router_traffic(0, npk, 0, 0);
      router_traffic(1, npk, 0, 0);
      router_traffic(2, npk, 0, 0);
      router_traffic(3, npk, 0, 0);
    join
    // hotspot phase
    hot_phase = 1'b1;
    fork
      router_traffic(0, npk, 1, 1000);
      router_traffic(1, npk, 1, 1000);
      router_traffic(2, npk, 1, 1000);
      router_traffic(3, npk, 1, 1000);
    join
    hot_phase = 1'b0;
    // processor/cache phase
    fork
      router_traffic(0, npk / 2, 2, 1500);
      router_traffic(1, npk / 2, 2, 1500);
      router_traffic(2, npk / 2, 2, 1500);
      router_traffic(3, 3 * npk / 2, 2, 1500);
    join
    begin
      int guard;
      guard = 0;
      while (delivered < 11 * npk + 1 && guard < 20000) begin
        @(posedge clk_bus);
        guard++;
      end
    end
    repeat (20) @(posedge clk_bus);

    check(delivered == 11 * npk + 1, $sformatf("all %0d packets delivered (%0d)", 11 * npk + 1, delivered));
    check(seen.size() == sent_core.size(), "no packet lost");
    $display("mechanisms: bypass=%0d m3_conflict=%0d sh_status=%0d mh_status=%0d", n_bypass,
             n_m3c, n_sh, n_mh);
    $display("average packet latency in ns (bus clock 10 ns): zero load %0.1f, uniform %0.1f, hotspot %0.1f, processor/cache %0.1f",
             lat_sum[0] / (lat_n[0] > 0 ? lat_n[0] : 1), lat_sum[1] / (lat_n[1] > 0 ? lat_n[1] : 1),
             lat_sum[2] / (lat_n[2] > 0 ? lat_n[2] : 1), lat_sum[3] / (lat_n[3] > 0 ? lat_n[3] : 1));
    $display("mechanisms: pass_through=%0d inject_up=%0d inject_down=%0d bidir=%0d all_segments=%0d tx_stall=%0d credit_stall=%0d",
             passed_through, inj_up, inj_dn, n_bidir, n_allseg, n_txstall, n_cstall);
    check(n_bypass > 0, "non-blocking reordering happened");
    check(n_m3c > 0, "M3 arbitration conflict happened");
    check(n_sh > 0, "SH_Status asserted");
    check(n_mh > 0, "MH_Status asserted");
    check(passed_through > 0, "packets passed through an intermediate layer");
    check(inj_up > 0 && inj_dn > 0, "injection in both directions");
    check(n_bidir > 0, "both directions of a segment moved in one cycle");
    check(n_cstall > 0, "a link sender waited for a credit");
    check(n_allseg > 0, "all segments moved flits in one cycle");
    check(n_txstall > 0, "router back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
