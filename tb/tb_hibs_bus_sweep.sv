// tb_hibs_bus_sweep: latency of the whole bus (default parameters) against injection rate,
// under uniform traffic.
//
// Every layer's router model creates 8-flit packets open loop: in each cycle of its clock a
// new packet is created with probability RATE, addressed to one of the other three layers
// with equal probability and to a random core. Packets wait in the router's queue and are
// sent flit by flit; the receiving routers are always ready. All clocks run at 10 ns, the
// layer clocks with phase offsets against the bus clock. For each rate the traffic runs for
// a fixed time, the bus is drained, and the average latency (creation of the packet to its
// tail leaving the bus at the destination, queueing included) and the delivered flit rate
// are printed.
//
// With uniform traffic the middle segment carries 4/3 of one layer's offered load in each
// direction, so its ideal limit is 0.094 packets per cycle per layer; the highest rate lies
// below that ideal but beyond the point where this bus saturates in practice. Checks: every packet arrives exactly once, whole, in order and at the right layer and
// core; every packet of a rate is delivered within the drain time; the average latency grows
// from the lowest rate to the highest; below the highest rate the flits delivered while the
// sources run are at least 95 % of the flits of the packets they created.
module tb_hibs_bus_sweep;
  import hibs_pkg::*;

  localparam int N        = 4;
  localparam int PL       = 8;
  localparam int RUN_CYC  = 3000;
  localparam int NRATES   = 4;
  localparam int RATE_PM [NRATES] = '{10, 30, 55, 80};   // packets per 1000 cycles per layer

  logic         clk_bus = 1'b0, rst_bus_n = 1'b0;
  logic [N-1:0] clk_layer = '0, rst_layer_n = '0;
  always #5 clk_bus = ~clk_bus;
  initial begin
    #1 forever #5 clk_layer[0] = ~clk_layer[0];
  end
  initial begin
    #2 forever #5 clk_layer[1] = ~clk_layer[1];
  end
  initial begin
    #3 forever #5 clk_layer[2] = ~clk_layer[2];
  end
  initial begin
    #4 forever #5 clk_layer[3] = ~clk_layer[3];
  end

  logic [N-1:0] tx_valid = '0, tx_ready, rx_valid, rx_ready = '1;
  flit_t        tx_flit [N];
  flit_t        rx_flit [N];
  logic [N-1:0] ev_bypass, ev_m3c, sh_st, mh_st, seg_up, seg_dn, seg_cstall;

  hibs_bus dut (
    .clk_bus(clk_bus), .rst_bus_n(rst_bus_n), .clk_layer(clk_layer), .rst_layer_n(rst_layer_n),
    .r_tx_valid(tx_valid), .r_tx_ready(tx_ready), .r_tx_flit(tx_flit),
    .r_rx_valid(rx_valid), .r_rx_ready(rx_ready), .r_rx_flit(rx_flit),
    .ev_bypass_o(ev_bypass), .ev_m3_conflict_o(ev_m3c), .sh_status_o(sh_st), .mh_status_o(mh_st),
    .seg_up_fire_o(seg_up), .seg_dn_fire_o(seg_dn), .seg_credit_stall_o(seg_cstall)
  );

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  // data: layer(3) core(4) src(2) pid(11) seq(12); pid counts per source and wraps at 2048,
  // far more than can be in flight at once
  function automatic flit_t mk(int layer, int core, int src, int pid, int seq, bit head, bit tail);
    flit_t f;
    f.head = head;
    f.tail = tail;
    f.data = {layer[2:0], core[3:0], src[1:0], pid[10:0], seq[11:0]};
    return f;
  endfunction

  // packets created and not yet delivered, key src*2048 + pid
  realtime born  [int];
  int      dest  [int];      // layer*16 + core
  int      created = 0, delivered = 0;
  realtime lat_sum = 0.0;
  longint  flits_rx = 0;

  bit generating = 1'b0;
  int rate_pm = 0;

  // ---------------- router models: open-loop sources ----------------
  for (genvar l = 0; l < N; l++) begin : g_src
    int q_layer [$];
    int q_core  [$];
    int q_pid   [$];
    int next_pid = 0;
    int seq = 0;

    always @(posedge clk_layer[l]) begin
      // create
      if (generating && int'($urandom % 1000) < rate_pm) begin
        int lay, key;
        do lay = $urandom % N; while (lay == l);
        q_layer.push_back(lay);
        q_core.push_back($urandom % 16);
        q_pid.push_back(next_pid);
        key = l * 2048 + next_pid;
        born[key] = $realtime;
        dest[key] = lay * 16 + q_core[$];
        next_pid = (next_pid + 1) % 2048;
        created++;
      end
      // send: a flit moves when valid and ready were both high at this edge
      if (tx_valid[l] && tx_ready[l]) begin
        seq++;
        if (seq == PL) begin
          seq = 0;
          void'(q_layer.pop_front());
          void'(q_core.pop_front());
          void'(q_pid.pop_front());
        end
      end
    end

    always @(negedge clk_layer[l]) begin
      tx_valid[l] <= q_layer.size() > 0;
      if (q_layer.size() > 0)
        tx_flit[l] <= mk(q_layer[0], q_core[0], l, q_pid[0], seq, seq == 0, seq == PL - 1);
    end
  end

  // ---------------- router models: sinks ----------------
  for (genvar l = 0; l < N; l++) begin : g_snk
    bit busy = 1'b0;
    int cur_key = 0, cur_seq = 0;
    always @(posedge clk_layer[l]) if (rst_layer_n[l] && rx_valid[l]) begin
      flit_t f;
      int key;
      f = rx_flit[l];
      key = int'(f.data[24:23]) * 2048 + int'(f.data[22:12]);
      flits_rx++;
      checks++;
      if (f.head) begin
        if (busy) begin
          failures++;
          $display("FAIL: layer %0d header inside another packet (t=%0t)", l, $time);
        end
        busy    = 1'b1;
        cur_key = key;
        cur_seq = 0;
      end
      if (!busy || key != cur_key || int'(f.data[11:0]) != cur_seq) begin
        failures++;
        $display("FAIL: layer %0d flit out of order or of another packet (t=%0t)", l, $time);
      end
      cur_seq++;
      if (f.tail) begin
        checks++;
        if (!born.exists(key) || dest[key] != l * 16 + int'(hdr_core(f)) ||
            int'(hdr_layer(f)) != l || cur_seq != PL) begin
          failures++;
          $display("FAIL: layer %0d unknown, misdelivered, short or duplicate packet (t=%0t)",
                   l, $time);
        end else begin
          lat_sum += $realtime - born[key];
          born.delete(key);
          dest.delete(key);
        end
        busy = 1'b0;
        delivered++;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk_bus);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real avg_lat [NRATES];

  initial begin
    repeat (4) @(posedge clk_bus);
    rst_layer_n = '1;
    #1 rst_bus_n = 1'b1;
    repeat (4) @(posedge clk_bus);

    for (int r = 0; r < NRATES; r++) begin
      int c0, d0, guard;
      longint f0, f_end;
      real offered, carried;
      c0 = created;
      d0 = delivered;
      f0 = flits_rx;
      lat_sum = 0.0;
      rate_pm = RATE_PM[r];
      generating = 1'b1;
      repeat (RUN_CYC) @(posedge clk_bus);
      generating = 1'b0;
      f_end = flits_rx;
      guard = 0;
      while (delivered - d0 < created - c0 && guard < 5000) begin
        @(posedge clk_bus);
        guard++;
      end
      check(delivered - d0 == created - c0 && born.size() == 0,
            $sformatf("rate %0d/1000: all %0d packets delivered (%0d)",
                      RATE_PM[r], created - c0, delivered - d0));
      avg_lat[r] = (delivered > d0) ? lat_sum / real'(delivered - d0) : 0.0;
      // offered: flits of the packets actually created; carried: flits delivered while
      // the sources ran. Below saturation the two agree up to the few packets in flight.
      offered = real'((created - c0) * PL) / real'(N) / real'(RUN_CYC);
      carried = real'(f_end - f0) / real'(N) / real'(RUN_CYC);
      if (r < NRATES - 1)
        check(carried > 0.95 * offered,
              $sformatf("rate %0d/1000: delivered flit rate %0.3f keeps up with offered %0.3f",
                        RATE_PM[r], carried, offered));
      $display("rate %0d packets/1000 cycles/layer: offered %0.3f, carried %0.3f flits/cycle/layer, %0d packets, average latency %0.1f ns",
               RATE_PM[r], offered, carried, created - c0, avg_lat[r]);
      repeat (20) @(posedge clk_bus);
    end
    check(avg_lat[NRATES-1] > avg_lat[0], "latency grows with the injection rate");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
